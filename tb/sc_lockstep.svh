// sc_lockstep.svh: body shared by the system testbenches. Included inside
// a testbench module that declares clk, rst, the riscv_sc_system instance
// "dut" with its output ports, and checks/failures. Loads the test program
// into the instruction ROM, resets the system and runs it in lockstep with
// the reference model: each cycle the PC, the data-memory strobe, address
// and data, and the register written are compared. Counts how often each
// instruction and each mechanism occurs (taken and not-taken beq, jal
// return-address save, store-then-load through the data memory, dropped
// write to x0) and fails if one never occurs. At the halt it checks the
// hand-computed register values and that the number of cycles equals the
// number of instructions executed (one per cycle).

  localparam int N_EVT = 17;
  localparam string EVT_NAME [N_EVT] = '{"lw", "sw", "add", "sub", "and", "or", "slt", "addi",
      "andi", "ori", "slti", "beq taken", "beq not taken", "jal", "jal with link",
      "write to x0 dropped", "load of stored word"};
  int evt [N_EVT];

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL pc=%h %s", pc, what); end
  endtask

  task automatic count(logic [31:0] ins, effect_t e, logic stored_before);
    logic [2:0] f3 = ins[14:12];
    case (e.kind)
      "lw": begin evt[0]++; if (stored_before) evt[16]++; end
      "sw": evt[1]++;
      "alu_r": case (f3)
                 3'b000: if (ins[30]) evt[3]++; else evt[2]++;
                 3'b111: evt[4]++;
                 3'b110: evt[5]++;
                 3'b010: evt[6]++;
                 default: ;
               endcase
      "alu_i": case (f3)
                 3'b000: evt[7]++;
                 3'b111: evt[8]++;
                 3'b110: evt[9]++;
                 3'b010: evt[10]++;
                 default: ;
               endcase
      "beq_taken": evt[11]++;
      "beq_not":   evt[12]++;
      "jal": begin evt[13]++; if (e.rd != 0) evt[14]++; end
      default: ;
    endcase
    if (e.rf_we && e.rd == 0) evt[15]++;
  endtask

  task automatic run_test_program();
    logic [31:0] prog [$];
    logic [31:0] stored [int unsigned];
    arch_t st;
    effect_t e;
    logic [31:0] ins;
    int cycles = 0, executed = 0;
    bit halted = 0;
    test_program(prog);
    foreach (prog[i]) dut.u_imem.mem[i] = prog[i];
    st.pc = 0;
    foreach (st.x[i]) st.x[i] = 0;
    rst = 1;
    @(posedge clk); #1 rst = 0;
    while (!halted && cycles < 1000) begin
      ins = instr;
      chk(pc == st.pc, $sformatf("PC exp %h", st.pc));
      e = iss_step(st, ins);
      executed++;
      count(ins, e, e.kind == "lw" && stored.exists(e.mem_addr >> 2));
      chk(mem_we == e.mem_we, "data memory write strobe");
      if (e.mem_we) begin
        chk(mem_addr == e.mem_addr && mem_wdata == e.mem_val,
            $sformatf("store %h to %h, exp %h to %h", mem_wdata, mem_addr, e.mem_val, e.mem_addr));
        stored[e.mem_addr >> 2] = e.mem_val;
      end
      if (e.kind == "lw") chk(mem_addr == e.mem_addr, "load address");
      @(posedge clk); #1;
      cycles++;
      if (e.rf_we && e.rd != 0)
        chk(dut.u_core.u_dp.u_rf.regs[e.rd] == e.rd_val,
            $sformatf("x%0d=%h exp %h", e.rd, dut.u_core.u_dp.u_rf.regs[e.rd], e.rd_val));
      if (ins == BEQ(0, 0, 0)) halted = 1;
    end
    chk(halted && pc == PROG_HALT_PC, "program reached its halt");
    chk(cycles == executed, $sformatf("%0d cycles for %0d instructions", cycles, executed));
    for (int r = 1; r <= 17; r++)
      chk(dut.u_core.u_dp.u_rf.regs[r] == test_program_result(r),
          $sformatf("final x%0d=%h exp %h", r, dut.u_core.u_dp.u_rf.regs[r], test_program_result(r)));
    chk(dut.u_dmem.g_lane[0].u_lane.mem['h110 >> 2] == 8'd31 &&
        dut.u_dmem.g_lane[1].u_lane.mem['h110 >> 2] == 8'd0, "Mem[0x110] byte lanes");
    for (int i = 0; i < N_EVT; i++) begin
      $display("  %-22s %0d", EVT_NAME[i], evt[i]);
      chk(evt[i] > 0, {"mechanism never happened: ", EVT_NAME[i]});
    end
    $display("  cycles %0d, instructions %0d", cycles, executed);
  endtask
