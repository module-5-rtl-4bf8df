// tb_random_program: the complete system (64 KiB memories) running a
// randomly generated program in lockstep with the reference model of
// rv_asm_pkg. The program first gives every register x1-x31 a random value
// and clears a 1 KiB data window at 0x400-0x7FC (so nothing undefined is
// ever read), then runs 3000 random instructions drawn from the whole
// subset: R-type and I-type arithmetic on random registers and immediates,
// lw/sw with base x0 inside the window, and forward beq/jal over 0 to 3
// instructions (so the program always ends), followed by the halt loop
// "beq x0, x0, 0". Every cycle the PC, the store strobe, address and data,
// and the written register are compared with the model; at the end all
// registers and the whole data window are compared, and the cycle count
// must equal the number of instructions executed.
module tb_random_program;
  import rv_asm_pkg::*;
  localparam int N_RANDOM = 3000;
  logic        clk = 0, rst;
  logic [31:0] pc, instr, mem_addr, mem_wdata;
  logic        mem_we;
  int checks = 0, failures = 0;

  riscv_sc_system #(.MEM_ADDR_W(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL pc=%h %s", pc, what); end
  endtask

  function automatic int rreg(); return int'($urandom_range(0, 31)); endfunction
  function automatic int rimm(); return int'($urandom_range(0, 4095)) - 2048; endfunction
  function automatic int rwin(); return 'h400 + 4 * int'($urandom_range(0, 255)); endfunction

  function automatic logic [31:0] rand_instr();
    int k = int'($urandom_range(0, 15));
    int skip = 4 * (1 + int'($urandom_range(0, 3)));
    case (k)
      0: return ADD(rreg(), rreg(), rreg());
      1: return SUB(rreg(), rreg(), rreg());
      2: return AND_(rreg(), rreg(), rreg());
      3: return OR_(rreg(), rreg(), rreg());
      4: return SLT(rreg(), rreg(), rreg());
      5: return ADDI(rreg(), rreg(), rimm());
      6: return ANDI(rreg(), rreg(), rimm());
      7: return ORI(rreg(), rreg(), rimm());
      8: return SLTI(rreg(), rreg(), rimm());
      9, 10: return LW(rreg(), rwin(), 0);
      11, 12: return SW(rreg(), rwin(), 0);
      13: return BEQ(rreg(), rreg(), skip);
      14: begin  // equal operands more often, so that many branches are taken
        int r = rreg();
        return BEQ(r, r, skip);
      end
      default: return JAL(rreg(), skip);
    endcase
  endfunction

  initial begin
    logic [31:0] prog [$];
    arch_t st;
    effect_t e;
    logic [31:0] ins;
    automatic int cycles = 0, executed = 0, taken = 0, not_taken = 0, jals = 0, loads = 0, stores = 0;
    bit halted = 0;
    for (int r = 1; r < 32; r++) prog.push_back(ADDI(r, 0, rimm()));
    for (int a = 'h400; a < 'h800; a += 4) prog.push_back(SW(0, a, 0));
    for (int i = 0; i < N_RANDOM; i++) prog.push_back(rand_instr());
    for (int i = 0; i < 4; i++) prog.push_back(ADDI(0, 0, 0));  // landing pad for the last skips
    prog.push_back(BEQ(0, 0, 0));
    foreach (prog[i]) dut.u_imem.mem[i] = prog[i];
    st.pc = 0;
    foreach (st.x[i]) st.x[i] = 0;
    rst = 1;
    @(posedge clk); #1 rst = 0;
    while (!halted && cycles < 10000) begin
      ins = instr;
      chk(pc == st.pc, $sformatf("PC exp %h", st.pc));
      e = iss_step(st, ins);
      executed++;
      if (e.kind == "beq_taken") taken++;
      if (e.kind == "beq_not") not_taken++;
      if (e.kind == "jal") jals++;
      if (e.kind == "lw") loads++;
      if (e.kind == "sw") stores++;
      chk(mem_we == e.mem_we, "store strobe");
      if (e.mem_we) chk(mem_addr == e.mem_addr && mem_wdata == e.mem_val, "store address/data");
      @(posedge clk); #1;
      cycles++;
      if (e.rf_we && e.rd != 0)
        chk(dut.u_core.u_dp.u_rf.regs[e.rd] == e.rd_val,
            $sformatf("x%0d=%h exp %h", e.rd, dut.u_core.u_dp.u_rf.regs[e.rd], e.rd_val));
      if (ins == BEQ(0, 0, 0)) halted = 1;
    end
    chk(halted, "program reached its halt");
    chk(cycles == executed, "one instruction per cycle");
    for (int r = 1; r < 32; r++)
      chk(dut.u_core.u_dp.u_rf.regs[r] == st.x[r], $sformatf("final x%0d", r));
    for (int a = 'h400; a < 'h800; a += 4)
      chk({dut.u_dmem.g_lane[3].u_lane.mem[a >> 2], dut.u_dmem.g_lane[2].u_lane.mem[a >> 2],
           dut.u_dmem.g_lane[1].u_lane.mem[a >> 2], dut.u_dmem.g_lane[0].u_lane.mem[a >> 2]}
          == mem_rd(st, a), $sformatf("final Mem[%h]", a));
    chk(taken > 0 && not_taken > 0 && jals > 0 && loads > 0 && stores > 0, "all control-flow and memory kinds occurred");
    $display("  %0d cycles: %0d beq taken, %0d not taken, %0d jal, %0d lw, %0d sw",
             cycles, taken, not_taken, jals, loads, stores);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
