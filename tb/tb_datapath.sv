// tb_datapath: self-checking test of the data path alone.
// The testbench plays the controller and both memories: it fetches the
// test program from its own array at the PC the data path presents, drives
// the control signals of each instruction from the written-out control
// tables (PCsrc of a beq from the expected comparison result), serves
// loads and records stores. A reference model executes the same
// instructions; every cycle the PC, the ALU result (data memory address),
// the store data, the zero flag of beq and, at the end, the registers the program writes are
// compared with it. Reset is checked to load RESET_PC.
module tb_datapath;
  import rv_asm_pkg::*;
  logic        clk = 0, rst;
  logic        pc_src, br_wr, alu_src, z;
  logic [2:0]  alu_ctr;
  logic [1:0]  res_src, imm_src;
  logic [31:0] pc, imem_rdata, dmem_addr, dmem_wdata, dmem_rdata;
  logic [31:0] prog [$];
  arch_t       st;
  effect_t     e;
  ctl_t        c;
  int checks = 0, failures = 0;

  datapath #(.RESET_PC(32'h0)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL pc=%h %s", pc, what); end
  endtask

  initial begin
    arch_t pre;
    logic [31:0] exp_alu;
    test_program(prog);
    st.pc = 0;
    foreach (st.x[i]) st.x[i] = 0;
    {pc_src, br_wr, alu_src, alu_ctr, res_src, imm_src} = '0;
    imem_rdata = 0; dmem_rdata = 0;
    rst = 1;
    @(posedge clk); #1 rst = 0;
    chk(pc == 32'h0, "reset value");
    for (int cyc = 0; cyc < 200; cyc++) begin
      chk(pc == st.pc, $sformatf("PC exp %h", st.pc));
      imem_rdata = prog[pc >> 2];
      pre = st;
      e = iss_step(st, imem_rdata);
      c = ref_ctl(imem_rdata, e.kind == "beq_taken");
      {pc_src, br_wr, alu_src, alu_ctr, res_src, imm_src} =
        {c.pc_src, c.br_wr, c.alu_src, c.alu_ctr, c.res_src, c.imm_src};
      dmem_rdata = mem_rd(pre, dmem_addr);
      #1;
      dmem_rdata = mem_rd(pre, dmem_addr);
      #1;
      if (e.kind == "lw")
        chk(dmem_addr == e.mem_addr, $sformatf("load address %h exp %h", dmem_addr, e.mem_addr));
      if (e.kind == "sw") begin
        chk(dmem_addr == e.mem_addr, $sformatf("store address %h exp %h", dmem_addr, e.mem_addr));
        chk(dmem_wdata == e.mem_val, $sformatf("store data %h exp %h", dmem_wdata, e.mem_val));
      end
      if (e.kind == "alu_r" || e.kind == "alu_i")
        chk(dmem_addr == e.rd_val, $sformatf("ALU result %h exp %h", dmem_addr, e.rd_val));
      if (e.kind == "beq_taken" || e.kind == "beq_not")
        chk(z == (e.kind == "beq_taken"), "zero flag of beq");
      @(posedge clk); #1;
      if (imem_rdata == BEQ(0, 0, 0)) break;
    end
    chk(pc == PROG_HALT_PC, "reached the halt");
    for (int r = 1; r <= 17; r++) begin  // the registers the program writes
      chk(dut.u_rf.regs[r] == st.x[r], $sformatf("x%0d=%h exp %h", r, dut.u_rf.regs[r], st.x[r]));
      chk(st.x[r] == test_program_result(r), $sformatf("model x%0d", r));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
