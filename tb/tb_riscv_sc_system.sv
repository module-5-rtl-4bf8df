// tb_riscv_sc_system: end-to-end test of the complete system with 64 KiB
// memories (MEM_ADDR_W = 16). Runs the test program of rv_asm_pkg in
// lockstep with the reference model (see sc_lockstep.svh), then runs a
// second time after a reset to check that reset restarts execution at
// RESET_PC with the data memory contents kept.
module tb_riscv_sc_system;
  import rv_asm_pkg::*;
  logic        clk = 0, rst;
  logic [31:0] pc, instr, mem_addr, mem_wdata;
  logic        mem_we;
  int checks = 0, failures = 0;

  riscv_sc_system #(.MEM_ADDR_W(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

`include "sc_lockstep.svh"

  initial begin
    run_test_program();
    run_test_program();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
