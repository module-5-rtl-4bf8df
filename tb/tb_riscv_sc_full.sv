// tb_riscv_sc_full: the complete system at its default size (1 GiB
// instruction memory and 1 GiB data memory) running the test program of
// rv_asm_pkg once, in lockstep with the reference model (see
// sc_lockstep.svh). Needs a few GiB of memory to simulate.
module tb_riscv_sc_full;
  import rv_asm_pkg::*;
  logic        clk = 0, rst;
  logic [31:0] pc, instr, mem_addr, mem_wdata;
  logic        mem_we;
  int checks = 0, failures = 0;

  riscv_sc_system dut (.*);

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
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
