// tb_sim_example: the four-instruction example loop on the complete system
// (processor + instruction ROM + data memory, 64 KiB memories):
//     0x1000  lw  x6, -4(x9)      0xFFC4A303
//     0x1004  sw  x6, 8(x9)       0x0064A423
//     0x1008  or  x4, x5, x6      0x0062E233
//     0x100C  beq x4, x4, -12     0xFE420AE3
// starting from x5 = 6, x9 = 0x2004, Mem[0x2000] = 10, PC = 0x1000.
// The registers are set by six instructions placed before 0x1000 (reset
// PC 0x0FE8); Mem[0x2000] is written into the data memory's byte lanes.
// Checks, worked out by hand: cycle 1 loads 10 from 0x2000 into x6;
// cycle 2 stores 10 at 0x200C; cycle 3 writes 6 | 10 = 14 into x4;
// cycle 4 takes the branch back to 0x1000. The loop runs five times and
// each pass must take 4 clock cycles.
module tb_sim_example;
  import rv_asm_pkg::*;
  logic        clk = 0, rst;
  logic [31:0] pc, instr, mem_addr, mem_wdata;
  logic        mem_we;
  int checks = 0, failures = 0;

  riscv_sc_system #(.MEM_ADDR_W(16), .RESET_PC(32'h0000_0FE8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL pc=%h %s", pc, what); end
  endtask

  function automatic logic [31:0] dmem_word(logic [31:0] a);
    return {dut.u_dmem.g_lane[3].u_lane.mem[a[15:2]], dut.u_dmem.g_lane[2].u_lane.mem[a[15:2]],
            dut.u_dmem.g_lane[1].u_lane.mem[a[15:2]], dut.u_dmem.g_lane[0].u_lane.mem[a[15:2]]};
  endfunction

  initial begin
    longint t0;
    logic [31:0] setup [6];
    setup = '{ADDI(5, 0, 6), ADDI(9, 0, 1025), ADD(9, 9, 9), ADD(9, 9, 9), ADD(9, 9, 9), ADDI(9, 9, -4)};
    foreach (setup[i]) dut.u_imem.mem[('h0FE8 >> 2) + i] = setup[i];
    dut.u_imem.mem['h1000 >> 2] = 32'hFFC4A303;
    dut.u_imem.mem['h1004 >> 2] = 32'h0064A423;
    dut.u_imem.mem['h1008 >> 2] = 32'h0062E233;
    dut.u_imem.mem['h100C >> 2] = 32'hFE420AE3;
    // Mem[0x2000] = 10, little-endian over the four byte lanes
    dut.u_dmem.g_lane[0].u_lane.mem['h2000 >> 2] = 8'd10;
    dut.u_dmem.g_lane[1].u_lane.mem['h2000 >> 2] = 8'd0;
    dut.u_dmem.g_lane[2].u_lane.mem['h2000 >> 2] = 8'd0;
    dut.u_dmem.g_lane[3].u_lane.mem['h2000 >> 2] = 8'd0;
    rst = 1;
    @(posedge clk); #1 rst = 0;
    repeat (6) @(posedge clk);
    #1;
    chk(dut.u_core.u_dp.u_rf.regs[5] == 32'd6 && dut.u_core.u_dp.u_rf.regs[9] == 32'h2004,
        "initial state x5 = 6, x9 = 0x2004");
    for (int pass = 0; pass < 5; pass++) begin
      t0 = $time;
      chk(pc == 32'h1000 && instr == 32'hFFC4A303, "cycle 1: lw fetched");
      chk(mem_addr == 32'h2000 && !mem_we, "cycle 1: effective address 0x2000");
      @(posedge clk); #1;
      chk(dut.u_core.u_dp.u_rf.regs[6] == 32'd10, "cycle 1: x6 = 10");
      chk(pc == 32'h1004 && instr == 32'h0064A423, "cycle 2: sw fetched");
      chk(mem_we && mem_addr == 32'h200C && mem_wdata == 32'd10, "cycle 2: store 10 at 0x200C");
      @(posedge clk); #1;
      chk(dmem_word(32'h200C) == 32'd10, "cycle 2: Mem[0x200C] = 10");
      chk(pc == 32'h1008 && instr == 32'h0062E233, "cycle 3: or fetched");
      @(posedge clk); #1;
      chk(dut.u_core.u_dp.u_rf.regs[4] == 32'd14, "cycle 3: x4 = 14");
      chk(pc == 32'h100C && instr == 32'hFE420AE3, "cycle 4: beq fetched");
      chk(!mem_we, "cycle 4: no store");
      @(posedge clk); #1;
      chk(pc == 32'h1000, "cycle 4: branch taken to 0x1000");
      chk(($time - t0) == 4 * 10, "4 instructions in 4 clock cycles");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
