// tb_riscv_core: the processor (controller + data path) running the
// four-instruction example loop
//     0x1000  lw  x6, -4(x9)      0xFFC4A303
//     0x1004  sw  x6, 8(x9)       0x0064A423
//     0x1008  or  x4, x5, x6      0x0062E233
//     0x100C  beq x4, x4, -12     0xFE420AE3
// with x5 = 6, x9 = 0x2004 and Mem[0x2000] = 10. The instruction and data
// memories are behavioural models in this testbench. Six set-up
// instructions before 0x1000 build x5 and x9 (reset PC 0x0FE8). Expected
// values are worked out by hand: lw reads 0x2000 and loads 10 into x6, sw
// writes 10 to 0x200C, or gives 14, beq is taken back to 0x1000. The loop
// is run three times; each pass must take exactly 4 clock cycles (one
// instruction per cycle). The testbench's encoders are also checked
// against the four instruction words.
module tb_riscv_core;
  import rv_asm_pkg::*;
  logic        clk = 0, rst;
  logic [31:0] imem_addr, imem_rdata, dmem_addr, dmem_wdata, dmem_rdata;
  logic        dmem_we;
  logic [31:0] imem [int unsigned];
  logic [31:0] dmem [4096];  // 16 KiB, indexed by address bits 13:2
  int checks = 0, failures = 0;

  riscv_core #(.RESET_PC(32'h0000_0FE8)) dut (.*);

  always #5 clk = ~clk;

  // behavioural memories: combinational reads, data write at the clock edge
  always_comb imem_rdata = imem.exists(imem_addr >> 2) ? imem[imem_addr >> 2] : 32'h0000_0013;
  always_comb dmem_rdata = dmem[dmem_addr[13:2]];
  always_ff @(posedge clk) if (dmem_we) dmem[dmem_addr[13:2]] <= dmem_wdata;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL pc=%h %s", imem_addr, what); end
  endtask

  task automatic load(logic [31:0] a, logic [31:0] w);
    imem[a >> 2] = w;
  endtask

  initial begin
    longint t0;
    chk(LW(6, -4, 9) == 32'hFFC4A303, "encoding lw");
    chk(SW(6, 8, 9) == 32'h0064A423, "encoding sw");
    chk(OR_(4, 5, 6) == 32'h0062E233, "encoding or");
    chk(BEQ(4, 4, -12) == 32'hFE420AE3, "encoding beq");
    load(32'h0FE8, ADDI(5, 0, 6));
    load(32'h0FEC, ADDI(9, 0, 1025));  // 0x401
    load(32'h0FF0, ADD(9, 9, 9));      // 0x802
    load(32'h0FF4, ADD(9, 9, 9));      // 0x1004
    load(32'h0FF8, ADD(9, 9, 9));      // 0x2008
    load(32'h0FFC, ADDI(9, 9, -4));    // 0x2004
    load(32'h1000, 32'hFFC4A303);
    load(32'h1004, 32'h0064A423);
    load(32'h1008, 32'h0062E233);
    load(32'h100C, 32'hFE420AE3);
    dmem['h2000 >> 2] = 32'd10;
    rst = 1;
    @(posedge clk); #1 rst = 0;
    chk(imem_addr == 32'h0FE8, "reset PC");
    repeat (6) @(posedge clk);
    #1;
    for (int pass = 0; pass < 3; pass++) begin
      t0 = $time;
      // 1st cycle: lw x6, -4(x9)
      chk(imem_addr == 32'h1000, "lw PC");
      chk(dmem_addr == 32'h2000 && !dmem_we, "lw effective address");
      chk(dmem_rdata == 32'd10, "lw data");
      @(posedge clk); #1;
      chk(dut.u_dp.u_rf.regs[6] == 32'd10, "x6 after lw");
      // 2nd cycle: sw x6, 8(x9)
      chk(imem_addr == 32'h1004, "sw PC");
      chk(dmem_we && dmem_addr == 32'h200C && dmem_wdata == 32'd10, "sw address/data");
      @(posedge clk); #1;
      chk(dmem['h200C >> 2] == 32'd10, "Mem[0x200C] after sw");
      // 3rd cycle: or x4, x5, x6
      chk(imem_addr == 32'h1008, "or PC");
      chk(dmem_addr == 32'd14 && !dmem_we, "or result on the ALU output");
      @(posedge clk); #1;
      chk(dut.u_dp.u_rf.regs[4] == 32'd14, "x4 after or");
      // 4th cycle: beq x4, x4, -12
      chk(imem_addr == 32'h100C, "beq PC");
      chk(dut.z == 1'b1, "beq zero flag");
      @(posedge clk); #1;
      chk(imem_addr == 32'h1000, "beq taken to 0x1000");
      chk(($time - t0) == 4 * 10, $sformatf("4 instructions in 4 cycles (%0d)", $time - t0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
