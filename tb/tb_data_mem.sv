// tb_data_mem: self-checking test of the data memory at a small size
// (ADDR_W = 12, 1 KiB). Writes random words at random word addresses,
// checks read-back through the combinational read port, that we = 0 writes
// nothing, that a write appears only after the clock edge, and that the
// byte lanes hold the word little-endian (byte at address 4w+i in lane i).
module tb_data_mem;
  localparam int AW = 12;
  localparam int WORDS = 1 << (AW - 2);
  logic        clk = 0, we;
  logic [31:0] a, wd, rd;
  logic [31:0] shadow [WORDS];
  logic        filled = 0;
  int checks = 0, failures = 0;

  data_mem #(.ADDR_W(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(logic [31:0] addr, logic [31:0] v, logic en);
    @(negedge clk);
    we = en; a = addr; wd = v;
    #1;
    if (filled) begin
      checks++;   // not yet written before the edge
      if (rd !== shadow[addr[AW-1:2]]) begin failures++; $display("FAIL early write at %h", addr); end
    end
    @(posedge clk); #1 we = 0;
    if (en) shadow[addr[AW-1:2]] = v;
  endtask

  task automatic read_check(logic [31:0] addr);
    a = addr; #1;
    checks++;
    if (rd !== shadow[addr[AW-1:2]]) begin
      failures++; $display("FAIL read %h = %h exp %h", addr, rd, shadow[addr[AW-1:2]]);
    end
  endtask

  initial begin
    we = 0; a = 0; wd = 0;
    // fill every word so that reads are defined
    for (int i = 0; i < WORDS; i++) write(32'(i) << 2, $urandom, 1);
    filled = 1;
    for (int i = 0; i < WORDS; i++) read_check(32'(i) << 2);
    // little-endian placement in the byte lanes
    write(32'h0000_0010, 32'hA1B2_C3D4, 1);
    checks += 4;
    if (dut.g_lane[0].u_lane.mem[4] !== 8'hD4) begin failures++; $display("FAIL lane0"); end
    if (dut.g_lane[1].u_lane.mem[4] !== 8'hC3) begin failures++; $display("FAIL lane1"); end
    if (dut.g_lane[2].u_lane.mem[4] !== 8'hB2) begin failures++; $display("FAIL lane2"); end
    if (dut.g_lane[3].u_lane.mem[4] !== 8'hA1) begin failures++; $display("FAIL lane3"); end
    for (int k = 0; k < 3000; k++) begin
      write({$urandom} & 32'hFFFF_FFFC, $urandom, 1'($urandom));
      read_check($urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
