// tb_pc_reg: self-checking test of the Program Counter register.
// Checks that reset loads RESET_PC (overridden here to 0x1000) and that
// the register loads d at every rising edge, with no enable.
module tb_pc_reg;
  logic        clk = 0, rst;
  logic [31:0] d, q;
  int checks = 0, failures = 0;

  pc_reg #(.RESET_PC(32'h0000_1000)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] v;
    rst = 1; d = 32'hFFFF_FFFF;
    @(posedge clk); #1;
    checks++; if (q !== 32'h1000) begin failures++; $display("FAIL reset q=%h", q); end
    rst = 0;
    for (int k = 0; k < 1000; k++) begin
      v = $urandom; d = v;
      @(posedge clk); #1;
      checks++; if (q !== v) begin failures++; $display("FAIL q=%h exp %h", q, v); end
    end
    rst = 1; @(posedge clk); #1;
    checks++; if (q !== 32'h1000) begin failures++; $display("FAIL second reset q=%h", q); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
