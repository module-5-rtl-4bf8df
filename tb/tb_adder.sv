// tb_adder: self-checking test of the 32-bit adder: PC + 4 and PC + offset
// cases, wrap-around at 2^32 and random operands.
module tb_adder;
  logic [31:0] a, b, s;
  int checks = 0, failures = 0;

  adder #(.W(32)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [31:0] x, logic [31:0] y);
    logic [32:0] full;
    a = x; b = y; #1;
    full = {1'b0, x} + {1'b0, y};
    checks++;
    if (s !== full[31:0]) begin failures++; $display("FAIL %h + %h = %h", x, y, s); end
  endtask

  initial begin
    check(32'h0000_1000, 32'd4);
    check(32'h0000_100C, 32'hFFFF_FFF4);   // 0x100C - 12
    check(32'hFFFF_FFFC, 32'd4);           // wraps to 0
    for (int k = 0; k < 2000; k++) check($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
