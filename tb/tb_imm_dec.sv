// tb_imm_dec: self-checking test of the Sign Extension local decoder for
// the five opcodes that use an immediate (R-type uses none).
module tb_imm_dec;
  logic [6:0] op;
  logic [1:0] imm_src;
  int checks = 0, failures = 0;

  imm_dec dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic row(logic [6:0] o, logic [1:0] exp);
    op = o; #1;
    checks++;
    if (imm_src !== exp) begin failures++; $display("FAIL op=%b ImmSrc=%b exp=%b", o, imm_src, exp); end
  endtask

  initial begin
    row(7'b0000011, 2'b00);  // lw: I
    row(7'b0100011, 2'b01);  // sw: S
    row(7'b0010011, 2'b00);  // I-type: I
    row(7'b1100011, 2'b10);  // beq: B
    row(7'b1101111, 2'b11);  // jal: J
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
