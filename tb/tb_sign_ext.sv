// tb_sign_ext: self-checking test of the immediate generator.
// Encodes random immediates into I, S, B and J instructions with the
// testbench encoders (value -> fields) and checks that the module recovers
// the value (fields -> value). Also checks the instruction words of the
// design's simulation example (lw -4, sw 8, beq -12).
module tb_sign_ext;
  import rv_asm_pkg::*;
  logic [31:0] x, z;
  logic [1:0]  op;
  int checks = 0, failures = 0;

  sign_ext dut (.x(x), .op(op), .z(z));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [31:0] ins, logic [1:0] o, int exp);
    x = ins; op = o;
    #1;
    checks++;
    if (z !== 32'(exp)) begin
      failures++;
      $display("FAIL ins=%h op=%b z=%h exp=%h", ins, o, z, 32'(exp));
    end
  endtask

  initial begin
    int v;
    check(32'hFFC4A303, 2'b00, -4);   // lw x6, -4(x9)
    check(32'h0064A423, 2'b01, 8);    // sw x6, 8(x9)
    check(32'hFE420AE3, 2'b10, -12);  // beq x4, x4, -12
    for (int k = 0; k < 2000; k++) begin
      // I-type: 12-bit signed
      v = int'($urandom_range(0, 4095)) - 2048;
      check(ADDI($urandom_range(0,31), $urandom_range(0,31), v) | (32'($urandom) & 32'h0000_7000), 2'b00, v);
      v = int'($urandom_range(0, 4095)) - 2048;
      check(SW($urandom_range(0,31), v, $urandom_range(0,31)), 2'b01, v);
      v = (int'($urandom_range(0, 4095)) - 2048) * 2;
      check(BEQ($urandom_range(0,31), $urandom_range(0,31), v), 2'b10, v);
      v = (int'($urandom_range(0, 1048575)) - 524288) * 2;
      check(JAL($urandom_range(0,31), v), 2'b11, v);
    end
    check(JAL(1, -1048576), 2'b11, -1048576);
    check(JAL(1, 1048574), 2'b11, 1048574);
    check(BEQ(1, 2, -4096), 2'b10, -4096);
    check(BEQ(1, 2, 4094), 2'b10, 4094);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
