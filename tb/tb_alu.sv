// tb_alu: self-checking test of the ALU.
// Applies directed corner cases and random operand pairs to every defined
// operation code, compares R and the zero flag with values computed here
// from the operation's definition (signed comparison via $signed), and
// checks that the unused codes give 0.
module tb_alu;
  import riscv_pkg::*;
  logic [31:0] a, b, r;
  logic [2:0]  op;
  logic        z;
  int checks = 0, failures = 0;

  alu dut (.a(a), .b(b), .op(op), .r(r), .z(z));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_alu(logic [2:0] o, logic [31:0] x, logic [31:0] y);
    case (o)
      3'b000: return x + y;
      3'b001: return x - y;
      3'b010: return x & y;
      3'b011: return x | y;
      3'b101: return ($signed(x) < $signed(y)) ? 32'd1 : 32'd0;
      default: return 32'd0;
    endcase
  endfunction

  task automatic check(logic [2:0] o, logic [31:0] x, logic [31:0] y);
    logic [31:0] exp;
    op = o; a = x; b = y;
    #1;
    exp = ref_alu(o, x, y);
    checks++;
    if (r !== exp || z !== (exp == 0)) begin
      failures++;
      $display("FAIL op=%b a=%h b=%h r=%h z=%b exp=%h", o, x, y, r, z, exp);
    end
  endtask

  localparam logic [31:0] CORNER [6] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h7FFF_FFFF,
                                         32'h8000_0000, 32'h8000_0001};

  initial begin
    for (int o = 0; o < 8; o++) begin
      foreach (CORNER[i]) foreach (CORNER[j]) check(3'(o), CORNER[i], CORNER[j]);
      for (int k = 0; k < 500; k++) check(3'(o), $urandom, $urandom);
    end
    // equal operands: subtraction gives zero flag (beq)
    check(3'b001, 32'h1234_5678, 32'h1234_5678);
    // signed compare against overflow-prone values
    check(3'b101, 32'h8000_0000, 32'h7FFF_FFFF);  // most negative < most positive
    check(3'b101, 32'h7FFF_FFFF, 32'h8000_0000);
    check(3'b101, 32'hFFFF_FFFD, 32'hFFFF_FFFE);  // -3 < -2
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
