// alu: 32-bit arithmetic-logic unit of the single-cycle processor.
//
// Combinational. R is selected by the 3-bit operation code op (ALUctr):
//   000 A + B     001 A - B     010 A & B     011 A | B
//   101 1 if A < B as signed 32-bit numbers, else 0
// The remaining codes (100, 110, 111) are unused by the decoder; this design
// returns 0 for them. The zero flag z is 1 when R is 0; beq uses it after a
// subtraction to test rs1 = rs2.
//
// Structure: op[1] chooses between the arithmetic half (adder/subtractor and
// set-less-than) and the logic half; op[0] chooses subtract or OR; op[2]
// chooses set-less-than. Addition and subtraction share one adder, with B
// inverted and a carry-in of 1 for subtraction. The signed comparison takes
// the sign of A - B, corrected when the operands' signs differ (so it cannot
// be fooled by overflow). The operation codes follow the design's ALU table;
// the sharing of the adder is this design's choice.
module alu
  import riscv_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic [2:0]  op,
  output logic [31:0] r,
  output logic        z
);

  logic        sub;
  logic [31:0] sum;
  logic        lt;

  assign sub = op[0] | op[2];  // subtract for A - B and for A < B
  assign sum = a + (sub ? ~b : b) + {31'd0, sub};
  assign lt  = (a[31] != b[31]) ? a[31] : sum[31];

  always_comb begin
    unique case (alu_ctr_e'(op))
      ALU_ADD, ALU_SUB: r = sum;
      ALU_AND:          r = a & b;
      ALU_OR:           r = a | b;
      ALU_SLT:          r = {31'd0, lt};
      default:          r = '0;
    endcase
  end

  assign z = (r == 32'd0);

endmodule
