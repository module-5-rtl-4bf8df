// adder: W-bit binary adder, carry out dropped.
//
// Combinational. The data path uses two of them: the PC incrementer (PC + 4,
// as every instruction is 4 bytes long and memory is byte-addressed) and the
// branch-address adder (PC + immediate) of beq and jal. Both exist because
// in a single-cycle processor they work in the same cycle as the ALU.
module adder #(
  parameter int W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s
);

  assign s = a + b;

endmodule
