// imm_dec: Sign Extension local decoder of the controller.
//
// Combinational. Chooses the immediate format (ImmSrc) from the opcode:
//   lw 0000011 -> 00 (I)   sw 0100011 -> 01 (S)   I-type 0010011 -> 00 (I)
//   beq 1100011 -> 10 (B)  jal 1101111 -> 11 (J)   R-type: no immediate
// Only three opcode bits are needed to tell these apart: ImmSrc[1] = op[6]
// and ImmSrc[0] = op[2] | (op[5] & ~op[6]). These equations are derived from
// the design's truth table, using the opcode bits its decoder takes (op2,
// op5, op6). R-type gets 01 from them, which is harmless because R-type does
// not use the immediate.
module imm_dec (
  input  logic [6:0] op,
  output logic [1:0] imm_src
);

  assign imm_src[1] = op[6];
  assign imm_src[0] = op[2] | (op[5] & ~op[6]);

endmodule
