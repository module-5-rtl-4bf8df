// sign_ext: immediate generator ("Sign Extension module").
//
// Combinational. Builds the 32-bit immediate operand z from the instruction x
// according to the format selected by op (ImmSrc):
//   00 I-type  z = sExt(x[31:20])                          (lw, addi-like)
//   01 S-type  z = sExt({x[31:25], x[11:7]})               (sw)
//   10 B-type  z = sExt({x[31], x[7], x[30:25], x[11:8], 0})   (beq)
//   11 J-type  z = sExt({x[31], x[19:12], x[20], x[30:21], 0}) (jal)
// Besides extending the sign bit x[31], it reorders the scattered immediate
// fields and fills bit 0 with 0 for the two branch formats.
//
// It is built field by field, as the design does, since each output field
// has only a few possible sources:
//   z[31:20]  always x[31]
//   z[19:12]  x[19:12] for J, else x[31]
//   z[11]     x[31] for I and S, x[7] for B, x[20] for J
//   z[10:5]   always x[30:25]
//   z[4:1]    x[24:21] for I and J, x[11:8] for S and B (select op1 ^ op0)
//   z[0]      x[20] for I, x[7] for S, 0 for B and J
// The field boundaries and sources are the design's; the select equations
// are derived from its per-format table.
module sign_ext
  import riscv_pkg::*;
(
  input  logic [31:0] x,
  input  logic [1:0]  op,
  output logic [31:0] z
);

  logic j_fmt;

  assign j_fmt = (imm_src_e'(op) == IMM_J);

  assign z[31:20] = {12{x[31]}};
  assign z[19:12] = j_fmt ? x[19:12] : {8{x[31]}};

  always_comb begin
    unique case (imm_src_e'(op))
      IMM_I, IMM_S: z[11] = x[31];
      IMM_B:        z[11] = x[7];
      default:      z[11] = x[20];  // IMM_J
    endcase
  end

  assign z[10:5] = x[30:25];
  assign z[4:1]  = (op[1] ^ op[0]) ? x[11:8] : x[24:21];
  assign z[0]    = op[1] ? 1'b0 : (op[0] ? x[7] : x[20]);

endmodule
