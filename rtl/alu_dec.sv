// alu_dec: ALU local decoder of the controller.
//
// Combinational. Turns the operation class from the main decoder (ALUop)
// and the instruction fields op[5], funct7[5] and funct3 into the 3-bit ALU
// operation code (ALUctr):
//
//   ALUop  op5 funct7_5 funct3   ALUctr
//   00      x     x      xxx     000 add   (lw/sw address)
//   01      x     x      xxx     001 sub   (beq comparison)
//   10      0     x      000     000 add   (addi)
//   10      1     0      000     000 add   (add)
//   10      1     1      000     001 sub   (sub)
//   10      x     x      010     101 slt   (slt/slti)
//   10      x     x      110     011 or    (or/ori)
//   10      x     x      111     010 and   (and/andi)
//
// op5 tells R-type (1) from I-type (0): an I-type instruction has no funct7,
// its bits 31:25 belong to the immediate, so funct7_5 may only select sub
// for R-type. The table is the design's; the rows it leaves out (ALUop 11,
// other funct3 values) give 000 here.
module alu_dec
  import riscv_pkg::*;
(
  input  logic [1:0] alu_op,
  input  logic       op5,
  input  logic       funct7_5,
  input  logic [2:0] funct3,
  output logic [2:0] alu_ctr
);

  always_comb begin
    alu_ctr = ALU_ADD;
    unique case (alu_op_e'(alu_op))
      ALUOP_ADD: alu_ctr = ALU_ADD;
      ALUOP_SUB: alu_ctr = ALU_SUB;
      ALUOP_OPERATE: begin
        unique case (funct3)
          F3_ADD:  alu_ctr = (op5 && funct7_5) ? ALU_SUB : ALU_ADD;
          F3_SLT:  alu_ctr = ALU_SLT;
          F3_OR:   alu_ctr = ALU_OR;
          F3_AND:  alu_ctr = ALU_AND;
          default: alu_ctr = ALU_ADD;
        endcase
      end
      default: alu_ctr = ALU_ADD;
    endcase
  end

endmodule
