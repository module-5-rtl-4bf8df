// main_dec: main decoder of the controller.
//
// Combinational. From the opcode it derives the signals that rule the
// general behaviour of the processor:
//
//   op        Branch Jump BRwr ALUsrc ALUop MemWr ResSrc
//   lw          0     0    1     1     00    0     00 (memory)
//   sw          0     0    0     1     00    1     --
//   I-type      0     0    1     1     10    0     01 (ALU)
//   R-type      0     0    1     0     10    0     01 (ALU)
//   beq         1     0    0     0     01    0     --
//   jal         0     1    1     --    --    0     10 (PC+4)
//
// The table is the design's. Where it leaves a value open ("--") this
// design drives 0 / 00. An opcode outside the table gets all-zero outputs,
// so it writes neither the register file nor the memory and the PC just
// advances (this design's choice; such opcodes are not part of the ISA
// subset).
module main_dec
  import riscv_pkg::*;
(
  input  logic [6:0] op,
  output main_ctrl_t ctrl
);

  always_comb begin
    ctrl = '0;
    unique case (op)
      OP_LW: begin
        ctrl.br_wr   = 1'b1;
        ctrl.alu_src = 1'b1;
        ctrl.alu_op  = ALUOP_ADD;
        ctrl.res_src = RES_MEM;
      end
      OP_SW: begin
        ctrl.alu_src = 1'b1;
        ctrl.alu_op  = ALUOP_ADD;
        ctrl.mem_wr  = 1'b1;
      end
      OP_ITYPE: begin
        ctrl.br_wr   = 1'b1;
        ctrl.alu_src = 1'b1;
        ctrl.alu_op  = ALUOP_OPERATE;
        ctrl.res_src = RES_ALU;
      end
      OP_RTYPE: begin
        ctrl.br_wr   = 1'b1;
        ctrl.alu_src = 1'b0;
        ctrl.alu_op  = ALUOP_OPERATE;
        ctrl.res_src = RES_ALU;
      end
      OP_BEQ: begin
        ctrl.branch  = 1'b1;
        ctrl.alu_op  = ALUOP_SUB;
      end
      OP_JAL: begin
        ctrl.jump    = 1'b1;
        ctrl.br_wr   = 1'b1;
        ctrl.res_src = RES_PC4;
      end
      default: ctrl = '0;
    endcase
  end

endmodule
