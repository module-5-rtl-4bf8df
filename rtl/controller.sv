// controller: control unit of the single-cycle processor.
//
// Purely combinational: every control signal is a function of the
// instruction being executed and of the ALU zero flag of the same cycle. It
// is split into four subcircuits:
//   main_dec  opcode -> Branch, Jump, BRwr, ALUsrc, ALUop, MemWr, ResSrc
//   alu_dec   ALUop, op[5], funct7[5], funct3 -> ALUctr
//   imm_dec   opcode -> ImmSrc
//   next-PC logic: PCsrc = (Branch & z) | Jump, which loads the branch
//                  address into the PC for a taken beq and for jal.
// The first three and their tables are the design's; the name PCsrc and
// the form of the next-PC logic are this design's reading of the Branch and
// Jump signals and the zero flag.
module controller
  import riscv_pkg::*;
(
  input  logic [6:0] op,
  input  logic [2:0] funct3,
  input  logic       funct7_5,
  input  logic       z,
  output logic       pc_src,
  output logic       br_wr,
  output logic       alu_src,
  output logic [2:0] alu_ctr,
  output logic       mem_wr,
  output logic [1:0] res_src,
  output logic [1:0] imm_src
);

  main_ctrl_t ctrl;

  main_dec u_main_dec (
    .op   (op),
    .ctrl (ctrl)
  );

  alu_dec u_alu_dec (
    .alu_op   (ctrl.alu_op),
    .op5      (op[5]),
    .funct7_5 (funct7_5),
    .funct3   (funct3),
    .alu_ctr  (alu_ctr)
  );

  imm_dec u_imm_dec (
    .op      (op),
    .imm_src (imm_src)
  );

  assign pc_src  = (ctrl.branch & z) | ctrl.jump;
  assign br_wr   = ctrl.br_wr;
  assign alu_src = ctrl.alu_src;
  assign mem_wr  = ctrl.mem_wr;
  assign res_src = ctrl.res_src;

endmodule
