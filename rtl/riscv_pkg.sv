// riscv_pkg: shared encodings of the single-cycle reduced RV32I processor.
//
// Holds the opcodes of the six instruction classes the processor executes
// (lw, sw, I-type arithmetic, R-type arithmetic, beq, jal), the 3-bit ALU
// operation code (ALUctr), the 2-bit ALU operation class produced by the main
// decoder (ALUop), the 2-bit immediate-format selector (ImmSrc), the 2-bit
// select of the value written back to rd (ResSrc), and the bundle of control
// signals the main decoder drives.
//
// The opcode, funct3 and funct7 values are those of the standard RV32I
// encoding. The ALUctr, ALUop, ImmSrc and ResSrc codes are the ones of the
// design's own decoder tables. The names of the enum members are this
// design's choice.
package riscv_pkg;

  // Instruction opcodes, bits 6:0 of the instruction
  localparam logic [6:0] OP_LW    = 7'b0000011;
  localparam logic [6:0] OP_SW    = 7'b0100011;
  localparam logic [6:0] OP_ITYPE = 7'b0010011;  // addi, slti, ori, andi
  localparam logic [6:0] OP_RTYPE = 7'b0110011;  // add, sub, slt, or, and
  localparam logic [6:0] OP_BEQ   = 7'b1100011;
  localparam logic [6:0] OP_JAL   = 7'b1101111;

  // funct3 values of the arithmetic-logic instructions
  localparam logic [2:0] F3_ADD = 3'b000;  // add, sub, addi
  localparam logic [2:0] F3_SLT = 3'b010;  // slt, slti
  localparam logic [2:0] F3_OR  = 3'b110;  // or, ori
  localparam logic [2:0] F3_AND = 3'b111;  // and, andi

  // ALU operation (ALUctr). Codes 100, 110 and 111 are unused.
  typedef enum logic [2:0] {
    ALU_ADD = 3'b000,  // A + B
    ALU_SUB = 3'b001,  // A - B
    ALU_AND = 3'b010,  // A & B
    ALU_OR  = 3'b011,  // A | B
    ALU_SLT = 3'b101   // signed A < B ? 1 : 0
  } alu_ctr_e;

  // Operation class from the main decoder to the ALU decoder (ALUop)
  typedef enum logic [1:0] {
    ALUOP_ADD     = 2'b00,  // effective address of lw/sw
    ALUOP_SUB     = 2'b01,  // comparison of beq
    ALUOP_OPERATE = 2'b10   // taken from funct3/funct7 (I-type, R-type)
  } alu_op_e;

  // Immediate format built by the sign extension module (ImmSrc)
  typedef enum logic [1:0] {
    IMM_I = 2'b00,
    IMM_S = 2'b01,
    IMM_B = 2'b10,
    IMM_J = 2'b11
  } imm_src_e;

  // Value written into rd (ResSrc)
  typedef enum logic [1:0] {
    RES_MEM = 2'b00,  // data read from the data memory (lw)
    RES_ALU = 2'b01,  // ALU result (I-type, R-type)
    RES_PC4 = 2'b10   // return address PC+4 (jal)
  } res_src_e;

  // Outputs of the main decoder
  typedef struct packed {
    logic     branch;   // beq instruction
    logic     jump;     // jal instruction
    logic     br_wr;    // register file write enable
    logic     alu_src;  // 1: ALU operand B is the immediate, 0: rs2
    alu_op_e  alu_op;
    logic     mem_wr;   // data memory write enable
    res_src_e res_src;
  } main_ctrl_t;

endpackage
