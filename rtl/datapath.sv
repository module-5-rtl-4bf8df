// datapath: data path of the single-cycle reduced RV32I processor.
//
// Holds every programmer-visible register except memory (PC and the
// register file) and the functional units needed by the whole instruction
// subset, each used at most once per instruction:
//   pc_reg    PC, loaded every cycle with next_pc
//   adder     PC incrementer, pc4 = PC + 4
//   adder     branch adder, pc_target = PC + immediate (beq, jal)
//   mux2      next PC: pc4, or pc_target when pc_src = 1
//   reg_file  reads rs1 = instr[19:15] and rs2 = instr[24:20],
//             writes rd = instr[11:7] with the result when br_wr = 1
//   sign_ext  immediate of the format imm_src
//   mux2      ALU operand B: rs2 value, or the immediate when alu_src = 1
//   alu       operation alu_ctr on rs1 value and operand B; zero flag z
//   mux3      result: data memory read data (00), ALU result (01), PC+4 (10)
// The instruction comes in from the instruction memory (imem_rdata, read at
// address pc); the data memory is outside, addressed by the ALU result with
// the rs2 value as write data. All of one instruction's register transfers
// happen in one clock cycle: the combinational paths settle during the
// cycle and the PC, the register file and the data memory take their new
// values together at the rising edge. The control signals come from the
// controller; z goes back to it.
module datapath #(
  parameter logic [31:0] RESET_PC = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst,
  // control signals
  input  logic        pc_src,
  input  logic        br_wr,
  input  logic        alu_src,
  input  logic [2:0]  alu_ctr,
  input  logic [1:0]  res_src,
  input  logic [1:0]  imm_src,
  // status signal
  output logic        z,
  // instruction memory
  output logic [31:0] pc,
  input  logic [31:0] imem_rdata,
  // data memory
  output logic [31:0] dmem_addr,
  output logic [31:0] dmem_wdata,
  input  logic [31:0] dmem_rdata
);

  logic [31:0] next_pc, pc4, pc_target;
  logic [31:0] rs1_val, rs2_val, imm, alu_b, alu_r, result;

  // Next PC
  pc_reg #(.RESET_PC(RESET_PC)) u_pc (
    .clk (clk), .rst (rst), .d (next_pc), .q (pc)
  );

  adder #(.W(32)) u_pc_inc (
    .a (pc), .b (32'd4), .s (pc4)
  );

  adder #(.W(32)) u_branch_adder (
    .a (pc), .b (imm), .s (pc_target)
  );

  mux2 #(.W(32)) u_pc_mux (
    .d0 (pc4), .d1 (pc_target), .s (pc_src), .y (next_pc)
  );

  // Register file and immediate
  reg_file u_rf (
    .clk (clk),
    .we  (br_wr),
    .ra1 (imem_rdata[19:15]),
    .ra2 (imem_rdata[24:20]),
    .wa  (imem_rdata[11:7]),
    .wd  (result),
    .rd1 (rs1_val),
    .rd2 (rs2_val)
  );

  sign_ext u_sext (
    .x (imem_rdata), .op (imm_src), .z (imm)
  );

  // ALU
  mux2 #(.W(32)) u_alu_b_mux (
    .d0 (rs2_val), .d1 (imm), .s (alu_src), .y (alu_b)
  );

  alu u_alu (
    .a (rs1_val), .b (alu_b), .op (alu_ctr), .r (alu_r), .z (z)
  );

  // Result written back to rd
  mux3 #(.W(32)) u_res_mux (
    .d0 (dmem_rdata), .d1 (alu_r), .d2 (pc4), .s (res_src), .y (result)
  );

  assign dmem_addr  = alu_r;
  assign dmem_wdata = rs2_val;

endmodule
