// riscv_core: single-cycle processor for a subset of RV32I.
//
// Executes lw, sw, add, sub, and, or, slt, addi, andi, ori, slti, beq and
// jal, one instruction per clock cycle (CPI = 1). It is the controller and
// the data path wired together: the instruction fields op (bits 6:0),
// funct3 (14:12) and funct7[5] (bit 30) go to the controller, which is
// combinational and returns the control signals of the same cycle; the ALU
// zero flag goes back to it for beq.
//
// Interface: the instruction memory is read combinationally at imem_addr
// (= PC); the data memory is read combinationally at dmem_addr and written
// at the rising edge of clk when dmem_we = 1. rst is synchronous and active
// high and loads RESET_PC into the PC (the reset value is this design's
// choice). An assertion checks that the PC stays word-aligned, as the
// instruction memory only holds aligned 32-bit words.
module riscv_core #(
  parameter logic [31:0] RESET_PC = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst,
  output logic [31:0] imem_addr,
  input  logic [31:0] imem_rdata,
  output logic        dmem_we,
  output logic [31:0] dmem_addr,
  output logic [31:0] dmem_wdata,
  input  logic [31:0] dmem_rdata
);

  logic       z, pc_src, br_wr, alu_src, mem_wr;
  logic [2:0] alu_ctr;
  logic [1:0] res_src, imm_src;

  controller u_ctrl (
    .op       (imem_rdata[6:0]),
    .funct3   (imem_rdata[14:12]),
    .funct7_5 (imem_rdata[30]),
    .z        (z),
    .pc_src   (pc_src),
    .br_wr    (br_wr),
    .alu_src  (alu_src),
    .alu_ctr  (alu_ctr),
    .mem_wr   (mem_wr),
    .res_src  (res_src),
    .imm_src  (imm_src)
  );

  datapath #(.RESET_PC(RESET_PC)) u_dp (
    .clk        (clk),
    .rst        (rst),
    .pc_src     (pc_src),
    .br_wr      (br_wr),
    .alu_src    (alu_src),
    .alu_ctr    (alu_ctr),
    .res_src    (res_src),
    .imm_src    (imm_src),
    .z          (z),
    .pc         (imem_addr),
    .imem_rdata (imem_rdata),
    .dmem_addr  (dmem_addr),
    .dmem_wdata (dmem_wdata),
    .dmem_rdata (dmem_rdata)
  );

  assign dmem_we = mem_wr;

  a_pc_aligned : assert property (@(posedge clk) disable iff (rst) imem_addr[1:0] == 2'b00)
    else $error("PC 0x%08h is not word-aligned", imem_addr);

endmodule
