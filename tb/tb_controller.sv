// tb_controller: self-checking test of the complete controller. For each of
// the 13 instructions, encoded with the testbench assembler, and both values
// of the zero flag, checks every control output: PCsrc (taken beq and jal),
// BRwr, ALUsrc, ALUctr, MemWr, ResSrc and ImmSrc, skipping don't-cares.
module tb_controller;
  import rv_asm_pkg::*;
  logic [31:0] ins;
  logic        z, pc_src, br_wr, alu_src, mem_wr;
  logic [2:0]  alu_ctr;
  logic [1:0]  res_src, imm_src;
  int checks = 0, failures = 0;

  controller dut (
    .op(ins[6:0]), .funct3(ins[14:12]), .funct7_5(ins[30]), .z(z),
    .pc_src(pc_src), .br_wr(br_wr), .alu_src(alu_src), .alu_ctr(alu_ctr),
    .mem_wr(mem_wr), .res_src(res_src), .imm_src(imm_src)
  );

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected values; -1 = don't care
  task automatic check(string name, logic [31:0] i, int e_pcsrc_z0, int e_pcsrc_z1, int e_we,
                       int e_src, int e_ctr, int e_mw, int e_res, int e_imm);
    ins = i;
    for (int zz = 0; zz < 2; zz++) begin
      int e_pc = (zz != 0) ? e_pcsrc_z1 : e_pcsrc_z0;
      z = 1'(zz); #1;
      checks++;
      if (pc_src !== 1'(e_pc) || br_wr !== 1'(e_we) || mem_wr !== 1'(e_mw) ||
          (e_src >= 0 && alu_src !== 1'(e_src)) || (e_ctr >= 0 && alu_ctr !== 3'(e_ctr)) ||
          (e_res >= 0 && res_src !== 2'(e_res)) || (e_imm >= 0 && imm_src !== 2'(e_imm))) begin
        failures++;
        $display("FAIL %s z=%0d: pcsrc=%b we=%b src=%b ctr=%b mw=%b res=%b imm=%b", name, zz,
                 pc_src, br_wr, alu_src, alu_ctr, mem_wr, res_src, imm_src);
      end
    end
  endtask

  initial begin
    //    name    instruction          pc z0 z1 we src ctr mw res imm
    check("lw",   LW(6, -4, 9),         0, 0, 1, 1, 0, 0, 0, 0);
    check("sw",   SW(6, 8, 9),          0, 0, 0, 1, 0, 1, -1, 1);
    check("add",  ADD(1, 2, 3),         0, 0, 1, 0, 0, 0, 1, -1);
    check("sub",  SUB(1, 2, 3),         0, 0, 1, 0, 1, 0, 1, -1);
    check("and",  AND_(1, 2, 3),        0, 0, 1, 0, 2, 0, 1, -1);
    check("or",   OR_(4, 5, 6),         0, 0, 1, 0, 3, 0, 1, -1);
    check("slt",  SLT(1, 2, 3),         0, 0, 1, 0, 5, 0, 1, -1);
    check("addi", ADDI(1, 2, -1),       0, 0, 1, 1, 0, 0, 1, 0);   // imm bit 30 set: still add
    check("andi", ANDI(1, 2, 5),        0, 0, 1, 1, 2, 0, 1, 0);
    check("ori",  ORI(1, 2, 5),         0, 0, 1, 1, 3, 0, 1, 0);
    check("slti", SLTI(1, 2, 5),        0, 0, 1, 1, 5, 0, 1, 0);
    check("beq",  BEQ(4, 4, -12),       0, 1, 0, 0, 1, 0, -1, 2);
    check("jal",  JAL(1, 64),           1, 1, 1, -1, -1, 0, 2, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
