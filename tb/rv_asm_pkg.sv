// rv_asm_pkg: instruction encoders and a reference instruction-set model
// for the processor testbenches.
//
// The encoders place register numbers and immediates into the standard
// RV32I formats (R, I, S, B, J), working from the immediate value towards
// the instruction word, the opposite direction of the hardware's immediate
// generator. iss_step() executes one instruction of the reduced instruction
// set on a software copy of the architectural state (PC, x0-x31, a sparse
// word memory), written from the instruction-set definitions alone, so that
// the testbenches can compare the processor against it cycle by cycle.
package rv_asm_pkg;

  function automatic logic [31:0] enc_r(input logic [6:0] f7, input int rs2, input int rs1,
                                        input logic [2:0] f3, input int rd);
    return {f7, 5'(rs2), 5'(rs1), f3, 5'(rd), 7'b0110011};
  endfunction

  function automatic logic [31:0] enc_i(input logic [6:0] op, input int rd, input logic [2:0] f3,
                                        input int rs1, input int imm);
    logic [31:0] v = imm;
    return {v[11:0], 5'(rs1), f3, 5'(rd), op};
  endfunction

  function automatic logic [31:0] enc_s(input int rs2, input int rs1, input int imm);
    logic [31:0] v = imm;
    return {v[11:5], 5'(rs2), 5'(rs1), 3'b010, v[4:0], 7'b0100011};
  endfunction

  function automatic logic [31:0] enc_b(input int rs1, input int rs2, input int off);
    logic [31:0] v = off;
    return {v[12], v[10:5], 5'(rs2), 5'(rs1), 3'b000, v[4:1], v[11], 7'b1100011};
  endfunction

  function automatic logic [31:0] enc_j(input int rd, input int off);
    logic [31:0] v = off;
    return {v[20], v[10:1], v[11], v[19:12], 5'(rd), 7'b1101111};
  endfunction

  // Mnemonic helpers
  function automatic logic [31:0] LW  (int rd, int imm, int rs1); return enc_i(7'b0000011, rd, 3'b010, rs1, imm); endfunction
  function automatic logic [31:0] SW  (int rs2, int imm, int rs1); return enc_s(rs2, rs1, imm); endfunction
  function automatic logic [31:0] ADD (int rd, int rs1, int rs2); return enc_r(7'h00, rs2, rs1, 3'b000, rd); endfunction
  function automatic logic [31:0] SUB (int rd, int rs1, int rs2); return enc_r(7'h20, rs2, rs1, 3'b000, rd); endfunction
  function automatic logic [31:0] SLT (int rd, int rs1, int rs2); return enc_r(7'h00, rs2, rs1, 3'b010, rd); endfunction
  function automatic logic [31:0] OR_ (int rd, int rs1, int rs2); return enc_r(7'h00, rs2, rs1, 3'b110, rd); endfunction
  function automatic logic [31:0] AND_(int rd, int rs1, int rs2); return enc_r(7'h00, rs2, rs1, 3'b111, rd); endfunction
  function automatic logic [31:0] ADDI(int rd, int rs1, int imm); return enc_i(7'b0010011, rd, 3'b000, rs1, imm); endfunction
  function automatic logic [31:0] SLTI(int rd, int rs1, int imm); return enc_i(7'b0010011, rd, 3'b010, rs1, imm); endfunction
  function automatic logic [31:0] ORI (int rd, int rs1, int imm); return enc_i(7'b0010011, rd, 3'b110, rs1, imm); endfunction
  function automatic logic [31:0] ANDI(int rd, int rs1, int imm); return enc_i(7'b0010011, rd, 3'b111, rs1, imm); endfunction
  function automatic logic [31:0] BEQ (int rs1, int rs2, int off); return enc_b(rs1, rs2, off); endfunction
  function automatic logic [31:0] JAL (int rd, int off); return enc_j(rd, off); endfunction

  // Architectural state of the reference model
  typedef struct {
    logic [31:0] pc;
    logic [31:0] x [32];
    logic [31:0] mem [int unsigned];  // word-addressed (byte address >> 2)
  } arch_t;

  // Effect of one instruction, for comparison with the hardware
  typedef struct {
    string       kind;       // "lw", "sw", "alu_r", "alu_i", "beq_taken", "beq_not", "jal", "bad"
    logic        rf_we;
    int          rd;
    logic [31:0] rd_val;
    logic        mem_we;
    logic [31:0] mem_addr;
    logic [31:0] mem_val;
    logic [31:0] next_pc;
  } effect_t;

  function automatic logic [31:0] sx(input logic [31:0] v, input int bits);
    logic [31:0] m = 32'hFFFF_FFFF << bits;
    return v[bits-1] ? (v | m) : (v & ~m);
  endfunction

  function automatic logic [31:0] mem_rd(ref arch_t s, input logic [31:0] a);
    if (s.mem.exists(a >> 2)) return s.mem[a >> 2];
    return 32'd0;
  endfunction

  function automatic effect_t iss_step(ref arch_t s, input logic [31:0] ins);
    effect_t e;
    logic [6:0]  op = ins[6:0];
    logic [2:0]  f3 = ins[14:12];
    int          rd = int'(ins[11:7]), rs1 = int'(ins[19:15]), rs2 = int'(ins[24:20]);
    logic [31:0] a = s.x[rs1], b = s.x[rs2];
    logic [31:0] immi = sx({20'd0, ins[31:20]}, 12);
    logic [31:0] imms = sx({20'd0, ins[31:25], ins[11:7]}, 12);
    logic [31:0] immb = sx({19'd0, ins[31], ins[7], ins[30:25], ins[11:8], 1'b0}, 13);
    logic [31:0] immj = sx({11'd0, ins[31], ins[19:12], ins[20], ins[30:21], 1'b0}, 21);
    logic [31:0] opb;
    e.kind = "bad"; e.rf_we = 0; e.rd = rd; e.rd_val = 0;
    e.mem_we = 0; e.mem_addr = 0; e.mem_val = 0;
    e.next_pc = s.pc + 4;
    case (op)
      7'b0000011: begin
        e.kind = "lw"; e.rf_we = 1; e.mem_addr = a + immi; e.rd_val = mem_rd(s, a + immi);
      end
      7'b0100011: begin
        e.kind = "sw"; e.mem_we = 1; e.mem_addr = a + imms; e.mem_val = b;
      end
      7'b0010011, 7'b0110011: begin
        opb = (op == 7'b0010011) ? immi : b;
        e.kind = (op == 7'b0010011) ? "alu_i" : "alu_r";
        e.rf_we = 1;
        case (f3)
          3'b000: e.rd_val = (op == 7'b0110011 && ins[30]) ? a - opb : a + opb;
          3'b010: e.rd_val = ($signed(a) < $signed(opb)) ? 32'd1 : 32'd0;
          3'b110: e.rd_val = a | opb;
          3'b111: e.rd_val = a & opb;
          default: e.rd_val = a + opb;
        endcase
      end
      7'b1100011: begin
        if (a == b) begin e.kind = "beq_taken"; e.next_pc = s.pc + immb; end
        else e.kind = "beq_not";
      end
      7'b1101111: begin
        e.kind = "jal"; e.rf_we = 1; e.rd_val = s.pc + 4; e.next_pc = s.pc + immj;
      end
      default: ;
    endcase
    // apply
    if (e.rf_we && rd != 0) s.x[rd] = e.rd_val;
    if (e.mem_we) s.mem[e.mem_addr >> 2] = e.mem_val;
    s.pc = e.next_pc;
    return e;
  endfunction


  // Control values of each instruction class, written out from the
  // controller's truth tables: {PCsrc-if-taken, BRwr, ALUsrc, ALUctr[2:0],
  // ResSrc[1:0], ImmSrc[1:0], MemWr}. Used to drive the data path alone.
  typedef struct packed {
    logic       pc_src;   // 1 for jal; for beq, 1 only when taken
    logic       br_wr;
    logic       alu_src;
    logic [2:0] alu_ctr;
    logic [1:0] res_src;
    logic [1:0] imm_src;
    logic       mem_wr;
  } ctl_t;

  function automatic ctl_t ref_ctl(input logic [31:0] ins, input logic taken);
    ctl_t c = '0;
    case (ins[6:0])
      7'b0000011: begin c.br_wr = 1; c.alu_src = 1; c.res_src = 2'b00; c.imm_src = 2'b00; end
      7'b0100011: begin c.alu_src = 1; c.imm_src = 2'b01; c.mem_wr = 1; end
      7'b0010011, 7'b0110011: begin
        c.br_wr = 1; c.res_src = 2'b01;
        c.alu_src = (ins[6:0] == 7'b0010011);
        case (ins[14:12])
          3'b000: c.alu_ctr = (ins[5] && ins[30]) ? 3'b001 : 3'b000;
          3'b010: c.alu_ctr = 3'b101;
          3'b110: c.alu_ctr = 3'b011;
          3'b111: c.alu_ctr = 3'b010;
          default: c.alu_ctr = 3'b000;
        endcase
      end
      7'b1100011: begin c.alu_ctr = 3'b001; c.imm_src = 2'b10; c.pc_src = taken; end
      7'b1101111: begin c.br_wr = 1; c.res_src = 2'b10; c.imm_src = 2'b11; c.pc_src = 1; end
      default: ;
    endcase
    return c;
  endfunction

  // Test program used by the system testbenches. It runs a loop that stores
  // and reloads a count-down (5..1) and sums it, leaves the loop with a
  // taken beq (the back-edge is a jal with rd = x0, the loop test a beq
  // that falls through four times), then uses every arithmetic-logic
  // instruction, a jal that saves its return address over two skipped
  // instructions, a write to x0 that must be dropped, a store and reload
  // with negative offsets, and ends in "beq x0, x0, 0", a one-instruction
  // loop used as the halt.
  localparam int unsigned PROG_HALT_PC = 32'h70;

  function automatic void test_program(ref logic [31:0] p[$]);
    p = {};
    p.push_back(ADDI(1, 0, 5));        // 00
    p.push_back(ADDI(2, 0, 'h100));    // 04
    p.push_back(ADDI(3, 0, 0));        // 08
    p.push_back(ADDI(4, 0, -3));       // 0c
    p.push_back(SW(1, 0, 2));          // 10 loop:
    p.push_back(LW(5, 0, 2));          // 14
    p.push_back(ADD(3, 3, 5));         // 18
    p.push_back(ADDI(2, 2, 4));        // 1c
    p.push_back(ADDI(1, 1, -1));       // 20
    p.push_back(BEQ(1, 0, 12));        // 24 -> 30
    p.push_back(JAL(0, -24));          // 28 -> 10
    p.push_back(ADDI(31, 0, 1));       // 2c skipped
    p.push_back(SUB(6, 3, 4));         // 30  15 - (-3) = 18
    p.push_back(SLT(7, 4, 3));         // 34  1
    p.push_back(SLT(8, 3, 4));         // 38  0
    p.push_back(SLTI(9, 4, -2));       // 3c  1
    p.push_back(SLTI(10, 3, 15));      // 40  0
    p.push_back(AND_(11, 6, 3));       // 44  2
    p.push_back(OR_(12, 6, 3));        // 48  31
    p.push_back(ANDI(13, 4, 'h7F0));   // 4c  0x7f0
    p.push_back(ORI(14, 1, -256));     // 50  0xffffff00
    p.push_back(JAL(15, 12));          // 54 -> 60, x15 = 0x58
    p.push_back(ADDI(31, 0, 2));       // 58 skipped
    p.push_back(ADDI(31, 0, 3));       // 5c skipped
    p.push_back(ADDI(0, 0, 7));        // 60 dropped
    p.push_back(ADD(16, 0, 0));        // 64  0
    p.push_back(SW(12, -4, 2));        // 68  Mem[0x110] = 31
    p.push_back(LW(17, -4, 2));        // 6c  31
    p.push_back(BEQ(0, 0, 0));         // 70 halt
  endfunction

  // Hand-computed register values at the halt of test_program
  function automatic logic [31:0] test_program_result(input int r);
    case (r)
      1: return 0;           2: return 32'h114;     3: return 15;
      4: return 32'hFFFF_FFFD;                      5: return 1;
      6: return 18;          7: return 1;           8: return 0;
      9: return 1;           10: return 0;          11: return 2;
      12: return 31;         13: return 32'h7F0;    14: return 32'hFFFF_FF00;
      15: return 32'h58;     16: return 0;          17: return 31;
      default: return 32'hXXXX_XXXX;
    endcase
  endfunction

endpackage
