// tb_main_dec: self-checking test of the main decoder against its truth
// table, one row per instruction class, with "--" entries left unchecked,
// and for all other opcodes (no register or memory write, no jump).
module tb_main_dec;
  import riscv_pkg::*;
  logic [6:0] op;
  main_ctrl_t ctrl;
  int checks = 0, failures = 0;

  main_dec dut (.op(op), .ctrl(ctrl));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // exp: {Branch, Jump, BRwr, ALUsrc, ALUop[1:0], MemWr, ResSrc[1:0]}; mask 1 = checked
  task automatic row(logic [6:0] o, logic [8:0] exp, logic [8:0] mask);
    op = o; #1;
    checks++;
    if ((ctrl & mask) !== (exp & mask)) begin
      failures++;
      $display("FAIL op=%b ctrl=%b exp=%b mask=%b", o, ctrl, exp, mask);
    end
  endtask

  initial begin
    //                  B J W S AO  M RS
    row(7'b0000011, 9'b0_0_1_1_00_0_00, 9'b1_1_1_1_11_1_11);  // lw
    row(7'b0100011, 9'b0_0_0_1_00_1_00, 9'b1_1_1_1_11_1_00);  // sw
    row(7'b0010011, 9'b0_0_1_1_10_0_01, 9'b1_1_1_1_11_1_11);  // I-type
    row(7'b0110011, 9'b0_0_1_0_10_0_01, 9'b1_1_1_1_11_1_11);  // R-type
    row(7'b1100011, 9'b1_0_0_0_01_0_00, 9'b1_1_1_1_11_1_00);  // beq
    row(7'b1101111, 9'b0_1_1_0_00_0_10, 9'b1_1_1_0_00_1_11);  // jal
    for (int o = 0; o < 128; o++) begin
      if (!(o inside {7'b0000011, 7'b0100011, 7'b0010011, 7'b0110011, 7'b1100011, 7'b1101111}))
        row(7'(o), 9'b0_0_0_0_00_0_00, 9'b1_1_1_0_00_1_00);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
