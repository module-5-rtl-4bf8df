// tb_alu_dec: self-checking test of the ALU local decoder. Runs every
// combination of ALUop (00, 01, 10), op5, funct7[5] and funct3 and checks
// the rows of the truth table; combinations the table leaves open are
// not checked.
module tb_alu_dec;
  logic [1:0] alu_op;
  logic       op5, funct7_5;
  logic [2:0] funct3, alu_ctr;
  int checks = 0, failures = 0;

  alu_dec dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp;
    for (int i = 0; i < 3 * 2 * 2 * 8; i++) begin
      {alu_op, op5, funct7_5, funct3} = {2'(i / 32), 1'(i / 16), 1'(i / 8), 3'(i)};
      #1;
      exp = -1;
      if (alu_op == 2'b00) exp = 0;
      else if (alu_op == 2'b01) exp = 1;
      else if (funct3 == 3'b000) exp = (op5 == 1 && funct7_5 == 1) ? 1 : 0;
      else if (funct3 == 3'b010) exp = 5;
      else if (funct3 == 3'b110) exp = 3;
      else if (funct3 == 3'b111) exp = 2;
      if (exp >= 0) begin
        checks++;
        if (alu_ctr !== 3'(exp)) begin
          failures++;
          $display("FAIL ALUop=%b op5=%b f7=%b f3=%b ctr=%b exp=%0d", alu_op, op5, funct7_5, funct3, alu_ctr, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
