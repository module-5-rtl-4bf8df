// tb_instr_mem: self-checking test of the instruction ROM at a small size
// (ADDR_W = 12, 1024 words). Loads random words into the array, then checks
// that every word is read combinationally at its byte address, that the two
// low address bits are ignored and that address bits above ADDR_W wrap.
module tb_instr_mem;
  localparam int AW = 12;
  logic [31:0] a, d;
  logic [31:0] img [1 << (AW - 2)];
  int checks = 0, failures = 0;

  instr_mem #(.ADDR_W(AW)) dut (.a(a), .d(d));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (img[i]) begin
      img[i] = $urandom;
      dut.mem[i] = img[i];
    end
    foreach (img[i]) begin
      a = 32'(i) << 2; #1;
      checks++;
      if (d !== img[i]) begin failures++; $display("FAIL word %0d d=%h exp %h", i, d, img[i]); end
    end
    for (int k = 0; k < 500; k++) begin
      a = $urandom; #1;
      checks++;
      if (d !== img[a[AW-1:2]]) begin failures++; $display("FAIL a=%h d=%h", a, d); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
