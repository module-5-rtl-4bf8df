// tb_mux2: self-checking test of the 2-to-1 multiplexer with random data.
module tb_mux2;
  logic [31:0] d0, d1, y;
  logic        s;
  int checks = 0, failures = 0;

  mux2 #(.W(32)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 1000; k++) begin
      d0 = $urandom; d1 = $urandom; s = 1'(k);
      #1;
      checks++;
      if (y !== ((k % 2) != 0 ? d1 : d0)) begin failures++; $display("FAIL s=%b y=%h", s, y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
