// tb_mux3: self-checking test of the 3-to-1 result multiplexer with random
// data on all three inputs and every select value (11 selects d2).
module tb_mux3;
  logic [31:0] d0, d1, d2, y;
  logic [1:0]  s;
  int checks = 0, failures = 0;

  mux3 #(.W(32)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] exp;
    for (int k = 0; k < 1000; k++) begin
      d0 = $urandom; d1 = $urandom; d2 = $urandom; s = 2'(k);
      #1;
      case (s)
        2'b00: exp = d0;
        2'b01: exp = d1;
        default: exp = d2;
      endcase
      checks++;
      if (y !== exp) begin failures++; $display("FAIL s=%b y=%h", s, y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
