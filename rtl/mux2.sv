// mux2: W-bit 2-to-1 multiplexer, y = s ? d1 : d0.
//
// Combinational. Used for the ALU's B operand (rs2 or the immediate, ALUsrc)
// and for the next PC (PC+4 or the branch address, PCsrc).
module mux2 #(
  parameter int W = 32
) (
  input  logic [W-1:0] d0,
  input  logic [W-1:0] d1,
  input  logic         s,
  output logic [W-1:0] y
);

  assign y = s ? d1 : d0;

endmodule
