// mux3: W-bit 3-to-1 multiplexer.
//
// Combinational. s = 00 selects d0, 01 selects d1, 10 selects d2. The
// unused code 11 also selects d2 (this design's choice). Used as the result
// multiplexer in front of the register file write port (ResSrc): data
// memory, ALU result or PC+4.
module mux3 #(
  parameter int W = 32
) (
  input  logic [W-1:0] d0,
  input  logic [W-1:0] d1,
  input  logic [W-1:0] d2,
  input  logic [1:0]   s,
  output logic [W-1:0] y
);

  always_comb begin
    if (s[1])      y = d2;
    else if (s[0]) y = d1;
    else           y = d0;
  end

endmodule
