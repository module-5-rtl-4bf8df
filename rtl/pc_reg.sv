// pc_reg: the Program Counter, an array of 32 D flip-flops.
//
// Every instruction completes in one cycle, so the PC is loaded at every
// rising clock edge and has no load enable. Reset is this design's addition
// (the document shows a reset input but not its behaviour): a synchronous,
// active-high rst loads RESET_PC instead of d.
module pc_reg #(
  parameter logic [31:0] RESET_PC = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] d,
  output logic [31:0] q
);

  always_ff @(posedge clk) begin
    if (rst) q <= RESET_PC;
    else     q <= d;
  end

endmodule
