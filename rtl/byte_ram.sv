// byte_ram: one byte-wide module of the data memory, 2^AW bytes.
//
// Separate data input wd and data output rd. The read is combinational
// (rd follows a); the write of wd into location a happens at the rising
// edge of clk when we = 1. Four of these, side by side, make up the
// 32-bit data memory.
module byte_ram #(
  parameter int AW = 28
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] a,
  input  logic [7:0]    wd,
  output logic [7:0]    rd
);

  localparam longint DEPTH = 64'd1 << AW;

  logic [7:0] mem [0:DEPTH-1];

  always_ff @(posedge clk) begin
    if (we) mem[a] <= wd;
  end

  assign rd = mem[a];

endmodule
