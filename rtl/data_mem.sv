// data_mem: data memory, byte-addressable, little-endian, 4 bytes per access.
//
// It behaves like a large register file with a separate data input (wd) and
// data output (rd): the read is combinational, the write happens at the
// rising edge of clk when we = 1. a is a byte address. The processor only
// moves aligned 32-bit words, so a[1:0] is dropped and all four bytes of the
// word a[ADDR_W-1:2] are read or written together.
//
// It is built from four byte-wide modules (byte_ram), one per byte lane:
// lane i holds the byte at byte address 4*word + i, which is bits
// 8*i+7:8*i of the word (little-endian). A full RISC-V would add an access
// size input that, together with a[1:0], enables only some lanes; this
// reduced processor always enables all four. ADDR_W is the number of
// byte-address bits decoded; higher bits are ignored. A 32-bit address could
// reach 4 GiB (four 1 GiB lanes); the default of 30 gives 1 GiB (four
// 256 MiB lanes), as the Verilator simulator accepts no array of more than
// 2^28 entries.
module data_mem #(
  parameter int ADDR_W = 30
) (
  input  logic        clk,
  input  logic        we,
  input  logic [31:0] a,
  input  logic [31:0] wd,
  output logic [31:0] rd
);

  for (genvar i = 0; i < 4; i++) begin : g_lane
    byte_ram #(.AW(ADDR_W - 2)) u_lane (
      .clk (clk),
      .we  (we),
      .a   (a[ADDR_W-1:2]),
      .wd  (wd[8*i +: 8]),
      .rd  (rd[8*i +: 8])
    );
  end

endmodule
