// instr_mem: instruction memory, behaving as a combinational ROM.
//
// The address a is a byte address; every instruction is one aligned 32-bit
// word, so the word index is a[ADDR_W-1:2] and a[1:0] is ignored. The data
// output d follows the address with no clock (the memory is idealised: its
// access time fits within one processor cycle). ADDR_W is the number of
// byte-address bits decoded. A 32-bit address could reach 4 GiB (2^30
// words); the default of 30 gives 1 GiB (2^28 words), the largest single
// array the Verilator simulator accepts. Address bits above ADDR_W are
// ignored, so the memory repeats through the address space.
//
// Contents: if INIT_FILE is not empty the words are read from that hex file
// (one 32-bit word per line) at time 0; otherwise a testbench loads the
// array directly. The memory has no write port, as in the design.
module instr_mem #(
  parameter int    ADDR_W    = 30,
  parameter string INIT_FILE = ""
) (
  input  logic [31:0] a,
  output logic [31:0] d
);

  localparam longint DEPTH = 64'd1 << (ADDR_W - 2);

  logic [31:0] mem [0:DEPTH-1];

  initial begin
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  assign d = mem[a[ADDR_W-1:2]];

endmodule
