// reg_file: the 32 general-purpose registers x0-x31, 32 bits each.
//
// Three ports, so that an R-type instruction reads two registers and writes
// one in the same clock cycle:
//   ra1/rd1, ra2/rd2  read ports, combinational (asynchronous) reads
//   wa/wd/we          write port, written at the rising edge of clk when we=1
// x0 is not a storage element: reading it always returns 0 and writes to it
// are dropped; x1-x31 are 31 real registers with a load enable each (the
// write address decoder drives the load enables). A read of the register
// being written in the same cycle returns the old value; the new one appears
// after the clock edge. There is no reset: as in the design the registers
// have only a clock and a load input, so software must write a register
// before reading it.
module reg_file (
  input  logic        clk,
  input  logic        we,
  input  logic [4:0]  ra1,
  input  logic [4:0]  ra2,
  input  logic [4:0]  wa,
  input  logic [31:0] wd,
  output logic [31:0] rd1,
  output logic [31:0] rd2
);

  logic [31:0] regs [1:31];

  always_ff @(posedge clk) begin
    if (we && wa != 5'd0) regs[wa] <= wd;
  end

  assign rd1 = (ra1 == 5'd0) ? 32'd0 : regs[ra1];
  assign rd2 = (ra2 == 5'd0) ? 32'd0 : regs[ra2];

endmodule
