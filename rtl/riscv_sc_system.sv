// riscv_sc_system: the complete single-cycle system.
//
// The processor (riscv_core) with its two memories. Memory is split in an
// instruction memory, a combinational ROM, and a data memory with separate
// input and output data ports, so that an instruction can be fetched in the
// same cycle in which data are read or written. Both are byte-addressed,
// move aligned 32-bit words and are idealised: their access fits in one
// clock cycle.
//
// Parameters: MEM_ADDR_W is the number of byte-address bits each memory
// decodes: 30 (1 GiB each) by default, the largest the Verilator simulator
// accepts, where a 32-bit address could reach 4 GiB; smaller values give
// smaller memories for faster simulation. RESET_PC is where execution starts after
// reset. IMEM_INIT optionally names a hex file with the program.
//
// Ports: clk and a synchronous active-high rst; the rest are outputs that
// show what the processor does in the current cycle: the PC and the
// instruction, and the data memory write strobe, address and data.
module riscv_sc_system #(
  parameter int          MEM_ADDR_W = 30,
  parameter logic [31:0] RESET_PC   = 32'h0000_0000,
  parameter string       IMEM_INIT  = ""
) (
  input  logic        clk,
  input  logic        rst,
  output logic [31:0] pc,
  output logic [31:0] instr,
  output logic        mem_we,
  output logic [31:0] mem_addr,
  output logic [31:0] mem_wdata
);

  logic [31:0] mem_rdata;

  riscv_core #(.RESET_PC(RESET_PC)) u_core (
    .clk        (clk),
    .rst        (rst),
    .imem_addr  (pc),
    .imem_rdata (instr),
    .dmem_we    (mem_we),
    .dmem_addr  (mem_addr),
    .dmem_wdata (mem_wdata),
    .dmem_rdata (mem_rdata)
  );

  instr_mem #(.ADDR_W(MEM_ADDR_W), .INIT_FILE(IMEM_INIT)) u_imem (
    .a (pc),
    .d (instr)
  );

  data_mem #(.ADDR_W(MEM_ADDR_W)) u_dmem (
    .clk (clk),
    .we  (mem_we),
    .a   (mem_addr),
    .wd  (mem_wdata),
    .rd  (mem_rdata)
  );

endmodule
