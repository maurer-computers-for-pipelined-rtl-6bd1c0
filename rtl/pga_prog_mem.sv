// pga_prog_mem: program memory M_prog.
//
// Holds the stored program, one PGA instruction per word. The processor
// reads it asynchronously (the fetch operation reads and registers the word
// within one step); a loader writes it synchronously through the write port
// before a run. The design description treats it as an array of instruction
// cells of a given size and says nothing about how it is loaded; the load
// port, the asynchronous read and the default size 2**PA_W = 256 are this
// implementation's choices. Cells are not reset.
module pga_prog_mem
  import pga_pkg::*;
#(
  parameter int unsigned SIZE = 2**PA_W
) (
  input  logic   clk,
  input  logic   we,
  input  paddr_t waddr,
  input  instr_t wdata,
  input  paddr_t raddr,
  output instr_t rdata
);

  instr_t mem [SIZE];

  always_ff @(posedge clk)
    if (we && 32'(waddr) < SIZE) mem[waddr] <= wdata;

  assign rdata = (32'(raddr) < SIZE) ? mem[raddr] : INSTR_JMP0;

endmodule
