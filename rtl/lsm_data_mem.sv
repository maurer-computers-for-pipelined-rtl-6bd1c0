// lsm_data_mem: data memory M_data of the strict load/store machine.
//
// 2**K words of L bits, every address backed by a word (the description
// forbids a data memory smaller than its address range). The machine side has
// one asynchronous read port, used by load actions within their step, and one
// synchronous write port, used by store actions. A host port reads and writes
// the memory for loading data and collecting results; a machine write wins
// over a host write to the same word in the same cycle. The memory itself
// follows the description; the ports and the default sizes K = 8, L = 16
// are this implementation's choices. Words are not reset.
module lsm_data_mem #(
  parameter int unsigned K = 8,    // address width
  parameter int unsigned L = 16    // word length
) (
  input  logic         clk,
  // machine side
  input  logic [K-1:0] raddr,
  output logic [L-1:0] rdata,
  input  logic         we,
  input  logic [K-1:0] waddr,
  input  logic [L-1:0] wdata,
  // host side
  input  logic         h_we,
  input  logic [K-1:0] h_addr,
  input  logic [L-1:0] h_wdata,
  output logic [L-1:0] h_rdata
);

  logic [L-1:0] mem [2**K];

  always_ff @(posedge clk) begin
    if (we)                                mem[waddr]  <= wdata;
    if (h_we && !(we && waddr == h_addr))  mem[h_addr] <= h_wdata;
  end

  assign rdata   = mem[raddr];
  assign h_rdata = mem[h_addr];

endmodule
