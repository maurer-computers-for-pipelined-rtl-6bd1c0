// pga_fetch: the fetch operation O_fetch.
//
// Combinational next-state function. When pc is within the program (pc <=
// pcbr, pcbr holding the highest program address) the instruction at pc is
// the new ir and the fetch reply is T; otherwise ir becomes #0 and the reply
// is F. pc is incremented by every fetch, so after the last instruction has
// been fetched pc is pcbr + 1 and the next fetch fails; the pipelined
// processor relies on this when it undoes its premature fetches in jump
// targets (pc - 2 + k). The description states the increment both as "at
// every fetch" and, in its equations, as bounded by pc + 1 <= pcbr; the
// bounded form would re-fetch the last instruction forever, so the first
// reading is used here. The program memory is read asynchronously at mem_addr in the
// same cycle; the caller registers the outputs.
module pga_fetch
  import pga_pkg::*;
(
  input  pc_t    pc,         // program counter
  input  paddr_t pcbr,       // highest program address
  output paddr_t mem_addr,   // program memory read address
  input  instr_t mem_rdata,  // instruction stored at mem_addr
  output pc_t    pc_next,
  output instr_t ir_next,
  output logic   rr_fetch    // fetch reply
);

  logic in_prog;

  always_comb begin
    mem_addr = pc[PA_W-1:0];
    in_prog  = (pc <= pc_t'(pcbr));
    pc_next  = pc + pc_t'(1);
    ir_next  = in_prog ? mem_rdata : INSTR_JMP0;
    rr_fetch = in_prog;
  end

endmodule
