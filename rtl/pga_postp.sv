// pga_postp: the post-process operation (O_postp, and O''_postp of the
// pipelined processor).
//
// Combinational. Adjusts the program counter after an instruction has been
// executed and recognises termination (rr_postp = F after !).
//
// PIPELINED = 0 (non-pipelined processor, function pcu): pc already points
// past the instruction, so a skip adds 1 and a jump by k goes to pc - 1 + k.
// PIPELINED = 1 (function pcu'): skips are done by discarding the following
// instruction in the pipeline, so pc is left alone on tests; pc has moved on
// by two fetches after an unconditional jump and by three after a conditional
// one, so the target is pc - 2 + k or pc - 3 + k. jpc reports that pc was
// adjusted on a jump, which restarts the pipeline.
// A jump by 0 or past pcbr, or a skip past pcbr, sets pc to pcbr + 1, where
// the next fetch fails. All of this follows the design description. The
// backward jump \#k (target pc - 1 - k or pc - 2 - k) is this
// implementation's completion of a case the description only sketches. A
// target below address 0, for any jump, is treated like a jump out of the
// program; a running processor never produces one for a forward jump.
module pga_postp
  import pga_pkg::*;
#(
  parameter bit PIPELINED = 1'b1
) (
  input  pc_t    pc,
  input  paddr_t pcbr,
  input  itype_e eitr,
  input  logic   irr,
  input  paddr_t dr,
  output pc_t    pc_next,
  output logic   rr_postp,
  output logic   jpc
);

  typedef logic signed [PA_W+2:0] spc_t;   // wide enough for pc - 3 and pc + k

  localparam int JOFF  = PIPELINED ? 2 : 1;  // fetches after an unconditional jump
  localparam int CJOFF = PIPELINED ? 3 : 1;  // fetches after a conditional jump

  logic fwd_jump, back_jump, do_skip;
  spc_t target, limit;

  always_comb begin
    fwd_jump  = (eitr == IT_FJMP) || cjump_taken(eitr, irr);
    back_jump = (eitr == IT_BJMP);
    do_skip   = !PIPELINED && skip_reply(eitr, irr);
    limit     = spc_t'(pcbr);
    target    = spc_t'(pc);
    if (eitr == IT_FJMP)
      target = spc_t'(pc) - spc_t'(JOFF) + spc_t'(dr);
    else if (back_jump)
      target = spc_t'(pc) - spc_t'(JOFF) - spc_t'(dr);
    else
      target = spc_t'(pc) - spc_t'(CJOFF) + spc_t'(dr);

    pc_next = pc;
    if (do_skip)
      pc_next = (spc_t'(pc) + 1 <= limit) ? pc + pc_t'(1) : pc_t'(pcbr) + pc_t'(1);
    else if (fwd_jump || back_jump)
      pc_next = (dr != '0 && target >= 0 && target <= limit) ? pc_t'(target)
                                                              : pc_t'(pcbr) + pc_t'(1);
    rr_postp = (eitr != IT_TERM);
    jpc      = fwd_jump || back_jump;
  end

endmodule
