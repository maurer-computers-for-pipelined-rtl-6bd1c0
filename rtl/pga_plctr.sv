// pga_plctr: the pipeline control operation O_plctr and the halt operation
// O_halt of the pipelined processor.
//
// Combinational. From the pipeline status register of the step just
// performed and the flags that step raised, it computes which stages are
// enabled in the next step (plsu):
//   fetch    if the fetch reply is T and either fetch was enabled and no
//            jump/termination was decoded (jdf) and no conditional jump was
//            taken (cjf), or an instruction is being skipped (isf), or a
//            jump has just been post-processed (jpf);
//   prep     as fetch, but not on jpf (the prematurely fetched instruction
//            is discarded);
//   exec     if prep was enabled and neither isf nor cjf is raised;
//   postp    if exec was enabled.
// The step reply ru is T when some stage stays enabled and the last
// post-process reply is T. When ru is F the power thread halts: the halt
// reply is T (regular termination) exactly when the last post-process reply
// was F. The equations are those of the design description, with the
// conditional jump flag of its extension; the flags themselves are cleared
// every step, so the caller keeps them as same-cycle signals.
// The postpst bit of plsr takes no part in the next status (an instruction
// leaves the pipeline after postp), so lint reports that bit unused.
module pga_plctr
  import pga_pkg::*;
(
  input  plsr_t plsr,        // stages enabled in the step just performed
  input  logic  rr_fetch,    // fetch reply after the step
  input  logic  rr_postp,    // post-process reply after the step
  input  logic  jdf,         // jump decoded flag
  input  logic  isf,         // instruction skip flag
  input  logic  jpf,         // jump processed flag
  input  logic  cjf,         // conditional jump flag
  output plsr_t plsr_next,
  output logic  ru,          // step reply: continue
  output logic  halt_reply   // T: terminated, F: deadlock (valid when !ru)
);

  logic flow;

  always_comb begin
    flow                = plsr.fetchst && !jdf && !cjf;
    plsr_next.fetchst   = rr_fetch && (flow || isf || jpf);
    plsr_next.prepst    = rr_fetch && (flow || isf);
    plsr_next.execst    = plsr.prepst && !isf && !cjf;
    plsr_next.postpst   = plsr.execst;
    ru                  = (plsr_next != '0) && rr_postp;
    halt_reply          = !rr_postp;
  end

endmodule
