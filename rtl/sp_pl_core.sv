// sp_pl_core: stored-program processor with pipelined instruction processing
// (the SP-PL enhancement of a machine).
//
// Four pipeline stages, fetch, prep, exec and postp, each the operation of
// the same name (pga_fetch, pga_prep, pga_exec, pga_postp), work in parallel
// in every step, one step per clock cycle. The pipeline status register plsr
// says which stages are enabled; after each step the pipeline control
// (pga_plctr) recomputes it from the flags the step raised:
//   * a decoded jump or ! (jdf) stops fetching until the jump has been
//     post-processed (a stall);
//   * a test whose reply asks for a skip (isf) discards the instruction
//     fetched right after it, which is then in prep, and refills prep;
//   * a taken conditional jump (cjf) discards what follows it and stalls;
//   * a post-processed jump (jpf) restarts fetching at the new pc, discarding
//     the instruction fetched prematurely.
// This is the power thread step o (continue <| plctr |> (S <| halt |> D)):
// the run ends after the step whose pipeline control reply is F, either
// terminated (! post-processed) or in deadlock (nothing left to do, e.g. a
// fetch past the last instruction). Because stall and discard keep the fetch
// and post-process stages from both changing pc in one step, all stages read
// the registers as they were at the start of the cycle and write at its end.
//
// Interface: load the program through prog_*; pulse start with pcbr_in =
// number of instructions - 1 (pc starts at 0, only fetch enabled, replies T).
// busy is high while running; done rises after the last step, with
// terminated or deadlock, and steps holds the number of steps performed.
// act_bus carries the basic action of the exec stage to the machine.
// The register set, the step and control equations follow the design
// description including its conditional and backward jump extensions; the
// start/done handshake, the cycle mapping and the choice to keep the four
// control flags as same-cycle signals (they are cleared every step) are this
// implementation's. A known property of the described pipeline is kept: a
// taken conditional jump directly followed by a jump instruction uses that
// jump's displacement, since its decode overwrites dr first.
// Two more properties of the described pipeline at the end of a program are
// kept as well: a conditional jump in the last position computes its target
// one too low (only two fetches follow it), which is harmless because its
// failed premature fetch blocks any restart and every taken jump from there
// leaves the program anyway; and a taken +a#1 / -a#1 in the next-to-last
// position ends in deadlock instead of going on with the last instruction,
// because the same blocked restart applies.
// One rule is added for backward jumps, which the description only sketches:
// when a backward jump is post-processed to an address inside the program,
// the fetch reply is set to T again. Without it, a loop closed by a backward
// jump in the last position, whose premature fetch ran past the end of the
// program, could never restart fetching.
// rr_prep and rr_exec are part of the register set but their replies are
// always T and nothing reads them; lint reports them unused and synthesis
// removes them.
module sp_pl_core
  import pga_pkg::*;
#(
  parameter int unsigned PROG_SIZE = 2**PA_W
) (
  input  logic     clk,
  input  logic     rst_n,
  // program loading
  input  logic     prog_we,
  input  paddr_t   prog_waddr,
  input  instr_t   prog_wdata,
  // run control
  input  logic     start,
  input  paddr_t   pcbr_in,
  output logic     busy,
  output logic     done,
  output logic     terminated,
  output logic     deadlock,
  output logic [31:0] steps,
  // observation of the current step
  output plsr_t    plsr_o,
  output plflags_t flags_o,
  output pc_t      pc_o,
  // basic actions to the machine
  basic_action_if.proc act_bus
);

  // instruction processing registers
  paddr_t  pcbr;
  pc_t     pc;
  instr_t  ir;
  itype_e  ditr, eitr;
  action_t bar;
  paddr_t  dr;
  logic    irr;
  // reply registers
  logic    rr_fetch, rr_prep, rr_exec, rr_postp;
  // pipeline control
  plsr_t   plsr;

  // stage results
  paddr_t  mem_addr;
  instr_t  mem_rdata, f_ir;
  pc_t     f_pc, p_pc;
  logic    f_rr, p_rr;
  itype_e  d_ditr, x_eitr;
  action_t d_bar;
  paddr_t  d_dr;
  logic    jdc, isc, cjc, jpc, x_irr;

  logic     fetch_en, prep_en, exec_en, postp_en;
  logic     rr_fetch_after, rr_postp_after, ru, halt_reply, rearm;
  plflags_t flags;
  plsr_t    plsr_next;

  pga_prog_mem #(.SIZE(PROG_SIZE)) u_mprog (
    .clk, .we(prog_we), .waddr(prog_waddr), .wdata(prog_wdata),
    .raddr(mem_addr), .rdata(mem_rdata)
  );

  pga_fetch u_fetch (
    .pc, .pcbr, .mem_addr, .mem_rdata,
    .pc_next(f_pc), .ir_next(f_ir), .rr_fetch(f_rr)
  );

  pga_prep u_prep (
    .ir, .bar, .dr,
    .ditr_next(d_ditr), .bar_next(d_bar), .dr_next(d_dr), .jdc
  );

  pga_exec u_exec (
    .enable(exec_en), .ditr, .bar, .act_bus,
    .eitr_next(x_eitr), .irr_next(x_irr), .isc, .cjc
  );

  pga_postp #(.PIPELINED(1'b1)) u_postp (
    .pc, .pcbr, .eitr, .irr, .dr,
    .pc_next(p_pc), .rr_postp(p_rr), .jpc
  );

  always_comb begin
    fetch_en       = busy && plsr.fetchst;
    prep_en        = busy && plsr.prepst;
    exec_en        = busy && plsr.execst;
    postp_en       = busy && plsr.postpst;
    flags.jdf      = prep_en && jdc;
    flags.isf      = exec_en && isc;
    flags.cjf      = exec_en && cjc;
    flags.jpf      = postp_en && jpc;
    // A backward jump post-processed to an address inside the program
    // re-arms the fetch reply, so a failed premature fetch behind it (the
    // jump closing a loop at the end of the program) cannot block the
    // restart.
    rearm          = flags.jpf && (eitr == IT_BJMP) && (p_pc <= pc_t'(pcbr));
    rr_fetch_after = fetch_en ? f_rr : (rearm ? 1'b1 : rr_fetch);
    rr_postp_after = postp_en ? p_rr : rr_postp;
  end

  pga_plctr u_plctr (
    .plsr, .rr_fetch(rr_fetch_after), .rr_postp(rr_postp_after),
    .jdf(flags.jdf), .isf(flags.isf), .jpf(flags.jpf), .cjf(flags.cjf),
    .plsr_next, .ru, .halt_reply
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      done       <= 1'b0;
      terminated <= 1'b0;
      deadlock   <= 1'b0;
      steps      <= '0;
      pcbr       <= '0;
      pc         <= '0;
      ir         <= INSTR_JMP0;
      ditr       <= IT_TERM;
      eitr       <= IT_TERM;
      bar        <= '0;
      dr         <= '0;
      irr        <= 1'b1;
      rr_fetch   <= 1'b1;
      rr_prep    <= 1'b1;
      rr_exec    <= 1'b1;
      rr_postp   <= 1'b1;
      plsr       <= '0;
    end else if (start && !busy) begin
      busy       <= 1'b1;
      done       <= 1'b0;
      terminated <= 1'b0;
      deadlock   <= 1'b0;
      steps      <= '0;
      pcbr       <= pcbr_in;
      pc         <= '0;
      rr_fetch   <= 1'b1;
      rr_postp   <= 1'b1;
      plsr       <= '{fetchst: 1'b1, default: 1'b0};
    end else if (busy) begin
      // O_step: all enabled stages at once
      if (postp_en && jpc) pc <= p_pc;
      else if (fetch_en)   pc <= f_pc;
      if (fetch_en) ir <= f_ir;
      rr_fetch <= rr_fetch_after;
      if (prep_en) begin
        ditr    <= d_ditr;
        bar     <= d_bar;
        dr      <= d_dr;
        rr_prep <= 1'b1;
      end
      if (exec_en) begin
        eitr    <= x_eitr;
        irr     <= x_irr;
        rr_exec <= 1'b1;
      end
      if (postp_en) rr_postp <= p_rr;
      // O_plctr, and O_halt when the step reply is F
      plsr  <= plsr_next;
      steps <= steps + 32'd1;
      if (!ru) begin
        busy       <= 1'b0;
        done       <= 1'b1;
        terminated <= halt_reply;
        deadlock   <= !halt_reply;
      end
    end
  end

  assign plsr_o  = plsr;
  assign flags_o = flags;
  assign pc_o    = pc;

  // The stall on a decoded jump keeps fetch and post-process from both
  // changing pc in the same step (the parallel composability argument).
  a_no_pc_conflict: assert property (@(posedge clk)
    !(fetch_en && postp_en && jpc));

endmodule
