// sp_npl_core: stored-program processor with non-pipelined instruction
// processing (the SP-NPL enhancement of a machine).
//
// Each instruction goes through the operations fetch, prep, exec and postp
// one after another, one operation per clock cycle, following the power
// thread CT = (prep o exec o (CT <| postp |> S)) <| fetch |> D: a fetch with
// reply F (pc beyond the last instruction) ends the run in deadlock, a
// post-process with reply F (the instruction was !) ends it terminated,
// and otherwise the next fetch follows. Every instruction therefore takes
// four cycles. The operations are the shared stage modules; pga_postp runs in
// its non-pipelined form, so skips add one to pc and jumps are relative to
// pc - 1.
//
// Interface: load the program through prog_*; pulse start with pcbr_in =
// number of instructions - 1 (pc starts at 0). busy is high while running;
// done rises after the last operation, with terminated or deadlock, and steps
// holds the number of operations performed. act_bus carries the basic action
// of the exec operation to the machine.
// The registers and operations follow the design description including its
// conditional and backward jump extensions; the one-operation-per-cycle
// state machine and the start/done handshake are this implementation's.
// The four reply registers rr_fetch .. rr_postp hold each operation's reply
// as the description's state does, but the state machine acts on the reply
// in the cycle it is produced, so nothing reads them back; they are kept
// for observation and synthesis removes them (lint reports them unused).
module sp_npl_core
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
  output pc_t      pc_o,
  // basic actions to the machine
  basic_action_if.proc act_bus
);

  typedef enum logic [2:0] {S_IDLE, S_FETCH, S_PREP, S_EXEC, S_POSTP} state_e;
  state_e state;

  paddr_t  pcbr;
  pc_t     pc;
  instr_t  ir;
  itype_e  ditr, eitr;
  action_t bar;
  paddr_t  dr;
  logic    irr;
  logic    rr_fetch, rr_prep, rr_exec, rr_postp;

  paddr_t  mem_addr;
  instr_t  mem_rdata, f_ir;
  pc_t     f_pc, p_pc;
  logic    f_rr, p_rr;
  itype_e  d_ditr, x_eitr;
  action_t d_bar;
  paddr_t  d_dr;
  logic    x_irr;
  logic    jdc_unused, isc_unused, cjc_unused, jpc_unused;

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
    .ditr_next(d_ditr), .bar_next(d_bar), .dr_next(d_dr), .jdc(jdc_unused)
  );

  pga_exec u_exec (
    .enable(state == S_EXEC), .ditr, .bar, .act_bus,
    .eitr_next(x_eitr), .irr_next(x_irr), .isc(isc_unused), .cjc(cjc_unused)
  );

  pga_postp #(.PIPELINED(1'b0)) u_postp (
    .pc, .pcbr, .eitr, .irr, .dr,
    .pc_next(p_pc), .rr_postp(p_rr), .jpc(jpc_unused)
  );

  assign busy = (state != S_IDLE);
  assign pc_o = pc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
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
    end else begin
      if (busy) steps <= steps + 32'd1;
      unique case (state)
        S_IDLE:
          if (start) begin
            state      <= S_FETCH;
            done       <= 1'b0;
            terminated <= 1'b0;
            deadlock   <= 1'b0;
            steps      <= '0;
            pcbr       <= pcbr_in;
            pc         <= '0;
          end
        S_FETCH: begin
          pc       <= f_pc;
          ir       <= f_ir;
          rr_fetch <= f_rr;
          if (f_rr) state <= S_PREP;
          else begin
            state    <= S_IDLE;
            done     <= 1'b1;
            deadlock <= 1'b1;
          end
        end
        S_PREP: begin
          ditr    <= d_ditr;
          bar     <= d_bar;
          dr      <= d_dr;
          rr_prep <= 1'b1;
          state   <= S_EXEC;
        end
        S_EXEC: begin
          eitr    <= x_eitr;
          irr     <= x_irr;
          rr_exec <= 1'b1;
          state   <= S_POSTP;
        end
        S_POSTP: begin
          pc       <= p_pc;
          rr_postp <= p_rr;
          if (p_rr) state <= S_FETCH;
          else begin
            state      <= S_IDLE;
            done       <= 1'b1;
            terminated <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
