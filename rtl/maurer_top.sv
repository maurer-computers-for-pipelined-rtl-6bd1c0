// maurer_top: two stored-program computers built on the same kind of
// strict load/store machine, side by side.
//
//   pl_*   the computer with pipelined instruction processing: sp_pl_core
//          performing its basic actions on its own lsm_isa machine;
//   npl_*  the computer with non-pipelined instruction processing:
//          sp_npl_core on its own lsm_isa machine.
//
// Loaded with the same program and the same data, both end in the same
// machine state and the same outcome (terminated or deadlock); the pipelined
// one needs fewer steps. Each computer has its own program load port, data
// memory host port, run control (start with pcbr = program length - 1, then
// busy/done/terminated/deadlock and a step count) and observation outputs.
// Timing: one pipeline step per cycle for pl_*, one operation per cycle for
// npl_*. The pairing of the two computers in one top is this implementation's
// choice; their structure follows the design description.
module maurer_top
  import pga_pkg::*;
#(
  parameter int unsigned PROG_SIZE = 2**PA_W,
  parameter int unsigned K = 8,
  parameter int unsigned L = 16,
  parameter int unsigned M = 64,
  parameter int unsigned U = 2,
  parameter int unsigned V = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  // pipelined computer
  input  logic         pl_prog_we,
  input  paddr_t       pl_prog_waddr,
  input  instr_t       pl_prog_wdata,
  input  logic         pl_start,
  input  paddr_t       pl_pcbr,
  output logic         pl_busy,
  output logic         pl_done,
  output logic         pl_terminated,
  output logic         pl_deadlock,
  output logic [31:0]  pl_steps,
  output plsr_t        pl_plsr,
  output plflags_t     pl_flags,
  output pc_t          pl_pc,
  output logic         pl_act_valid,
  output action_t      pl_act,
  output logic         pl_act_reply,
  input  logic         pl_dm_we,
  input  logic [K-1:0] pl_dm_addr,
  input  logic [L-1:0] pl_dm_wdata,
  output logic [L-1:0] pl_dm_rdata,
  output logic [M-1:0] pl_ou,
  // non-pipelined computer
  input  logic         npl_prog_we,
  input  paddr_t       npl_prog_waddr,
  input  instr_t       npl_prog_wdata,
  input  logic         npl_start,
  input  paddr_t       npl_pcbr,
  output logic         npl_busy,
  output logic         npl_done,
  output logic         npl_terminated,
  output logic         npl_deadlock,
  output logic [31:0]  npl_steps,
  output pc_t          npl_pc,
  output logic         npl_act_valid,
  output action_t      npl_act,
  output logic         npl_act_reply,
  input  logic         npl_dm_we,
  input  logic [K-1:0] npl_dm_addr,
  input  logic [L-1:0] npl_dm_wdata,
  output logic [L-1:0] npl_dm_rdata,
  output logic [M-1:0] npl_ou
);

  basic_action_if pl_bus ();
  basic_action_if npl_bus ();

  sp_pl_core #(.PROG_SIZE(PROG_SIZE)) u_pl_core (
    .clk, .rst_n,
    .prog_we(pl_prog_we), .prog_waddr(pl_prog_waddr), .prog_wdata(pl_prog_wdata),
    .start(pl_start), .pcbr_in(pl_pcbr),
    .busy(pl_busy), .done(pl_done), .terminated(pl_terminated), .deadlock(pl_deadlock),
    .steps(pl_steps), .plsr_o(pl_plsr), .flags_o(pl_flags), .pc_o(pl_pc),
    .act_bus(pl_bus)
  );

  lsm_isa #(.K(K), .L(L), .M(M), .U(U), .V(V)) u_pl_mach (
    .clk, .rst_n, .act_bus(pl_bus),
    .h_we(pl_dm_we), .h_addr(pl_dm_addr), .h_wdata(pl_dm_wdata), .h_rdata(pl_dm_rdata),
    .ou_o(pl_ou)
  );

  sp_npl_core #(.PROG_SIZE(PROG_SIZE)) u_npl_core (
    .clk, .rst_n,
    .prog_we(npl_prog_we), .prog_waddr(npl_prog_waddr), .prog_wdata(npl_prog_wdata),
    .start(npl_start), .pcbr_in(npl_pcbr),
    .busy(npl_busy), .done(npl_done), .terminated(npl_terminated), .deadlock(npl_deadlock),
    .steps(npl_steps), .pc_o(npl_pc),
    .act_bus(npl_bus)
  );

  lsm_isa #(.K(K), .L(L), .M(M), .U(U), .V(V)) u_npl_mach (
    .clk, .rst_n, .act_bus(npl_bus),
    .h_we(npl_dm_we), .h_addr(npl_dm_addr), .h_wdata(npl_dm_wdata), .h_rdata(npl_dm_rdata),
    .ou_o(npl_ou)
  );

  assign pl_act_valid  = pl_bus.valid;
  assign pl_act        = pl_bus.act;
  assign pl_act_reply  = pl_bus.reply;
  assign npl_act_valid = npl_bus.valid;
  assign npl_act       = npl_bus.act;
  assign npl_act_reply = npl_bus.reply;

endmodule
