// lsm_isa: a strict load/store Maurer instruction set architecture machine,
// the machine whose basic actions the instruction processors perform.
//
// State: data memory (lsm_data_mem, 2**K words of L bits), the operating
// unit memory (inside lsm_operating_unit), U pairs of load address/data
// registers (la, ld) and V pairs of store address/data registers (sa, sd).
// Basic actions arrive on act_bus, one per cycle, and take effect at the
// clock edge that ends the cycle; the reply is combinational:
//   load:n   ld[n] := Mdata[la[n]]          reply T
//   store:n  Mdata[sa[n]] := sd[n]          reply T
//   other    an action of A' performed by the operating unit.
// Only the load data registers feed the operating unit; only the operating
// unit writes la, sa and sd. This separation, the load and store semantics
// and the parameters k, l, m, u, v follow the description; the parameter
// values (K=8, L=16, M=64, U=2, V=2) and the action encoding are this
// implementation's choices. The host port reads and writes the data memory.
module lsm_isa
  import lsm_pkg::*;
#(
  parameter int unsigned K = 8,    // address width
  parameter int unsigned L = 16,   // word length
  parameter int unsigned M = 64,   // operating unit memory bits
  parameter int unsigned U = 2,    // load register pairs
  parameter int unsigned V = 2     // store register pairs
) (
  input  logic         clk,
  input  logic         rst_n,
  basic_action_if.mach act_bus,
  // host access to the data memory
  input  logic         h_we,
  input  logic [K-1:0] h_addr,
  input  logic [L-1:0] h_wdata,
  output logic [L-1:0] h_rdata,
  // operating unit memory, for observation
  output logic [M-1:0] ou_o
);

  lsm_action_t a;
  logic [U-1:0][K-1:0] la;
  logic [U-1:0][L-1:0] ld;
  logic [V-1:0][K-1:0] sa;
  logic [V-1:0][L-1:0] sd;

  logic         is_load, is_store, ou_en, ou_reply;
  logic         la_we, sa_we, sd_we;
  logic [1:0]   lsr_idx;
  logic [L-1:0] lsr_wdata, m_rdata;
  logic [K-1:0] m_raddr, m_waddr;

  always_comb begin
    a        = lsm_action_t'(act_bus.act);
    is_load  = act_bus.valid && a.op == OP_LOAD  && 32'(a.ra) < U;
    is_store = act_bus.valid && a.op == OP_STORE && 32'(a.ra) < V;
    ou_en    = act_bus.valid && !(a.op inside {OP_LOAD, OP_STORE});
    m_raddr  = (32'(a.ra) < U) ? la[a.ra] : '0;
    m_waddr  = (32'(a.ra) < V) ? sa[a.ra] : '0;
    act_bus.reply = (a.op inside {OP_LOAD, OP_STORE}) ? 1'b1 : ou_reply;
  end

  lsm_data_mem #(.K(K), .L(L)) u_mdata (
    .clk,
    .raddr(m_raddr), .rdata(m_rdata),
    .we(is_store), .waddr(m_waddr), .wdata((32'(a.ra) < V) ? sd[a.ra] : '0),
    .h_we, .h_addr, .h_wdata, .h_rdata
  );

  lsm_operating_unit #(.K(K), .L(L), .M(M), .U(U), .V(V)) u_ou (
    .clk, .rst_n, .en(ou_en), .act(a), .ld_i(ld), .reply(ou_reply),
    .la_we, .sa_we, .sd_we, .lsr_idx, .lsr_wdata, .ou_o
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      la <= '0;
      ld <= '0;
      sa <= '0;
      sd <= '0;
    end else begin
      if (is_load) ld[a.ra]  <= m_rdata;
      if (la_we)   la[lsr_idx] <= lsr_wdata[K-1:0];
      if (sa_we)   sa[lsr_idx] <= lsr_wdata[K-1:0];
      if (sd_we)   sd[lsr_idx] <= lsr_wdata;
    end
  end

endmodule
