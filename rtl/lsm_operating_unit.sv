// lsm_operating_unit: operating unit of the strict load/store machine.
//
// Holds the operating unit memory M_ou (M bits, used as M/L registers
// R[0..M/L-1] of L bits) and performs the data manipulation actions A' of
// lsm_pkg: immediate set, add, subtract, increment, decrement, compare, and
// the moves that connect the operating unit to the load and store registers.
// As the description requires of A', the actions read only M_ou and the load
// data registers (ld_i), and write only M_ou, the store data registers, the
// load address registers and the store address registers; the writes to the
// last three are requested from the enclosing machine through the *_we
// outputs. The reply is combinational in the cycle of the action (en high);
// M_ou changes at the following clock edge. The description leaves A' open:
// the particular actions, their replies and the register view of M_ou are
// this implementation's choices. M_ou is cleared by reset.
module lsm_operating_unit
  import lsm_pkg::*;
#(
  parameter int unsigned K = 8,    // address width
  parameter int unsigned L = 16,   // word length
  parameter int unsigned M = 64,   // bits of operating unit memory
  parameter int unsigned U = 2,    // load register pairs
  parameter int unsigned V = 2     // store register pairs
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  lsm_action_t       act,
  input  logic [U-1:0][L-1:0] ld_i,
  output logic              reply,
  // requested writes to the load/store registers
  output logic              la_we,
  output logic              sa_we,
  output logic              sd_we,
  output logic [1:0]        lsr_idx,
  output logic [L-1:0]      lsr_wdata,
  // operating unit memory, for observation
  output logic [M-1:0]      ou_o
);

  localparam int unsigned NREG = M / L;

  logic [NREG-1:0][L-1:0] r, r_next;
  logic [L-1:0] ra_val, rb_val, res;
  logic         wr;

  initial assert (NREG >= 1 && NREG <= 4 && U >= 1 && U <= 4 && V >= 1 && V <= 4 && K <= L)
    else $error("lsm_operating_unit: unsupported K/L/M/U/V");

  always_comb begin
    ra_val    = (32'(act.ra) < NREG) ? r[act.ra] : '0;
    rb_val    = (32'(act.rb) < NREG) ? r[act.rb] : '0;
    res       = ra_val;
    wr        = 1'b0;
    reply     = 1'b1;
    la_we     = 1'b0;
    sa_we     = 1'b0;
    sd_we     = 1'b0;
    lsr_idx   = act.ra;
    lsr_wdata = rb_val;
    unique case (act.op)
      OP_SETI:  begin res = L'(act.imm); wr = 1'b1; end
      OP_MOVLD: begin res = (32'(act.rb) < U) ? ld_i[act.rb] : '0; wr = 1'b1; end
      OP_TOLA:  la_we = en && 32'(act.ra) < U;
      OP_TOSA:  sa_we = en && 32'(act.ra) < V;
      OP_TOSD:  sd_we = en && 32'(act.ra) < V;
      OP_ADD:   begin res = ra_val + rb_val; wr = 1'b1; end
      OP_SUB:   begin res = ra_val - rb_val; wr = 1'b1; end
      OP_INC:   begin res = ra_val + L'(1);  wr = 1'b1; end
      OP_DEC:   begin res = ra_val - L'(1);  wr = 1'b1; reply = (res != '0); end
      OP_EQZ:   reply = (ra_val == '0);
      OP_LT:    reply = (ra_val < rb_val);
      default:  ;
    endcase
    r_next = r;
    if (en && wr && 32'(act.ra) < NREG) r_next[act.ra] = res;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) r <= '0;
    else        r <= r_next;

  assign ou_o = M'(r);

endmodule
