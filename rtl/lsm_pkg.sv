// lsm_pkg: basic action encoding of the strict load/store machine.
//
// The design description defines the load:n and store:n actions exactly and
// leaves the set A' of data manipulation actions open (only their input and
// output regions are constrained). The opcode list below, and the packing of
// an action into pga_pkg::ACT_W = 16 bits as {op[3:0], ra[1:0], rb[1:0],
// imm[7:0]}, is this implementation's choice. The operating unit memory is
// used as M/L registers R[0..]; ra and rb select registers or load/store
// register pairs.
package lsm_pkg;

  typedef enum logic [3:0] {
    OP_NOP   = 4'd0,   // no change, reply T
    OP_LOAD  = 4'd1,   // load:ra   ld[ra] := Mdata[la[ra]], reply T
    OP_STORE = 4'd2,   // store:ra  Mdata[sa[ra]] := sd[ra], reply T
    OP_SETI  = 4'd3,   // R[ra] := imm, reply T
    OP_MOVLD = 4'd4,   // R[ra] := ld[rb], reply T
    OP_TOLA  = 4'd5,   // la[ra] := R[rb], reply T
    OP_TOSA  = 4'd6,   // sa[ra] := R[rb], reply T
    OP_TOSD  = 4'd7,   // sd[ra] := R[rb], reply T
    OP_ADD   = 4'd8,   // R[ra] := R[ra] + R[rb], reply T
    OP_SUB   = 4'd9,   // R[ra] := R[ra] - R[rb], reply T
    OP_INC   = 4'd10,  // R[ra] := R[ra] + 1, reply T
    OP_DEC   = 4'd11,  // R[ra] := R[ra] - 1, reply (result != 0)
    OP_EQZ   = 4'd12,  // reply (R[ra] == 0)
    OP_LT    = 4'd13   // reply (R[ra] < R[rb])
  } op_e;

  typedef struct packed {
    op_e        op;
    logic [1:0] ra;
    logic [1:0] rb;
    logic [7:0] imm;
  } lsm_action_t;

endpackage
