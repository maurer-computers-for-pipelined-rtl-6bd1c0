// basic_action_if: the link between an instruction processor's execute
// operation and the machine whose basic actions it performs (bar -> O_a,
// reply -> irr in the structure figures).
//
// In a cycle with valid high the machine performs action act at the next
// clock edge and drives reply combinationally in the same cycle, so that the
// execute stage can store it in its instruction reply register at that edge.
// One action completes per cycle; there is no back-pressure.
interface basic_action_if;
  import pga_pkg::*;

  logic    valid;
  action_t act;
  logic    reply;

  modport proc (output valid, output act, input reply);
  modport mach (input valid, input act, output reply);
endinterface
