// pga_exec: the execute operation O_exec.
//
// Combinational. If the decoded instruction performs a basic action (opc: a
// void basic instruction, a test or a conditional jump) the action in bar is
// requested from the machine through the basic action interface, and the
// machine's reply becomes the new instruction reply irr; otherwise no action
// is requested and irr becomes T. The type moves on from ditr to eitr. isc
// (skip the next instruction: +a replied F or -a replied T) and cjc (the
// conditional jump is taken) are the flags the pipelined processor derives
// from this stage. enable gates the request; the caller only registers the
// outputs when enable is high. Everything here follows the design
// description.
module pga_exec
  import pga_pkg::*;
(
  input  logic    enable,
  input  itype_e  ditr,
  input  action_t bar,
  basic_action_if.proc act_bus,
  output itype_e  eitr_next,
  output logic    irr_next,
  output logic    isc,
  output logic    cjc
);

  logic opc;

  always_comb begin
    opc            = performs_action(ditr);
    act_bus.valid  = enable && opc;
    act_bus.act    = bar;
    eitr_next      = ditr;
    irr_next       = opc ? act_bus.reply : 1'b1;
    isc            = skip_reply(ditr, irr_next);
    cjc            = cjump_taken(ditr, irr_next);
  end

endmodule
