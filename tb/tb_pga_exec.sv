// Testbench for pga_exec: every instruction type, enable and machine reply;
// checks the action request, the instruction reply (T when no action is
// performed), the skip condition and the conditional jump condition.
`include "tb_util.svh"
module tb_pga_exec;
  import pga_pkg::*;
  int checks = 0, failures = 0;
  logic enable, irr, isc, cjc; itype_e ditr, eitr; action_t bar;
  basic_action_if bus ();

  pga_exec dut (.enable, .ditr, .bar, .act_bus(bus), .eitr_next(eitr), .irr_next(irr), .isc, .cjc);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      int t; logic opc, rep, exp_irr;
      t = i % 8; enable = i[3]; rep = i[4] ^ i[6];
      ditr = itype_e'(t); bar = action_t'($urandom); bus.reply = rep;
      #1;
      opc = t inside {0, 1, 2, 4, 5};
      exp_irr = opc ? rep : 1'b1;
      `CHECK(bus.valid == (enable && opc), "valid")
      `CHECK(bus.act == bar, "act")
      `CHECK(eitr == ditr, "eitr")
      `CHECK(irr == exp_irr, "irr")
      `CHECK(isc == ((t == 1 && !exp_irr) || (t == 2 && exp_irr)), "isc")
      `CHECK(cjc == ((t == 4 && exp_irr) || (t == 5 && !exp_irr)), "cjc")
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
