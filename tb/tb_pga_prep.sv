// Testbench for pga_prep: every instruction type with random fields; the
// expected decode follows the dec function (bar kept on jumps and !, dr kept
// on non-jumps) and the jump-decoded condition.
`include "tb_util.svh"
module tb_pga_prep;
  import pga_pkg::*;
  int checks = 0, failures = 0;
  instr_t ir; action_t bar, bar_next; paddr_t dr, dr_next; itype_e ditr; logic jdc;

  pga_prep dut (.ir, .bar, .dr, .ditr_next(ditr), .bar_next, .dr_next, .jdc);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      logic has_act, has_disp;
      ir.itype = itype_e'(i % 8);
      ir.act = action_t'($urandom); ir.disp = paddr_t'($urandom);
      bar = action_t'($urandom); dr = paddr_t'($urandom);
      #1;
      has_act  = (i % 8) inside {0, 1, 2, 4, 5};
      has_disp = (i % 8) inside {3, 4, 5, 6};
      `CHECK(ditr == ir.itype, "ditr")
      `CHECK(bar_next == (has_act ? ir.act : bar), "bar")
      `CHECK(dr_next == (has_disp ? ir.disp : dr), "dr")
      `CHECK(jdc == ((i % 8) inside {3, 6, 7}), "jdc")
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
