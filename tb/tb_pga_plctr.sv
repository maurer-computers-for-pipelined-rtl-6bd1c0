// Testbench for pga_plctr: all 2**10 combinations of pipeline status,
// replies and flags, checked against the plsu, ru and halt equations.
`include "tb_util.svh"
module tb_pga_plctr;
  import pga_pkg::*;
  int checks = 0, failures = 0;
  plsr_t plsr, nx; logic rf, rp, jdf, isf, jpf, cjf, ru, hr;

  pga_plctr dut (.plsr, .rr_fetch(rf), .rr_postp(rp), .jdf, .isf, .jpf, .cjf,
                 .plsr_next(nx), .ru, .halt_reply(hr));

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 1024; i++) begin
      logic ef, ep, ee, eo;
      {plsr, rf, rp, jdf, isf, jpf, cjf} = 10'(i);
      #1;
      ef = rf & ((plsr.fetchst & ~jdf & ~cjf) | isf | jpf);
      ep = rf & ((plsr.fetchst & ~jdf & ~cjf) | isf);
      ee = plsr.prepst & ~isf & ~cjf;
      eo = plsr.execst;
      `CHECK(nx.fetchst == ef, "fetchst")
      `CHECK(nx.prepst == ep, "prepst")
      `CHECK(nx.execst == ee, "execst")
      `CHECK(nx.postpst == eo, "postpst")
      `CHECK(ru == ((ef | ep | ee | eo) & rp), "ru")
      `CHECK(hr == !rp, "halt reply")
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
