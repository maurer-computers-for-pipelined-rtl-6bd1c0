// Testbench for lsm_operating_unit: random data manipulation actions, with
// random enables and load data, compared with the reference model for the
// reply, the requested load/store register writes and the operating unit
// memory after each clock edge.
`include "tb_util.svh"
`include "tb_lsm_ref.svh"
module tb_lsm_operating_unit;
  import lsm_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en, reply, la_we, sa_we, sd_we;
  lsm_action_t act; logic [1:0][15:0] ld_i; logic [1:0] idx; logic [15:0] wd; logic [63:0] ou;
  lsm_ref ref_m = new();

  lsm_operating_unit dut (.clk, .rst_n, .en, .act, .ld_i, .reply, .la_we, .sa_we, .sd_we,
                          .lsr_idx(idx), .lsr_wdata(wd), .ou_o(ou));
  always #5 clk = ~clk;

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    en = 0; act = '0; ld_i = '0;
    #12 rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      int op; bit exp_reply;
      @(negedge clk);
      op = (i < 20) ? 3 : $urandom_range(3, 15);
      act = '{op: op_e'(op), ra: 2'($urandom), rb: 2'($urandom), imm: 8'($urandom)};
      en = ($urandom_range(0, 7) != 0);
      ld_i = {16'($urandom), 16'($urandom)};
      ref_m.ld[0] = ld_i[0]; ref_m.ld[1] = ld_i[1];
      #1;
      if (en) begin
        exp_reply = ref_m.perform(op, act.ra, act.rb, act.imm);
        `CHECK(reply == exp_reply, $sformatf("reply op=%0d", op))
        `CHECK(la_we == (op == 5 && act.ra < 2), "la_we")
        `CHECK(sa_we == (op == 6 && act.ra < 2), "sa_we")
        `CHECK(sd_we == (op == 7 && act.ra < 2), "sd_we")
        if (op inside {5, 6, 7} && act.ra < 2)
          `CHECK(wd == 16'(ref_m.r[act.rb]) && idx == act.ra, "register write data")
      end else
        `CHECK(!la_we && !sa_we && !sd_we, "no writes when idle")
      @(posedge clk); #1;
      `CHECK(ou == ref_m.ou(), "operating unit memory")
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
