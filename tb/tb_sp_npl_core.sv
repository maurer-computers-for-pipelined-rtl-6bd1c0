// Testbench for sp_npl_core: the two example programs of the pipelining
// discussion (20 and 13 steps without pipelining), then random programs with
// every instruction type compared with the reference interpreter: outcome,
// action sequence, and four steps per instruction plus one for a final
// failing fetch.
`include "tb_util.svh"
`include "tb_pga_ref.svh"
module tb_sp_npl_core;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, prog_we = 0, start = 0, busy, done, terminated, deadlock;
  paddr_t prog_waddr = 0, pcbr_in = 0; instr_t prog_wdata = '0; logic [31:0] steps; pc_t pc;
  basic_action_if bus ();

  sp_npl_core dut (.clk, .rst_n, .prog_we, .prog_waddr, .prog_wdata, .start, .pcbr_in,
                   .busy, .done, .terminated, .deadlock, .steps, .pc_o(pc), .act_bus(bus));
  always #5 clk = ~clk;
  `include "tb_core_common.svh"

  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    instr_t prog[$]; ref_result_t r; int runs;
    r = new(); runs = 0;
    #22 rst_n = 1;
    // a; +b; #3; c; #2; d; !   with +b replying F
    prog = '{mk(IT_BSC, 16'h8001), mk(IT_PTST, 16'h8000), mk(IT_FJMP, 0, 3), mk(IT_BSC, 16'h8003),
             mk(IT_FJMP, 0, 2), mk(IT_BSC, 16'h8005), mk(IT_TERM)};
    run_prog(prog);
    void'(run_ref(prog, 100, r));
    check_against_ref(prog, r, "table 11 program");
    `CHECK(steps == 20, $sformatf("table 11 program: %0d steps, expected 20", steps))
    // a; +b; c; #3; d; e
    prog = '{mk(IT_BSC, 16'h8001), mk(IT_PTST, 16'h8000), mk(IT_BSC, 16'h8003), mk(IT_FJMP, 0, 3),
             mk(IT_BSC, 16'h8005), mk(IT_BSC, 16'h8007)};
    run_prog(prog);
    void'(run_ref(prog, 100, r));
    check_against_ref(prog, r, "table 12 program");
    `CHECK(steps == 13, $sformatf("table 12 program: %0d steps, expected 13", steps))
    while (runs < 300) begin
      random_prog(prog, $urandom_range(1, 24));
      if (!run_ref(prog, 300, r)) continue;
      runs++;
      run_prog(prog);
      check_against_ref(prog, r, $sformatf("random %0d", runs));
      `CHECK(steps == 4 * r.instrs + (r.terminated ? 0 : 1), $sformatf("random %0d: steps", runs))
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
