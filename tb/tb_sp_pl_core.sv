// Testbench for sp_pl_core. The two example programs of the pipelining
// discussion are checked step by step: the set of enabled stages in every
// step (read off their stage-by-step tables), 12 and 8 steps, outcome and
// actions. Then random programs with every instruction type are compared
// with the reference interpreter (outcome and action sequence; never more
// steps than the non-pipelined four per instruction), counting how often
// each pipeline mechanism occurred; each must occur.
`include "tb_util.svh"
`include "tb_pga_ref.svh"
module tb_sp_pl_core;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, prog_we = 0, start = 0, busy, done, terminated, deadlock;
  paddr_t prog_waddr = 0, pcbr_in = 0; instr_t prog_wdata = '0; logic [31:0] steps; pc_t pc;
  plsr_t plsr; plflags_t flags;
  basic_action_if bus ();
  plsr_t trace[$];
  int n_jdf = 0, n_isf = 0, n_jpf = 0, n_cjf = 0, n_full = 0, n_term = 0, n_dead = 0;

  sp_pl_core dut (.clk, .rst_n, .prog_we, .prog_waddr, .prog_wdata, .start, .pcbr_in,
                  .busy, .done, .terminated, .deadlock, .steps, .plsr_o(plsr), .flags_o(flags),
                  .pc_o(pc), .act_bus(bus));
  always #5 clk = ~clk;
  `include "tb_core_common.svh"

  always @(posedge clk) if (busy) begin
    trace.push_back(plsr);
    n_jdf += int'(flags.jdf); n_isf += int'(flags.isf);
    n_jpf += int'(flags.jpf); n_cjf += int'(flags.cjf);
    n_full += int'(plsr == 4'b1111);
  end

  task automatic check_trace(input plsr_t exp[$], input string tag);
    `CHECK(trace.size() == exp.size(), $sformatf("%s: %0d steps, expected %0d", tag, trace.size(), exp.size()))
    foreach (exp[i]) if (i < trace.size())
      `CHECK(trace[i] == exp[i], $sformatf("%s: step %0d stages %b, expected %b", tag, i + 1, trace[i], exp[i]))
  endtask

  initial begin
    #40000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    instr_t prog[$]; ref_result_t r; int runs;
    r = new(); runs = 0;
    #22 rst_n = 1;
    // a; +b; #3; c; #2; d; !   with +b replying F   (stages: fetch prep exec postp)
    prog = '{mk(IT_BSC, 16'h8001), mk(IT_PTST, 16'h8000), mk(IT_FJMP, 0, 3), mk(IT_BSC, 16'h8003),
             mk(IT_FJMP, 0, 2), mk(IT_BSC, 16'h8005), mk(IT_TERM)};
    trace.delete();
    run_prog(prog);
    void'(run_ref(prog, 100, r));
    check_against_ref(prog, r, "table 11 program");
    `CHECK(steps == 12, $sformatf("table 11 program: %0d steps, expected 12", steps))
    check_trace('{4'b1000, 4'b1100, 4'b1110, 4'b1111, 4'b1101, 4'b1110,
                  4'b0011, 4'b0001, 4'b1000, 4'b1100, 4'b0010, 4'b0001}, "table 11 program");
    // a; +b; c; #3; d; e
    prog = '{mk(IT_BSC, 16'h8001), mk(IT_PTST, 16'h8000), mk(IT_BSC, 16'h8003), mk(IT_FJMP, 0, 3),
             mk(IT_BSC, 16'h8005), mk(IT_BSC, 16'h8007)};
    trace.delete();
    run_prog(prog);
    void'(run_ref(prog, 100, r));
    check_against_ref(prog, r, "table 12 program");
    `CHECK(steps == 8, $sformatf("table 12 program: %0d steps, expected 8", steps))
    check_trace('{4'b1000, 4'b1100, 4'b1110, 4'b1111, 4'b1101, 4'b0010, 4'b0001, 4'b1000},
                "table 12 program");
    // a loop closed by a backward jump at the very end: x; -y#2; \#1; !  (y replies T twice)
    while (runs < 400) begin
      random_prog(prog, $urandom_range(1, 24));
      if (!run_ref(prog, 300, r)) continue;
      runs++;
      run_prog(prog);
      begin
        int f0;
        f0 = failures;
        check_against_ref(prog, r, $sformatf("random %0d", runs));
        if (failures != f0) foreach (prog[i]) $display("  prog[%0d] = %s %0d (act %h)", i, prog[i].itype.name(), prog[i].disp, prog[i].act);
      end
      `CHECK(steps <= 4 * r.instrs + 1, $sformatf("random %0d: %0d steps for %0d instructions", runs, steps, r.instrs))
      if (terminated) n_term++; else n_dead++;
    end
    $display("mechanisms: stall(jdf)=%0d skip(isf)=%0d restart(jpf)=%0d cjump(cjf)=%0d full=%0d S=%0d D=%0d",
             n_jdf, n_isf, n_jpf, n_cjf, n_full, n_term, n_dead);
    `CHECK(n_jdf > 0 && n_isf > 0 && n_jpf > 0 && n_cjf > 0 && n_full > 0 && n_term > 0 && n_dead > 0,
           "every pipeline mechanism occurred")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
