// Common body of the two processor testbenches: a stand-in machine that
// records the actions performed, and tasks to load and run a program.
// Expects: clk, rst_n, bus (basic_action_if), prog_we/waddr/wdata, start,
// pcbr_in, busy, done, terminated, deadlock, steps.
`ifndef TB_CORE_COMMON_SVH
`define TB_CORE_COMMON_SVH
  action_t seen[$];
  assign bus.reply = reply_of(bus.act, seen.size());
  always @(posedge clk) if (bus.valid) seen.push_back(bus.act);

  task automatic load_prog(const ref instr_t prog[$]);
    foreach (prog[i]) begin
      @(negedge clk); prog_we = 1; prog_waddr = paddr_t'(i); prog_wdata = prog[i];
    end
    @(negedge clk); prog_we = 0;
  endtask

  task automatic run_prog(const ref instr_t prog[$]);
    load_prog(prog);
    seen.delete();
    @(negedge clk); start = 1; pcbr_in = paddr_t'(prog.size() - 1);
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
  endtask

  // Compare a finished run with the reference interpreter.
  task automatic check_against_ref(const ref instr_t prog[$], input ref_result_t r, input string tag);
    `CHECK(terminated == r.terminated && deadlock == !r.terminated, {tag, ": outcome"})
    `CHECK(seen.size() == r.acts.size(), $sformatf("%s: %0d actions, expected %0d", tag, seen.size(), r.acts.size()))
    foreach (r.acts[i]) if (i < seen.size()) `CHECK(seen[i] == r.acts[i], {tag, ": action"})
  endtask
`endif
