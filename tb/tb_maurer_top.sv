// End-to-end testbench for maurer_top at its default parameters. Both
// computers get the same program and the same data and run it on their own
// load/store machines:
//   A  sum of N data words, a loop closed by a backward jump and left through
//      a test that skips it; the sum is stored to memory;
//   B  count of zero words, using a conditional jump inside the loop;
//   C  a forward jump out of the program (deadlock).
// Checked: outcome, stored results against values computed here, equal
// machine state in both computers, the non-pipelined step count (four per
// instruction, the instruction count worked out from the loop structure) and
// fewer steps for the pipelined one. Counts each pipeline mechanism (stall on
// a decoded jump, skip, restart after a jump, conditional jump, all four
// stages busy) and both outcomes; each must occur.
`include "tb_util.svh"
`include "tb_pga_ref.svh"
module tb_maurer_top;
  import lsm_pkg::*;
  localparam int N = 10;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic pl_prog_we = 0, npl_prog_we = 0, pl_start = 0, npl_start = 0;
  paddr_t pl_prog_waddr = 0, npl_prog_waddr = 0, pl_pcbr = 0, npl_pcbr = 0;
  instr_t pl_prog_wdata = '0, npl_prog_wdata = '0;
  logic pl_busy, pl_done, pl_terminated, pl_deadlock, npl_busy, npl_done, npl_terminated, npl_deadlock;
  logic [31:0] pl_steps, npl_steps;
  plsr_t pl_plsr; plflags_t pl_flags; pc_t pl_pc, npl_pc;
  logic pl_act_valid, pl_act_reply, npl_act_valid, npl_act_reply; action_t pl_act, npl_act;
  logic pl_dm_we = 0, npl_dm_we = 0; logic [7:0] pl_dm_addr = 0, npl_dm_addr = 0;
  logic [15:0] pl_dm_wdata = 0, npl_dm_wdata = 0, pl_dm_rdata, npl_dm_rdata;
  logic [63:0] pl_ou, npl_ou;
  int n_jdf = 0, n_isf = 0, n_jpf = 0, n_cjf = 0, n_full = 0, n_s = 0, n_d = 0;

  maurer_top dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) if (pl_busy) begin
    n_jdf += int'(pl_flags.jdf); n_isf += int'(pl_flags.isf);
    n_jpf += int'(pl_flags.jpf); n_cjf += int'(pl_flags.cjf);
    n_full += int'(pl_plsr == 4'b1111);
  end

  function automatic int a(op_e op, int ra = 0, int rb = 0, int imm = 0);
    lsm_action_t x;
    x = '{op: op, ra: 2'(ra), rb: 2'(rb), imm: 8'(imm)};
    return int'(x);
  endfunction

  task automatic load_both(const ref instr_t prog[$], input logic [15:0] data[N]);
    foreach (prog[i]) begin
      @(negedge clk);
      pl_prog_we = 1; pl_prog_waddr = paddr_t'(i); pl_prog_wdata = prog[i];
      npl_prog_we = 1; npl_prog_waddr = paddr_t'(i); npl_prog_wdata = prog[i];
    end
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); pl_prog_we = 0; npl_prog_we = 0;
      pl_dm_we = 1; pl_dm_addr = 8'(i); pl_dm_wdata = (i < N) ? data[i] : 16'h0;
      npl_dm_we = 1; npl_dm_addr = 8'(i); npl_dm_wdata = (i < N) ? data[i] : 16'h0;
    end
    @(negedge clk); pl_dm_we = 0; npl_dm_we = 0;
  endtask

  task automatic run_both(input int n);
    @(negedge clk); pl_start = 1; npl_start = 1; pl_pcbr = paddr_t'(n - 1); npl_pcbr = paddr_t'(n - 1);
    @(negedge clk); pl_start = 0; npl_start = 0;
    while (!(pl_done && npl_done)) @(negedge clk);
    if (pl_terminated) n_s++;
    if (pl_deadlock) n_d++;
  endtask

  task automatic read_word(input int addr, output logic [15:0] pl_v, output logic [15:0] npl_v);
    @(negedge clk); pl_dm_addr = 8'(addr); npl_dm_addr = 8'(addr); #1;
    pl_v = pl_dm_rdata; npl_v = npl_dm_rdata;
  endtask

  initial begin
    #50000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    instr_t prog[$]; logic [15:0] data[N]; logic [15:0] pv, nv; int sum, zeros, instrs;
    #22 rst_n = 1;
    for (int i = 0; i < N; i++) data[i] = (i % 3 == 1) ? 16'h0 : 16'($urandom);
    sum = 0; zeros = 0;
    for (int i = 0; i < N; i++) begin sum += data[i]; zeros += int'(data[i] == 0); end

    // A: sum loop
    prog = '{mk(IT_BSC, a(OP_SETI, 0, 0, 0)), mk(IT_BSC, a(OP_SETI, 1, 0, N)), mk(IT_BSC, a(OP_SETI, 2, 0, 0)),
             mk(IT_BSC, a(OP_TOLA, 0, 0)), mk(IT_BSC, a(OP_LOAD, 0)), mk(IT_BSC, a(OP_MOVLD, 3, 0)),
             mk(IT_BSC, a(OP_ADD, 2, 3)), mk(IT_BSC, a(OP_INC, 0)), mk(IT_PTST, a(OP_DEC, 1)),
             mk(IT_BJMP, 0, 6),
             mk(IT_BSC, a(OP_SETI, 3, 0, 200)), mk(IT_BSC, a(OP_TOSA, 0, 3)), mk(IT_BSC, a(OP_TOSD, 0, 2)),
             mk(IT_BSC, a(OP_STORE, 0)), mk(IT_TERM)};
    load_both(prog, data);
    run_both(prog.size());
    read_word(200, pv, nv);
    `CHECK(pl_terminated && npl_terminated, "A: both terminate")
    `CHECK(pv == 16'(sum) && nv == 16'(sum), $sformatf("A: sum %h / %h, expected %h", pv, nv, 16'(sum)))
    `CHECK(pl_ou == npl_ou, "A: same operating unit state")
    instrs = 3 + 7 * N - 1 + 5;
    `CHECK(npl_steps == 32'(4 * instrs), $sformatf("A: non-pipelined %0d steps, expected %0d", npl_steps, 4 * instrs))
    `CHECK(pl_steps < npl_steps, "A: pipelined takes fewer steps")
    $display("A: pipelined %0d steps, non-pipelined %0d steps", pl_steps, npl_steps);

    // B: count zeros with a conditional jump
    prog = '{mk(IT_BSC, a(OP_SETI, 0, 0, 0)), mk(IT_BSC, a(OP_SETI, 1, 0, N)), mk(IT_BSC, a(OP_SETI, 2, 0, 0)),
             mk(IT_BSC, a(OP_TOLA, 0, 0)), mk(IT_BSC, a(OP_LOAD, 0)), mk(IT_BSC, a(OP_MOVLD, 3, 0)),
             mk(IT_NCFJMP, a(OP_EQZ, 3), 2), mk(IT_BSC, a(OP_INC, 2)),
             mk(IT_BSC, a(OP_INC, 0)), mk(IT_PTST, a(OP_DEC, 1)), mk(IT_BJMP, 0, 7),
             mk(IT_BSC, a(OP_SETI, 3, 0, 201)), mk(IT_BSC, a(OP_TOSA, 0, 3)), mk(IT_BSC, a(OP_TOSD, 0, 2)),
             mk(IT_BSC, a(OP_STORE, 0)), mk(IT_TERM)};
    load_both(prog, data);
    run_both(prog.size());
    read_word(201, pv, nv);
    `CHECK(pl_terminated && npl_terminated, "B: both terminate")
    `CHECK(pv == 16'(zeros) && nv == 16'(zeros), $sformatf("B: zeros %0d / %0d, expected %0d", pv, nv, zeros))
    `CHECK(pl_ou == npl_ou, "B: same operating unit state")
    instrs = 3 + 6 * N + zeros + (N - 1) + 5;
    `CHECK(npl_steps == 32'(4 * instrs), $sformatf("B: non-pipelined %0d steps, expected %0d", npl_steps, 4 * instrs))
    `CHECK(pl_steps < npl_steps, "B: pipelined takes fewer steps")
    $display("B: pipelined %0d steps, non-pipelined %0d steps", pl_steps, npl_steps);

    // C: jump out of the program
    prog = '{mk(IT_BSC, a(OP_SETI, 0, 0, 7)), mk(IT_FJMP, 0, 3), mk(IT_BSC, a(OP_SETI, 0, 0, 9))};
    load_both(prog, data);
    run_both(prog.size());
    `CHECK(pl_deadlock && npl_deadlock, "C: both deadlock")
    `CHECK(pl_ou[15:0] == 16'd7 && npl_ou[15:0] == 16'd7, "C: only the first instruction acted")
    `CHECK(npl_steps == 32'(4 * 2 + 1), "C: non-pipelined steps")

    $display("mechanisms: stall(jdf)=%0d skip(isf)=%0d restart(jpf)=%0d cjump(cjf)=%0d full=%0d S=%0d D=%0d",
             n_jdf, n_isf, n_jpf, n_cjf, n_full, n_s, n_d);
    `CHECK(n_jdf > 0, "stall on decoded jump occurred")
    `CHECK(n_isf > 0, "skip occurred")
    `CHECK(n_jpf > 0, "restart after jump occurred")
    `CHECK(n_cjf > 0, "conditional jump taken occurred")
    `CHECK(n_full > 0, "all four stages busy occurred")
    `CHECK(n_s > 0 && n_d > 0, "termination and deadlock occurred")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
