// Testbench for lsm_isa: loads random data through the host port, then
// performs random basic actions (loads, stores, moves and arithmetic) and
// compares every reply, the operating unit memory and finally the whole data
// memory with the reference model.
`include "tb_util.svh"
`include "tb_lsm_ref.svh"
module tb_lsm_isa;
  import lsm_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, h_we; logic [7:0] h_addr; logic [15:0] h_wdata, h_rdata; logic [63:0] ou;
  basic_action_if bus ();
  lsm_ref ref_m = new();
  int n_load = 0, n_store = 0;

  lsm_isa dut (.clk, .rst_n, .act_bus(bus), .h_we, .h_addr, .h_wdata, .h_rdata, .ou_o(ou));
  always #5 clk = ~clk;

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    bus.valid = 0; bus.act = '0; h_we = 0; h_addr = 0; h_wdata = 0;
    #12 rst_n = 1;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); h_we = 1; h_addr = 8'(i); h_wdata = 16'($urandom); ref_m.mem[i] = h_wdata;
    end
    @(negedge clk); h_we = 0;
    for (int i = 0; i < 5000; i++) begin
      int op; lsm_action_t a; bit exp_reply;
      @(negedge clk);
      op = (i < 8) ? 3 : $urandom_range(0, 15);
      a = '{op: op_e'(op), ra: 2'($urandom), rb: 2'($urandom), imm: 8'($urandom)};
      bus.valid = ($urandom_range(0, 5) != 0); bus.act = a;
      #1;
      if (bus.valid) begin
        exp_reply = ref_m.perform(op, a.ra, a.rb, a.imm);
        `CHECK(bus.reply == exp_reply, $sformatf("reply op=%0d", op))
        if (op == 1) n_load++;
        if (op == 2) n_store++;
      end
      @(posedge clk); #1;
      `CHECK(ou == ref_m.ou(), "operating unit memory")
    end
    @(negedge clk); bus.valid = 0;
    for (int i = 0; i < 256; i++) begin
      h_addr = 8'(i); #1;
      `CHECK(h_rdata == 16'(ref_m.mem[i]), $sformatf("data word %0d", i))
    end
    `CHECK(n_load > 50 && n_store > 50, "loads and stores exercised")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
