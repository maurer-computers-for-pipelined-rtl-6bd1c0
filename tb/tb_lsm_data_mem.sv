// Testbench for lsm_data_mem: random host and machine writes against a
// model array, reads through both ports, and the write priority on a
// same-word conflict.
`include "tb_util.svh"
module tb_lsm_data_mem;
  localparam int K = 8, L = 16;
  int checks = 0, failures = 0;
  logic clk = 0, we, h_we;
  logic [K-1:0] raddr, waddr, h_addr; logic [L-1:0] rdata, wdata, h_wdata, h_rdata;
  logic [L-1:0] model [2**K];

  lsm_data_mem #(.K(K), .L(L)) dut (.clk, .raddr, .rdata, .we, .waddr, .wdata, .h_we, .h_addr, .h_wdata, .h_rdata);
  always #5 clk = ~clk;

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    we = 0; h_we = 0; raddr = 0; waddr = 0; h_addr = 0; wdata = 0; h_wdata = 0;
    for (int i = 0; i < 2**K; i++) begin
      @(negedge clk); h_we = 1; h_addr = K'(i); h_wdata = L'($urandom); model[i] = h_wdata;
    end
    @(negedge clk); h_we = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      we = $urandom_range(0, 1); h_we = $urandom_range(0, 1);
      waddr = K'($urandom); wdata = L'($urandom);
      h_addr = (i % 5 == 0) ? waddr : K'($urandom); h_wdata = L'($urandom);
      raddr = K'($urandom); #1;
      `CHECK(rdata == model[raddr], "machine read")
      `CHECK(h_rdata == model[h_addr], "host read")
      if (h_we && !(we && waddr == h_addr)) model[h_addr] = h_wdata;
      if (we) model[waddr] = wdata;
    end
    @(negedge clk); we = 0; h_we = 0;
    for (int i = 0; i < 2**K; i++) begin
      h_addr = K'(i); #1;
      `CHECK(h_rdata == model[i], "final contents")
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
