// Testbench for pga_prog_mem: fills the memory with random instructions,
// then reads every word back and compares with a copy kept in the bench.
`include "tb_util.svh"
module tb_pga_prog_mem;
  import pga_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, we; paddr_t waddr, raddr; instr_t wdata, rdata;
  instr_t shadow [2**PA_W];

  pga_prog_mem dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);
  always #5 clk = ~clk;

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    we = 0; waddr = 0; wdata = '0; raddr = 0;
    for (int i = 0; i < 2**PA_W; i++) begin
      @(negedge clk); we = 1; waddr = paddr_t'(i); wdata = instr_t'({$urandom, $urandom}); shadow[i] = wdata;
    end
    for (int i = 0; i < 300; i++) begin
      // random overwrite while reading another address
      @(negedge clk); we = 1; waddr = paddr_t'($urandom); wdata = instr_t'({$urandom, $urandom});
      shadow[waddr] = wdata;
      raddr = paddr_t'($urandom); #1;
      if (raddr != waddr) `CHECK(rdata == shadow[raddr], "read during write")
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 2**PA_W; i++) begin
      raddr = paddr_t'(i); #1;
      `CHECK(rdata == shadow[i], $sformatf("word %0d", i))
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
