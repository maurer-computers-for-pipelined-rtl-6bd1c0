// Testbench for pga_fetch: random program counters, bounds and memory
// words (pc is incremented on every fetch); the expected pc, ir and reply are computed from the fetch rules
// with integer arithmetic.
`include "tb_util.svh"
module tb_pga_fetch;
  import pga_pkg::*;
  int checks = 0, failures = 0;
  pc_t pc; paddr_t pcbr, mem_addr; instr_t mem_rdata, ir_next; pc_t pc_next; logic rr;

  pga_fetch dut (.pc, .pcbr, .mem_addr, .mem_rdata, .pc_next, .ir_next, .rr_fetch(rr));

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      int p, b, exp_pc;
      p = (i < 7) ? 250 + i : $urandom_range(0, 2**PA_W);
      b = (i % 7 == 0 && p < 2**PA_W) ? p : $urandom_range(0, 2**PA_W - 1);
      pc = pc_t'(p); pcbr = paddr_t'(b);
      mem_rdata = instr_t'({$urandom, $urandom});
      #1;
      exp_pc = p + 1;
      `CHECK(mem_addr == paddr_t'(p % 2**PA_W), "mem_addr")
      `CHECK(int'(pc_next) == exp_pc, "pc_next")
      `CHECK(rr == (p <= b), "rr_fetch")
      if (p <= b) `CHECK(ir_next == mem_rdata, $sformatf("ir fetched %h %h p=%0d b=%0d", ir_next, mem_rdata, p, b))
      else        `CHECK(ir_next.itype == IT_FJMP && ir_next.disp == 0, "ir = #0 beyond program")
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
