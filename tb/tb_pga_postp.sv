// Testbench for pga_postp in both forms. Random pc, bound, type, reply and
// displacement; the expected pc is computed case by case from the pcu
// (non-pipelined) and pcu' (pipelined) definitions with integers, plus the
// backward jump rule of this implementation (target pc-1-k or pc-2-k).
// A target below address 0 cannot occur in a running processor (pc has
// moved past the jump), but the inputs here are random: like a target past
// pcbr, it is expected to leave the program (pc = pcbr + 1).
`include "tb_util.svh"
module tb_pga_postp;
  import pga_pkg::*;
  int checks = 0, failures = 0;
  pc_t pc, pc_n0, pc_n1; paddr_t pcbr, dr; itype_e eitr; logic irr, rr0, rr1, jpc0, jpc1;

  pga_postp #(.PIPELINED(1'b0)) dut_npl (.pc, .pcbr, .eitr, .irr, .dr, .pc_next(pc_n0), .rr_postp(rr0), .jpc(jpc0));
  pga_postp #(.PIPELINED(1'b1)) dut_pl  (.pc, .pcbr, .eitr, .irr, .dr, .pc_next(pc_n1), .rr_postp(rr1), .jpc(jpc1));

  // pcu / pcu' written out per instruction type
  function automatic int ref_pc(bit pipelined, int p, int b, int t, bit r, int d);
    int tgt;
    case (t)
      0, 7: return p;                                   // a, !
      1, 2: begin                                       // +a, -a
        if (pipelined) return p;
        if ((t == 1 && r) || (t == 2 && !r)) return p;
        return (p + 1 <= b) ? p + 1 : b + 1;
      end
      3: begin                                          // #k
        tgt = p - (pipelined ? 2 : 1) + d;
        return (d != 0 && tgt >= 0 && tgt <= b) ? tgt : b + 1;
      end
      4, 5: begin                                       // +a#k, -a#k
        if ((t == 4 && !r) || (t == 5 && r)) return p;
        tgt = p - (pipelined ? 3 : 1) + d;
        return (d != 0 && tgt >= 0 && tgt <= b) ? tgt : b + 1;
      end
      default: begin                                    // \#k
        tgt = p - (pipelined ? 2 : 1) - d;
        return (d != 0 && tgt >= 0 && tgt <= b) ? tgt : b + 1;
      end
    endcase
  endfunction

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 6000; i++) begin
      int p, b, d, t; bit r, jmp;
      b = $urandom_range(0, 2**PA_W - 1);
      p = $urandom_range(0, b + 1);
      d = (i % 11 == 0) ? 0 : $urandom_range(0, (i % 3 == 0) ? 2**PA_W - 1 : 8);
      t = i % 8; r = $urandom_range(0, 1);
      pc = pc_t'(p); pcbr = paddr_t'(b); dr = paddr_t'(d); eitr = itype_e'(t); irr = r;
      #1;
      jmp = (t == 3 || t == 6 || (t == 4 && r) || (t == 5 && !r));
      `CHECK(int'(pc_n0) == ref_pc(0, p, b, t, r, d), $sformatf("npl pc t=%0d p=%0d b=%0d d=%0d r=%0d", t, p, b, d, r))
      `CHECK(int'(pc_n1) == ref_pc(1, p, b, t, r, d), $sformatf("pl pc t=%0d p=%0d b=%0d d=%0d r=%0d", t, p, b, d, r))
      `CHECK(rr0 == (t != 7) && rr1 == (t != 7), "rr_postp")
      `CHECK(jpc1 == jmp, "jpc")
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
