// Reference material for the processor testbenches: instruction builders,
// the reply rule of the stand-in machine, and an interpreter that runs a
// PGA program by its instruction-sequence meaning (position in the
// sequence, skip, jump, !), independent of pc/pcbr arithmetic.
`ifndef TB_PGA_REF_SVH
`define TB_PGA_REF_SVH
import pga_pkg::*;

function automatic instr_t mk(itype_e t, int act = 0, int k = 0);
  instr_t i;
  i.itype = t; i.act = action_t'(act); i.disp = paddr_t'(k);
  return i;
endfunction

// Reply of the stand-in machine to the n-th action performed (n from 0).
// Actions with bit 15 set reply with their bit 0; others with a hash.
function automatic logic reply_of(action_t a, int n);
  if (a[15]) return a[0];
  return ^(32'(a) * 32'h9E3779B1 ^ (n * 32'h85EBCA77 + 32'd12345));
endfunction

class ref_result_t;
  bit   terminated;     // 1: S, 0: D
  int   instrs;         // instructions processed
  action_t acts[$];     // actions performed, in order
endclass

// Returns 0 when the run exceeds max_instrs instructions.
function automatic bit run_ref(const ref instr_t prog[$], input int max_instrs, input ref_result_t res);
  int pos = 0;
  res.terminated = 0; res.instrs = 0; res.acts.delete();
  forever begin
    instr_t u; logic r;
    if (pos < 0 || pos >= prog.size()) return 1;   // nothing to fetch: D
    if (res.instrs >= max_instrs) return 0;
    u = prog[pos];
    res.instrs++;
    r = 1'b1;
    if (u.itype inside {IT_BSC, IT_PTST, IT_NTST, IT_PCFJMP, IT_NCFJMP}) begin
      r = reply_of(u.act, res.acts.size());
      res.acts.push_back(u.act);
    end
    case (u.itype)
      IT_BSC:    pos += 1;
      IT_PTST:   pos += r ? 1 : 2;
      IT_NTST:   pos += r ? 2 : 1;
      IT_FJMP:   if (u.disp == 0) return 1; else pos += int'(u.disp);
      IT_BJMP:   if (u.disp == 0) return 1; else pos -= int'(u.disp);
      IT_PCFJMP: if (!r) pos += 1; else if (u.disp == 0) return 1; else pos += int'(u.disp);
      IT_NCFJMP: if (r) pos += 1; else if (u.disp == 0) return 1; else pos += int'(u.disp);
      IT_TERM:   begin res.terminated = 1; return 1; end
    endcase
  end
endfunction

// A random program of n instructions. No jump of any kind directly follows
// a conditional jump, and no conditional jump is next-to-last: in those
// places the pipelined processor keeps known departures from the sequence
// semantics (see its notes).
function automatic void random_prog(ref instr_t prog[$], input int n);
  prog.delete();
  for (int i = 0; i < n; i++) begin
    int w; itype_e t; bit after_cj;
    after_cj = (i > 0) && prog[i-1].itype inside {IT_PCFJMP, IT_NCFJMP};
    w = $urandom_range(0, 99);
    if      (w < 30) t = IT_BSC;
    else if (w < 45) t = IT_PTST;
    else if (w < 60) t = IT_NTST;
    else if (w < 72) t = IT_FJMP;
    else if (w < 80) t = IT_PCFJMP;
    else if (w < 88) t = IT_NCFJMP;
    else if (w < 94) t = IT_BJMP;
    else             t = IT_TERM;
    if (after_cj && t inside {IT_FJMP, IT_BJMP, IT_PCFJMP, IT_NCFJMP}) t = IT_BSC;
    if (i == n - 2 && t inside {IT_PCFJMP, IT_NCFJMP}) t = IT_NTST;
    prog.push_back(mk(t, $urandom_range(0, 16'h7fff), $urandom_range(0, 4)));
  end
endfunction
`endif
