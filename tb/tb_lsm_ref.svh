// Reference model of the strict load/store machine for the testbenches
// (K = 8, L = 16, M = 64, U = 2, V = 2): performs one basic action on plain
// integer arrays and returns its reply.
`ifndef TB_LSM_REF_SVH
`define TB_LSM_REF_SVH
class lsm_ref;
  int unsigned r [4];
  int unsigned la [2], ld [2], sa [2], sd [2];
  int unsigned mem [256];

  function new();
    foreach (r[i]) r[i] = 0;
    foreach (la[i]) begin la[i] = 0; ld[i] = 0; sa[i] = 0; sd[i] = 0; end
    foreach (mem[i]) mem[i] = 0;
  endfunction

  // Returns the reply of action (op, ra, rb, imm) and updates the state.
  function bit perform(int op, int ra, int rb, int imm);
    int unsigned x, y;
    x = r[ra]; y = r[rb];
    case (op)
      1:  begin if (ra < 2) ld[ra] = mem[la[ra]]; return 1; end
      2:  begin if (ra < 2) mem[sa[ra]] = sd[ra]; return 1; end
      3:  begin r[ra] = imm; return 1; end
      4:  begin r[ra] = (rb < 2) ? ld[rb] : 0; return 1; end
      5:  begin if (ra < 2) la[ra] = y & 8'hff; return 1; end
      6:  begin if (ra < 2) sa[ra] = y & 8'hff; return 1; end
      7:  begin if (ra < 2) sd[ra] = y; return 1; end
      8:  begin r[ra] = (x + y) & 16'hffff; return 1; end
      9:  begin r[ra] = (x - y) & 16'hffff; return 1; end
      10: begin r[ra] = (x + 1) & 16'hffff; return 1; end
      11: begin r[ra] = (x - 1) & 16'hffff; return r[ra] != 0; end
      12: return x == 0;
      13: return x < y;
      default: return 1;
    endcase
  endfunction

  function logic [63:0] ou();
    return {r[3][15:0], r[2][15:0], r[1][15:0], r[0][15:0]};
  endfunction
endclass
`endif
