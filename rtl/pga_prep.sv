// pga_prep: the pre-process (decode) operation O_prep.
//
// Combinational. Splits the instruction in ir into its type (ditr), its basic
// action (bar) and its displacement (dr). As in the design description, bar
// is only overwritten by instructions that perform a basic action and dr only
// by instructions that jump; otherwise they keep their old contents. jdc is
// the jump-decoded condition used by the pipelined processor to stall fetch:
// the decoded instruction is an unconditional jump or the termination
// instruction. Backward jumps are treated like forward jumps here; that
// detail is this implementation's reading of the description, which only
// says that both kinds of jump are handled the same way.
module pga_prep
  import pga_pkg::*;
(
  input  instr_t  ir,
  input  action_t bar,
  input  paddr_t  dr,
  output itype_e  ditr_next,
  output action_t bar_next,
  output paddr_t  dr_next,
  output logic    jdc
);

  always_comb begin
    ditr_next = ir.itype;
    bar_next  = bar;
    dr_next   = dr;
    unique case (ir.itype)
      IT_BSC, IT_PTST, IT_NTST: bar_next = ir.act;
      IT_FJMP, IT_BJMP:         dr_next  = ir.disp;
      IT_PCFJMP, IT_NCFJMP: begin
        bar_next = ir.act;
        dr_next  = ir.disp;
      end
      IT_TERM: ;
    endcase
    jdc = ir.itype inside {IT_FJMP, IT_BJMP, IT_TERM};
  end

endmodule
