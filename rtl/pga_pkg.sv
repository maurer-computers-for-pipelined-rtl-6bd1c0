// pga_pkg: shared types of the stored-program instruction processors.
//
// A program is a sequence of PGA primitive instructions: a void basic
// instruction a, a positive test +a, a negative test -a, a forward jump #k,
// the termination instruction !, and the extensions +a#k / -a#k (conditional
// forward jumps) and \#k (backward jump). Each instruction is stored in one
// program memory word as {itype, act, disp}: the instruction type, the basic
// action it performs and the jump displacement. The five base types and the
// two conditional jump types follow the instruction types named by the design
// description; the bit encoding, the field widths and the program memory size
// (2**PA_W words) are this implementation's choice.
package pga_pkg;

  // Program address width: the program memory holds 2**PA_W instructions.
  localparam int unsigned PA_W  = 8;
  // Width of a basic action code (the machine that executes it defines it).
  localparam int unsigned ACT_W = 16;

  typedef logic [PA_W-1:0]  paddr_t;   // a program address, MA_prog
  typedef logic [PA_W:0]    pc_t;      // program counter range, MA'_prog
  typedef logic [ACT_W-1:0] action_t;  // a basic action

  // Instruction types (the set IT).
  typedef enum logic [2:0] {
    IT_BSC    = 3'd0,  // a
    IT_PTST   = 3'd1,  // +a
    IT_NTST   = 3'd2,  // -a
    IT_FJMP   = 3'd3,  // #k
    IT_PCFJMP = 3'd4,  // +a#k
    IT_NCFJMP = 3'd5,  // -a#k
    IT_BJMP   = 3'd6,  // \#k
    IT_TERM   = 3'd7   // !
  } itype_e;

  // One stored PGA instruction.
  typedef struct packed {
    itype_e  itype;
    action_t act;
    paddr_t  disp;
  } instr_t;

  // Pipeline status register: the set of enabled pipeline stages.
  typedef struct packed {
    logic fetchst;
    logic prepst;
    logic execst;
    logic postpst;
  } plsr_t;

  // Pipeline control flags raised by one step (cleared again by O_plctr).
  typedef struct packed {
    logic jdf;   // jump or termination decoded
    logic isf;   // instruction skip
    logic jpf;   // jump post-processed
    logic cjf;   // conditional jump taken
  } plflags_t;

  localparam instr_t INSTR_JMP0 = '{itype: IT_FJMP, act: '0, disp: '0};  // #0

  // The instruction performs a basic action in the execute stage (opc).
  function automatic logic performs_action(itype_e t);
    return t inside {IT_BSC, IT_PTST, IT_NTST, IT_PCFJMP, IT_NCFJMP};
  endfunction

  // The reply of a test instruction asks to skip the next instruction.
  function automatic logic skip_reply(itype_e t, logic reply);
    return (t == IT_PTST && !reply) || (t == IT_NTST && reply);
  endfunction

  // The reply of a conditional jump asks to take the jump.
  function automatic logic cjump_taken(itype_e t, logic reply);
    return (t == IT_PCFJMP && reply) || (t == IT_NCFJMP && !reply);
  endfunction

endpackage
