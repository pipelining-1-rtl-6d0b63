// y86_pkg: types and constants shared by the pipelined addq processor and the
// memory stage. Instruction codes are the Y86-64 ones. Register number 0xF
// (REG_NONE) means "no register". The pipeline-register structs follow the
// naming scheme where a stage sends lower-case values (f_rA) into a register
// and the next stage receives upper-case ones (D_rA). The fields and reset
// values of fD, dE and eW come from the addq processor's register listing.
// The icode field in each register and the eM contents (icode, valE, valA)
// follow the general pipelined-processor convention.
package y86_pkg;

  typedef logic [63:0] word_t;
  typedef logic [3:0]  regid_t;

  localparam regid_t REG_NONE = 4'hF;

  typedef enum logic [3:0] {
    I_HALT   = 4'h0,
    I_NOP    = 4'h1,
    I_RRMOVQ = 4'h2,
    I_IRMOVQ = 4'h3,
    I_RMMOVQ = 4'h4,
    I_MRMOVQ = 4'h5,
    I_OPQ    = 4'h6,
    I_JXX    = 4'h7,
    I_CALL   = 4'h8,
    I_RET    = 4'h9,
    I_PUSHQ  = 4'hA,
    I_POPQ   = 4'hB
  } icode_e;

  localparam logic [3:0] FN_ADD = 4'h0;

  // fetch -> decode
  typedef struct packed {
    icode_e icode;
    regid_t rA;
    regid_t rB;
  } fD_t;

  // decode -> execute
  typedef struct packed {
    icode_e icode;
    word_t  valA;
    word_t  valB;
    regid_t dstE;
  } dE_t;

  // execute -> writeback
  typedef struct packed {
    icode_e icode;
    word_t  valE;
    regid_t dstE;
  } eW_t;

  // execute -> memory
  typedef struct packed {
    icode_e icode;
    word_t  valE;
    word_t  valA;
  } eM_t;

  localparam fD_t FD_RESET = '{icode: I_NOP, rA: REG_NONE, rB: REG_NONE};
  localparam dE_t DE_RESET = '{icode: I_NOP, valA: '0, valB: '0, dstE: REG_NONE};
  localparam eW_t EW_RESET = '{icode: I_NOP, valE: '0, dstE: REG_NONE};
  localparam eM_t EM_RESET = '{icode: I_NOP, valE: '0, valA: '0};

endpackage
