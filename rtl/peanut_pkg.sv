// peanut_pkg: types and constants shared by the PeANUt computer.
//
// The PeANUt is a 16-bit teaching computer with a 1024-word memory. This
// package fixes the word and address widths, the layout of the program status
// word (condition codes in bits 15-10, program counter in bits 9-0), the
// instruction layout (mode in bits 15-13, opcode in bits 12-10, operand
// specifier in bits 9-0), the addressing-mode codes, the steps of the
// execution cycle and the bundle of control signals the control unit drives.
//
// Mode codes 000 immediate, 001 direct, 010 indirect, 011 indexed and
// 100 stack, and the PSW split, follow the PeANUt definition. The opcode value
// of LOAD (001) is the only opcode this design knows; the other opcodes are
// not defined here. The split of the instruction word into 3 + 3 + 10 bits is
// read from example instruction words of LOAD in the three modes.
package peanut_pkg;

  localparam int unsigned DW = 16;    // word width: every register and memory cell
  localparam int unsigned AW = 10;    // address width: 1024 cells
  localparam int unsigned CCW = 6;    // condition-code field of the PSW

  typedef logic [DW-1:0] word_t;
  typedef logic [AW-1:0] addr_t;

  // Program status word: CC in bits 15-10, PC in bits 9-0.
  typedef struct packed {
    logic [CCW-1:0] cc;
    addr_t          pc;
  } psw_t;

  typedef enum logic [2:0] {
    MODE_IMMEDIATE = 3'b000,
    MODE_DIRECT    = 3'b001,
    MODE_INDIRECT  = 3'b010,
    MODE_INDEXED   = 3'b011,   // named by the architecture, not decoded here
    MODE_STACK     = 3'b100    // named by the architecture, not decoded here
  } mode_e;

  localparam logic [2:0] OP_LOAD = 3'b001;

  // Instruction word: mode, opcode, operand specifier.
  typedef struct packed {
    logic [2:0] mode;
    logic [2:0] opcode;
    addr_t      opspec;
  } instr_t;

  // Steps of the execution cycle, one clock cycle each.
  typedef enum logic [3:0] {
    S_PC_INC    = 4'd0,  // PC <- PC + 1
    S_FETCH_MAR = 4'd1,  // MAR <- PC - 1
    S_FETCH_RD  = 4'd2,  // Read, Enable; MDR <- mem[MAR]
    S_CI        = 4'd3,  // CI <- MDR
    S_DECODE    = 4'd4,  // decode CI, choose how to evaluate the operand
    S_OP_MAR    = 4'd5,  // MAR <- opspec
    S_OP_RD     = 4'd6,  // Read, Enable; MDR <- mem[MAR]
    S_IND_MAR   = 4'd7,  // MAR <- MDR (address of the operand, indirect mode)
    S_IND_RD    = 4'd8,  // Read, Enable; MDR <- mem[MAR]
    S_EXEC      = 4'd9   // execute: AC <- operand
  } state_e;

  // Where MAR is loaded from (through the address adder).
  typedef enum logic [1:0] {
    MAR_PC_M1  = 2'd0,   // PC + (-1)
    MAR_OPSPEC = 2'd1,   // CI.opspec + 0
    MAR_MDR    = 2'd2    // MDR[9:0] + 0
  } mar_src_e;

  typedef enum logic {
    AC_FROM_IMM = 1'b0,  // sign-extended opspec
    AC_FROM_MDR = 1'b1
  } ac_src_e;

  // Control lines from the control unit to the datapath and memory.
  typedef struct packed {
    logic     pc_inc;
    logic     mar_ld;
    mar_src_e mar_src;
    logic     mem_en;
    logic     mem_rw;    // 1 = Read, 0 = Write
    logic     mdr_ld;
    logic     ci_ld;
    logic     ac_ld;
    ac_src_e  ac_src;
  } ctl_t;

  // Register contents brought out for observation.
  typedef struct packed {
    psw_t  psw;
    word_t ac;
    word_t sp;
    word_t xr;
    word_t ci;
    addr_t mar;
    word_t mdr;
  } regs_t;

  function automatic word_t sext_opspec(addr_t x);
    return {{(DW-AW){x[AW-1]}}, x};
  endfunction

endpackage
