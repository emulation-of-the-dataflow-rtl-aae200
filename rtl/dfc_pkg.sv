// dfc_pkg: shared widths, packet layouts and opcodes of the dataflow-memory
// computer.
//
// The machine keeps its whole program in a Dataflow Memory (DFM) whose
// words are "intelligent cells". A cell word is 61 bits wide and is split
// into four cell sections:
//   CS4 = {D2A[10:0], D2R}        bits 60..49
//   CS3 = {D1A[10:0], D1R}        bits 48..37
//   CS2 = {CAD[10:0], CR}         bits 36..25
//   CS1 = {OPD2, OPD1, OP, LP, D2U, D1U, D2O, D1O, CAN}  bits 24..0
// Addresses are 11 bits (2K words, 8 blocks of 256), operands are 7 bits.
// The bit positions, the result packet {OA, result} (18 bits) and the
// LU234->LU1 token {cell address, operand, type} (20 bits) follow the
// layouts the design defines. The 29-bit executable is ordered
// {OA, OPD2, OPD1, OPCODE}, which is the order the processor slices it in.
package dfc_pkg;

  localparam int unsigned AW        = 11;  // DFM address width (2K words)
  localparam int unsigned DW        = 7;   // operand / result width
  localparam int unsigned OPW       = 4;   // opcode width
  localparam int unsigned BLK_AW    = 3;   // block address = AW MSBs
  localparam int unsigned CELL_AW   = 8;   // cell index inside a block

  typedef logic [AW-1:0] addr_t;
  typedef logic [DW-1:0] data_t;

  // Opcodes (Table of the instruction set). SP and LK share 0000; what
  // makes a cell SP or LK is its LP field, not its opcode.
  typedef enum logic [OPW-1:0] {
    OP_SP  = 4'b0000,
    OP_ADD = 4'b0001,
    OP_SUB = 4'b0010,
    OP_MUL = 4'b0011,
    OP_DIV = 4'b0100,
    OP_CEQ = 4'b1000,
    OP_CNE = 4'b1001,
    OP_CGT = 4'b1010,
    OP_CLT = 4'b1011,
    OP_CGE = 4'b1100,
    OP_CLE = 4'b1101
  } opcode_e;

  // LP (loop) field values
  localparam logic [1:0] LP_NONE = 2'd0;  // ordinary instruction
  localparam logic [1:0] LP_SP   = 2'd1;  // loop entry: forward either operand
  localparam logic [1:0] LP_COND = 2'd2;  // loop conditional: keep CAN
  localparam logic [1:0] LP_LK   = 2'd3;  // lock: forward OPD1 when both present

  // Operand type in a LU234 -> LU1 token
  typedef enum logic [1:0] {
    TT_NONE   = 2'b00,
    TT_OPD1   = 2'b01,
    TT_OPD2   = 2'b10,
    TT_CLAUSE = 2'b11
  } tok_type_e;

  // CS1 section, bits 24..0 of a cell
  typedef struct packed {
    data_t      opd2;   // 24..18
    data_t      opd1;   // 17..11
    logic [3:0] op;     // 10..7
    logic [1:0] lp;     // 6..5
    logic       d2u;    // 4
    logic       d1u;    // 3
    logic       d2o;    // 2
    logic       d1o;    // 1
    logic       can;    // 0
  } cs1_t;

  // CS2/CS3/CS4 section: a source address and its "required" flag
  typedef struct packed {
    addr_t addr;
    logic  req;
  } csx_t;

  // Whole 61-bit cell word as loaded into a block
  typedef struct packed {
    csx_t cs4;  // 60..49  D2A, D2R
    csx_t cs3;  // 48..37  D1A, D1R
    csx_t cs2;  // 36..25  CAD, CR
    cs1_t cs1;  // 24..0
  } cell_t;

  // Result packet on the result bus: 17..7 originating address, 6..0 result
  typedef struct packed {
    addr_t oa;
    data_t value;
  } result_t;

  // Token from LU2/LU3/LU4 to LU1: 19..9 cell address, 8..2 operand, 1..0 type
  typedef struct packed {
    addr_t     caddr;
    data_t     value;
    tok_type_e ttype;
  } token_t;

  // Executable sent from LU1 to the instruction queue (29 bits)
  typedef struct packed {
    addr_t      oa;    // 28..18 address of the firing cell
    data_t      opd2;  // 17..11
    data_t      opd1;  // 10..4
    logic [3:0] op;    // 3..0
  } exec_t;

  localparam addr_t SEED_OA = 11'h7FF;  // seed clause originating address

endpackage
