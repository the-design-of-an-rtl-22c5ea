// Shared types and constants of the array processor.
//
// The array processor is a square array of one-bit logical modules driven by a master
// control. This package holds the order codes the master control accepts, the operand,
// shift-direction and link-kind encodings, and the per-pulse command bundle that the master
// control broadcasts to every module of the array.
//
// The order repertoire ADD, MPY, COM, STO, SHR, SRA, LNK and EXP is the one the design is
// built around. CLC (clear the edge counters), RDC (read one edge counter into the in-out
// register), ISR and ISC (load the row and column isolation masks) are this design's own
// encoding of the master-control functions "read out the number of ones in a row or column"
// and "isolate any portion of the array". The numeric codes are this design's choice.
package ap_pkg;

  // Array size and per-module memory size of the main configuration.
  localparam int unsigned AP_N        = 32;  // modules per row and per column
  localparam int unsigned AP_MEM_BITS = 16;  // memory bits in each module
  localparam int unsigned AP_PULSES   = 9;   // time pulses in one order cycle

  // Orders accepted by the master control.
  typedef enum logic [3:0] {
    OP_ADD = 4'd0,   // AC := AC or operand
    OP_MPY = 4'd1,   // AC := AC and operand
    OP_COM = 4'd2,   // AC := not AC
    OP_STO = 4'd3,   // memory[addr] := AC
    OP_SHR = 4'd4,   // shift AC one module in direction dir, zero (or fill data) enters
    OP_SRA = 4'd5,   // shift AC one module in direction dir, the far edge wraps around
    OP_LNK = 4'd6,   // every link element := AC(a) and AC(b) of its two modules
    OP_EXP = 4'd7,   // spread ones along chains of set links of the given kind
    OP_CLC = 4'd8,   // clear all row and column counters
    OP_RDC = 4'd9,   // in-out register := one counter (data selects which)
    OP_ISR = 4'd10,  // row isolation mask := data
    OP_ISC = 4'd11   // column isolation mask := data
  } op_e;

  // Operand ("specified address") of ADD and MPY: a memory bit of the module itself or the
  // accumulator of one of its four neighbours.
  typedef enum logic [2:0] {
    SRC_MEM   = 3'd0,
    SRC_UP    = 3'd1,  // module above (row - 1)
    SRC_DOWN  = 3'd2,  // module below (row + 1)
    SRC_LEFT  = 3'd3,  // module to the left (column - 1)
    SRC_RIGHT = 3'd4   // module to the right (column + 1)
  } src_e;

  // Direction in which SHR and SRA move the accumulator contents.
  typedef enum logic [1:0] {
    DIR_RIGHT = 2'd0,
    DIR_LEFT  = 2'd1,
    DIR_UP    = 2'd2,
    DIR_DOWN  = 2'd3
  } dir_e;

  // Kind of link element used by EXP.
  typedef enum logic [1:0] {
    LK_H  = 2'd0,  // horizontal: (r,c)-(r,c+1)
    LK_V  = 2'd1,  // vertical: (r,c)-(r+1,c)
    LK_PD = 2'd2,  // positive diagonal: (r,c)-(r-1,c+1)
    LK_ND = 2'd3   // negative diagonal: (r,c)-(r+1,c+1)
  } link_e;

  // Order as handed from the host computer to the master control. Any N-bit data word
  // (fill column, isolation mask, counter index) travels beside it.
  typedef struct packed {
    op_e   op;
    src_e  src;
    logic [3:0] addr;  // memory bit for SRC_MEM operands and STO
    dir_e  dir;
    link_e kind;
  } order_t;

  // Command broadcast by the master control to all modules during each time pulse.
  typedef struct packed {
    op_e   op;
    src_e  src;
    dir_e  dir;
    link_e kind;
    logic  strobe;   // accumulator / link update pulse
    logic  mem_rd;   // memory read flip-flop (MRFF) state
    logic  mem_clr;  // first half of a write: reset the selected bit
    logic  mem_set;  // second half of a write: set the selected bit if AC is one
  } array_cmd_t;

endpackage
