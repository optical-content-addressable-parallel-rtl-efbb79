// ocapp_pkg: types and constants shared by the units of the content-addressable
// parallel processor (OCAPP).
//
// The processor holds N_WORDS words of WORD_BITS bits each and searches them all
// at once by content. Defaults: 256 words of 127 bits, so that the storage array
// with its enable column and dual-rail coding, n x 2(m+1) cells, is a 256 x 256
// cell array, the array size quoted for the cell technology. The word length and
// word count are otherwise parameters of every unit.
//
// The instruction set of the control unit is this design's own. The source
// architecture only says that the control unit holds a program in local memory,
// loads and unloads the array, sets and clears registers, enables and disables
// words, routes registers between units and tests the match detector MD. Each
// instruction below does one of those steps in one clock cycle.
package ocapp_pkg;

  localparam int unsigned N_WORDS_DEF   = 256;  // n, words in the storage array
  localparam int unsigned WORD_BITS_DEF = 127;  // m, bits per word
  localparam int unsigned PROG_DEPTH    = 64;   // program memory entries
  localparam int unsigned N_OPERANDS    = 4;    // comparand/mask slots
  localparam int unsigned IMM_W         = 8;    // immediate: slice index or branch target

  // Opcodes.
  typedef enum logic [3:0] {
    OP_NOP   = 4'd0,
    OP_HALT  = 4'd1,
    OP_LDI   = 4'd2,   // load interrogation register I (fn selects the source)
    OP_EQS   = 4'd3,   // equivalence compare: R and MD
    OP_THS   = 4'd4,   // magnitude compare at the enabled slices: R, G, L and MD
    OP_VMOV  = 4'd5,   // route a one-bit-per-word register into another
    OP_SETJ  = 4'd6,   // j <= imm
    OP_LOOPJ = 4'd7,   // j <= j+1; branch to imm while j+1 < WORD_BITS
    OP_BMD0  = 4'd8,   // branch to imm if MD = 0
    OP_BMD1  = 4'd9,   // branch to imm if MD = 1
    OP_JMP   = 4'd10,  // branch to imm
    OP_PRI   = 4'd11,  // priority circuit: P <= first responder of R
    OP_OUT   = 4'd12,  // output the word selected by P
    OP_WRW   = 4'd13,  // write register B into the words whose A bit is set
    OP_WRS   = 4'd14   // write register A into the bit slices whose B bit is set
  } opcode_e;

  // Bit-slice selection used by OP_EQS and OP_THS.
  typedef enum logic [1:0] {
    SL_ALL  = 2'd0,    // every bit slice takes part
    SL_J    = 2'd1,    // only slice j (j = 0 is the most significant bit)
    SL_NONE = 2'd2     // no slice: R reduces to the enable register ER
  } slice_e;

  // Sources of a route (OP_VMOV).
  typedef enum logic [2:0] {
    SRC_R = 3'd0, SRC_G = 3'd1, SRC_L = 3'd2, SRC_P = 3'd3,
    SRC_ER = 3'd4, SRC_SR = 3'd5, SRC_ONES = 3'd6, SRC_ZEROS = 3'd7
  } src_e;

  // Destinations of a route.
  typedef enum logic [2:0] {
    DST_ER = 3'd0, DST_SR = 3'd1, DST_R = 3'd2, DST_G = 3'd3,
    DST_L = 3'd4, DST_T = 3'd5
  } dst_e;

  // How a route combines with the destination's old contents.
  typedef enum logic [1:0] {
    FN_COPY = 2'd0,    // dst <= src
    FN_AND  = 2'd1,    // dst <= dst & src   (disable where src = 0)
    FN_ANDN = 2'd2,    // dst <= dst & ~src  (disable where src = 1)
    FN_OR   = 2'd3     // dst <= dst | src
  } fn_e;

  // Source of OP_LDI, carried in the fn field.
  localparam logic [1:0] LDI_SLOT  = 2'd0;  // comparand/mask slot imm
  localparam logic [1:0] LDI_ONES  = 2'd1;  // all ones, nothing masked
  localparam logic [1:0] LDI_ZEROS = 2'd2;  // all zeros, nothing masked
  localparam logic [1:0] LDI_NONE  = 2'd3;  // everything masked

  typedef struct packed {
    opcode_e          op;
    dst_e             dst;
    src_e             src;
    logic [1:0]       fn;
    slice_e           slice;
    logic [IMM_W-1:0] imm;
  } instr_t;

endpackage
