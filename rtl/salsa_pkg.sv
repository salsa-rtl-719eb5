// salsa_pkg: types and constants shared by the SALSA accelerator.
//
// SALSA takes RoCC-style commands (a 7-bit funct field plus two 64-bit operand
// values rs1 and rs2) from a host core. The funct value selects one of the
// instructions below; the fields of rs1/rs2 are laid out as follows. The
// document fixes the idea (a 40-bit pointer, destination PE, destination
// register and register type shared/private/global) but not the bit layout,
// which is this design's own.
//
//   OP_LOAD   rs1[39:0]  byte address of the first 64-bit word
//             rs2[15:0]  word count (0 means 1)
//             rs2[23:16] destination PE
//             rs2[28:24] destination register index
//             rs2[30:29] destination type: 0 private, 1 shared, 2 global, 3 FIFO
//             rs2[31]    broadcast to every PE
//             rs2[32]    write the high 32 bits of the word instead of the low
//   OP_STBASE rs1[39:0]  base address where collected outputs are stored
//   OP_COMP   rs1[1:0]   ALU: 0 general purpose, 1 SW, 2 NW, 3 SW affine
//             rs1[5:2]   general-purpose operation (gp_op_e)
//             rs1[12:6]  operand A {type[1:0], index[4:0]}  (type 3 = left neighbour's shared)
//             rs1[19:13] operand B
//             rs1[26:20] destination {type, index} (private or shared)
//             rs1[27]    emit: writes to output registers raise their valid bit
//             rs1[28]    feed: pull one element per step from the data selector
//             rs1[39:32] first active PE
//             rs1[47:40] last active PE
//             rs1[53:48] selector element width in bits (1..32, divides 64)
//             rs2[23:0]  number of array steps
//             rs2[39:24] number of elements fed (when feed = 1)
//             rs2[63:48] signed boundary step added per element on lane 1
//   OP_FENCE  waits until every unit is idle and all outputs are stored
package salsa_pkg;

  localparam int unsigned ADDR_W = 40;
  localparam int unsigned MEM_W  = 64;
  localparam int unsigned DATA_W = 32;
  localparam int unsigned PE_W   = 8;   // PE index width (up to 256 PEs)
  localparam int unsigned REG_W  = 5;   // register index width

  // Very negative score used for "minus infinity" boundaries; far enough from
  // the 32-bit limit that subtracting penalties cannot wrap.
  localparam logic signed [DATA_W-1:0] NEG_INF = -32'sd536870912;

  // Fixed register roles of the alignment ALUs (private P*, shared S*, global G*).
  localparam int unsigned P_Q    = 0;  // query character
  localparam int unsigned P_H    = 1;  // H(i,j-1): own last score
  localparam int unsigned P_D    = 2;  // H(i-1,j-1): left neighbour's previous score
  localparam int unsigned P_E    = 3;  // E(i,j-1) for the affine ALU
  localparam int unsigned P_MAX  = 4;  // running maximum of this PE's scores
  localparam int unsigned S_C    = 0;  // database character passed right
  localparam int unsigned S_H    = 1;  // H(i,j) passed right
  localparam int unsigned S_F    = 2;  // F(i,j) passed right
  localparam int unsigned G_MATCH    = 0;
  localparam int unsigned G_MISMATCH = 1;
  localparam int unsigned G_GAP      = 2;
  localparam int unsigned G_OPEN     = 3;
  localparam int unsigned G_EXT      = 4;

  typedef enum logic [6:0] {
    OP_LOAD   = 7'd0,
    OP_STBASE = 7'd1,
    OP_COMP   = 7'd2,
    OP_FENCE  = 7'd3
  } funct_e;

  typedef enum logic [1:0] {
    RT_PRIV   = 2'd0,
    RT_SHARED = 2'd1,
    RT_GLOBAL = 2'd2,
    RT_FIFO   = 2'd3   // for loads; for ALU operands this code means "left shared"
  } rtype_e;

  typedef enum logic [1:0] {
    ALU_GP  = 2'd0,
    ALU_SW  = 2'd1,
    ALU_NW  = 2'd2,
    ALU_SWA = 2'd3
  } alu_sel_e;

  typedef enum logic [3:0] {
    GP_ADD  = 4'd0,
    GP_SUB  = 4'd1,
    GP_MAX  = 4'd2,
    GP_MIN  = 4'd3,
    GP_AND  = 4'd4,
    GP_OR   = 4'd5,
    GP_XOR  = 4'd6,
    GP_PASS = 4'd7,
    GP_EQ   = 4'd8,
    GP_LT   = 4'd9,
    GP_SHL  = 4'd10,
    GP_SHR  = 4'd11
  } gp_op_e;

  typedef struct packed {
    rtype_e           rtype;
    logic [REG_W-1:0] idx;
  } reg_ref_t;

  // Load instruction as seen by the Load/Store unit.
  typedef struct packed {
    logic [ADDR_W-1:0] addr;
    logic [15:0]       count;
    logic [PE_W-1:0]   pe;
    reg_ref_t          dst;
    logic              bcast;
    logic              high;
  } load_cmd_t;

  // Compute instruction as seen by the Compute unit.
  typedef struct packed {
    alu_sel_e         alu;
    gp_op_e           op;
    reg_ref_t         a;
    reg_ref_t         b;
    reg_ref_t         dst;
    logic             emit;
    logic             feed;
    logic [PE_W-1:0]  pe_lo;
    logic [PE_W-1:0]  pe_hi;
    logic [5:0]       width;
    logic [23:0]      steps;
    logic [15:0]      elems;
    logic [15:0]      bstep;
  } comp_cmd_t;

  typedef enum logic [1:0] {
    K_LOAD   = 2'd0,
    K_STBASE = 2'd1,
    K_COMP   = 2'd2,
    K_FENCE  = 2'd3
  } kind_e;

  // Decoded instruction travelling from Fetch&Decode to Dispatch.
  typedef struct packed {
    kind_e             kind;
    load_cmd_t         ld;
    comp_cmd_t         cp;
    logic [ADDR_W-1:0] base;
  } instr_t;

  // Register write travelling from the Load/Store unit into the Compute unit.
  typedef struct packed {
    reg_ref_t          dst;
    logic [PE_W-1:0]   pe;
    logic              bcast;
    logic [MEM_W-1:0]  data;   // full word for the FIFO, low 32 bits for registers
  } reg_wr_t;

  // One collected output value, on its way to memory.
  typedef struct packed {
    logic [15:0]       pe;
    logic [7:0]        rix;
    logic [DATA_W-1:0] value;
  } out_item_t;

  function automatic logic [MEM_W-1:0] out_word(out_item_t it);
    return {it.pe, it.rix, 8'h00, it.value};
  endfunction

endpackage
