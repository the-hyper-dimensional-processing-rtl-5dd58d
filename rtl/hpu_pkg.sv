// hpu_pkg: shared types and constants of the Hyper-Dimensional Processing Unit.
//
// An instruction is 25 bits: a 5-bit opcode and a 20-bit argument field. The
// opcodes are the published HPUv2 encodings, except gcomp_update and fold_rst,
// whose codes are this design's choice (01011 and 00001). The placement of the
// sub-fields inside the argument is also this design's choice and is fixed
// here; the helper functions below extract them:
//
//   arg[9:0]    ADDR   {space, row[8:0]}; space 1 = Vector SRAM, 0 = item seeds
//   arg[11:10]  TILE   AM tile address (up to 4 tiles)
//   arg[12]     BANK   accumulator bank
//   arg[13]     SRC    alternative source (accumulator bank for be_load/be_mult,
//                      integer input buffer for scaling, global argmax for obuff)
//   arg[17:14]  REG    similarity register; also QUANT (sim_compute) and the
//                      one-hot VMU mask of mem_store_*
//   arg[18]     SCALE  scale the accumulated vector by a similarity value
//
// Configuration instructions (tile_en_set, mem_en_set, part_set, lcomp_set)
// carry a one-hot mask in arg[15:0] and, where a tile is named, the tile in
// arg[17:16].
package hpu_pkg;

  localparam int unsigned OPC_W     = 5;
  localparam int unsigned ARG_W     = 20;
  localparam int unsigned INSTR_W   = OPC_W + ARG_W;
  localparam int unsigned ROW_W     = 9;   // row field of ADDR
  localparam int unsigned TILE_W    = 2;   // tile field
  localparam int unsigned REG_W     = 4;   // similarity register field
  localparam int unsigned QUANT_W   = 4;
  localparam int unsigned MAX_TILES = 1 << TILE_W;
  localparam int unsigned FOLD_W    = 8;
  localparam int unsigned IO_W      = 8;   // data pins

  typedef enum logic [OPC_W-1:0] {
    OP_NOP            = 5'b00000,
    OP_FOLD_RST       = 5'b00001,
    OP_FOLD_INCR      = 5'b00010,
    OP_IBUFF_VEC_LOAD = 5'b00011,
    OP_IBUFF_INT_LOAD = 5'b00100,
    OP_BE_PERM        = 5'b00101,
    OP_PART_SET       = 5'b00110,
    OP_LCOMP_SET      = 5'b00111,
    OP_TILE_EN_SET    = 5'b01000,
    OP_MEM_EN_SET     = 5'b01001,
    OP_GCOMP_LOAD     = 5'b01010,
    OP_GCOMP_UPDATE   = 5'b01011,
    OP_LCOMP_LOAD     = 5'b01100,
    OP_BE_LOAD        = 5'b10000,
    OP_BE_MULT        = 5'b10001,
    OP_OBUFF_VEC_LOAD = 5'b10010,
    OP_MEM_STORE_ACC  = 5'b10011,
    OP_MEM_STORE_IBUFF= 5'b10100,
    OP_MEM_STORE_BE   = 5'b10101,
    OP_QUERY_LOAD     = 5'b10110,
    OP_SIM_COMPUTE    = 5'b10111,
    OP_OBUFF_INT_LOAD = 5'b11000,
    OP_ACCBANK_LOAD   = 5'b11001,
    OP_ACCBANK_ADD    = 5'b11010,
    OP_SIMREG_LOAD    = 5'b11011,
    OP_SIMREG_ADD     = 5'b11100
  } opcode_e;

  typedef struct packed {
    opcode_e          op;
    logic [ARG_W-1:0] arg;
  } instr_t;

  // Binary Encoder operation select, shared by all BCUs.
  typedef enum logic [1:0] {
    BE_HOLD = 2'd0,
    BE_LOAD = 2'd1,
    BE_PERM = 2'd2,
    BE_MULT = 2'd3
  } be_op_e;

  typedef enum logic [1:0] {
    ACC_HOLD = 2'd0,
    ACC_LOAD = 2'd1,
    ACC_ADD  = 2'd2
  } acc_op_e;

  typedef enum logic [1:0] {
    ST_IBUFF = 2'd0,
    ST_BE    = 2'd1,
    ST_ACC   = 2'd2
  } store_src_e;

  // Control of the datapath (second) pipeline stage.
  typedef struct packed {
    be_op_e               be_op;
    logic                 be_src_acc;    // Binary Encoder input from accumulator bank
    acc_op_e              acc_op;
    logic                 bank;
    logic                 scale_en;
    logic                 scale_ibuff;   // scale value from integer input buffer
    logic [TILE_W-1:0]    tile;
    logic [REG_W-1:0]     reg_idx;
    logic [QUANT_W-1:0]   quant;
    logic                 query_load;
    logic                 sim_compute;
    logic                 simreg_load;
    logic                 simreg_add;
    logic                 lcomp_load;
    logic                 gcomp_load;
    logic                 gcomp_update;
    logic                 store;
    store_src_e           store_src;
    logic [MAX_TILES-1:0] store_mask;    // VMUs written (already ANDed with mem_en)
    logic                 store_space;
    logic [ROW_W-1:0]     store_row;
    logic [ROW_W:0]       vec_addr;      // {space,row} read in the first stage
    logic                 obuff_vec_load;
    logic                 obuff_int_load;
    logic                 obuff_global;  // obuff source is the Global Argmax Unit
    logic [MAX_TILES-1:0] tile_act;      // active AM tiles for similarity work
  } dp_ctrl_t;

  function automatic logic arg_space(input logic [ARG_W-1:0] a);
    return a[9];
  endfunction
  function automatic logic [ROW_W-1:0] arg_row(input logic [ARG_W-1:0] a);
    return a[ROW_W-1:0];
  endfunction
  function automatic logic [TILE_W-1:0] arg_tile(input logic [ARG_W-1:0] a);
    return a[11:10];
  endfunction
  function automatic logic arg_bank(input logic [ARG_W-1:0] a);
    return a[12];
  endfunction
  function automatic logic arg_src(input logic [ARG_W-1:0] a);
    return a[13];
  endfunction
  function automatic logic [REG_W-1:0] arg_reg(input logic [ARG_W-1:0] a);
    return a[17:14];
  endfunction
  function automatic logic arg_scale(input logic [ARG_W-1:0] a);
    return a[18];
  endfunction
  function automatic logic [15:0] arg_mask(input logic [ARG_W-1:0] a);
    return a[15:0];
  endfunction
  function automatic logic [TILE_W-1:0] arg_ctile(input logic [ARG_W-1:0] a);
    return a[17:16];
  endfunction

  // Argument builders, used by programs and testbenches.
  function automatic logic [ARG_W-1:0] mk_arg(input logic space, input logic [ROW_W-1:0] row,
                                               input logic [TILE_W-1:0] tile, input logic bank,
                                               input logic src, input logic [REG_W-1:0] r,
                                               input logic scale);
    logic [ARG_W-1:0] a;
    a = '0;
    a[ROW_W-1:0] = row;
    a[9]         = space;
    a[11:10]     = tile;
    a[12]        = bank;
    a[13]        = src;
    a[17:14]     = r;
    a[18]        = scale;
    return a;
  endfunction
  function automatic logic [ARG_W-1:0] mk_cfg(input logic [15:0] mask, input logic [TILE_W-1:0] tile);
    logic [ARG_W-1:0] a;
    a = '0;
    a[15:0]  = mask;
    a[17:16] = tile;
    return a;
  endfunction

endpackage
