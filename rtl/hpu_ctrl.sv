// hpu_ctrl: control unit and two-stage instruction pipeline.
//
// The processor has no program memory: one instruction arrives on instr_i
// every cycle and is captured in the instruction register. On the next cycle
// (stage 1) the instruction
//   * updates the control registers: active AM tiles (tile_en_set), enabled
//     VMUs (mem_en_set), active Vector SRAM partitions per tile (part_set),
//     similarity registers seen by each Local Argmax (lcomp_set), and the
//     current fold number (fold_rst, fold_incr);
//   * starts the VMU read it needs (be_load/be_mult/obuff_vec_load from one
//     tile, query_load/sim_compute from every active tile);
//   * loads the input buffers (ibuff_vec_load, ibuff_int_load).
// Its datapath control (dp_ctrl_t) is registered once more and applied on the
// following cycle (stage 2), when the VMU data are there. So a VMU read and
// the computation on the previous read overlap, and every vector instruction
// issues at one per cycle. Stores also act in stage 2, after the datapath
// work of earlier instructions. nop only moves an empty slot down the pipe.
//
// The unit also holds the vector address register (row of the last
// sim_compute) and the N address registers shared by all tiles, written by
// simreg_load/simreg_add, which turn a Local Argmax index into an address.
//
// A VMU read that meets a store to the same single-port SRAM in the same
// cycle returns stale data; programs must leave one instruction between a
// store and a read of that SRAM. An assertion reports it.
//
// The decoded tile-activity field is MAX_TILES bits wide, set by the 2-bit
// tile field of the instruction format; with M below MAX_TILES its upper bits
// are constant zero.
module hpu_ctrl
  import hpu_pkg::*;
#(
  parameter int unsigned M     = 2,
  parameter int unsigned N     = 16,
  parameter int unsigned PARTS = 4,
  parameter int unsigned PART_ROWS = 128,
  localparam int unsigned IW   = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned TW   = (M > 1) ? $clog2(M) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  instr_t                 instr_i,
  // stage 1
  output logic                   fold_zero_o,
  output logic                   fold_par_o,
  output logic [M-1:0][PARTS-1:0] part_en_o,
  output logic [M-1:0][N-1:0]    lcomp_mask_o,
  output logic [M-1:0]           rd_en_o,
  output logic                   rd_space_o,
  output logic [ROW_W-1:0]       rd_row_o,
  output logic                   ibuff_vec_load_o,
  output logic                   ibuff_int_load_o,
  // stage 2
  output dp_ctrl_t               dp_o,
  output logic [N-1:0][ROW_W:0]  addr_reg_o
);
  initial begin
    assert (M <= MAX_TILES) else $error("too many tiles for the tile field");
    assert (N <= 16) else $error("too many similarity registers for the mask field");
  end

  instr_t           ir;
  logic [FOLD_W-1:0] fold_o;      // current fold number
  opcode_e          op;
  logic [ARG_W-1:0] arg;
  logic [M-1:0]     tile_en, mem_en;
  logic [TILE_W-1:0] tile, ctile;
  dp_ctrl_t         dp_d;
  logic [ROW_W:0]   vec_addr_q;

  assign op    = ir.op;
  assign arg   = ir.arg;
  assign tile  = arg_tile(arg);
  assign ctile = arg_ctile(arg);

  // ---------------- instruction register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ir <= '{op: OP_NOP, arg: '0};
    else        ir <= instr_i;
  end

  // ---------------- stage 1: control registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tile_en      <= '1;
      mem_en       <= '1;
      part_en_o    <= '1;
      lcomp_mask_o <= '0;
      fold_o       <= '0;
    end else begin
      unique case (op)
        OP_TILE_EN_SET: tile_en <= M'(arg_mask(arg));
        OP_MEM_EN_SET:  mem_en  <= M'(arg_mask(arg));
        OP_PART_SET:    if (int'(ctile) < M) part_en_o[TW'(ctile)]    <= PARTS'(arg_mask(arg));
        OP_LCOMP_SET:   if (int'(ctile) < M) lcomp_mask_o[TW'(ctile)] <= N'(arg_mask(arg));
        OP_FOLD_RST:    fold_o <= '0;
        OP_FOLD_INCR:   fold_o <= fold_o + 1'b1;
        default: ;
      endcase
    end
  end

  assign fold_zero_o = (fold_o == '0);
  assign fold_par_o  = fold_o[0];

  // ---------------- stage 1: VMU reads and input buffers
  always_comb begin
    rd_en_o    = '0;
    rd_space_o = arg_space(arg);
    rd_row_o   = arg_row(arg);
    unique case (op)
      OP_BE_LOAD, OP_BE_MULT, OP_OBUFF_VEC_LOAD: begin
        if (!arg_src(arg) && int'(tile) < M) rd_en_o[TW'(tile)] = mem_en[TW'(tile)];
      end
      OP_QUERY_LOAD, OP_SIM_COMPUTE: rd_en_o = tile_en & mem_en;
      default: ;
    endcase
    ibuff_vec_load_o = (op == OP_IBUFF_VEC_LOAD);
    ibuff_int_load_o = (op == OP_IBUFF_INT_LOAD);
  end

  // ---------------- stage 1: decode of the datapath stage
  always_comb begin
    dp_d             = '0;
    dp_d.be_op       = BE_HOLD;
    dp_d.acc_op      = ACC_HOLD;
    dp_d.store_src   = ST_IBUFF;
    dp_d.tile        = tile;
    dp_d.bank        = arg_bank(arg);
    dp_d.reg_idx     = arg_reg(arg);
    dp_d.quant       = arg_reg(arg);
    dp_d.scale_en    = arg_scale(arg);
    dp_d.scale_ibuff = arg_src(arg);
    dp_d.be_src_acc  = arg_src(arg);
    dp_d.obuff_global= arg_src(arg);
    dp_d.store_space = arg_space(arg);
    dp_d.store_row   = arg_row(arg);
    dp_d.vec_addr    = {arg_space(arg), arg_row(arg)};
    dp_d.store_mask  = MAX_TILES'(arg_reg(arg)) & MAX_TILES'(mem_en);
    dp_d.tile_act    = MAX_TILES'(tile_en);
    unique case (op)
      OP_BE_LOAD:         dp_d.be_op = BE_LOAD;
      OP_BE_MULT:         dp_d.be_op = BE_MULT;
      OP_BE_PERM:         dp_d.be_op = BE_PERM;
      OP_ACCBANK_LOAD:    dp_d.acc_op = ACC_LOAD;
      OP_ACCBANK_ADD:     dp_d.acc_op = ACC_ADD;
      OP_QUERY_LOAD:      dp_d.query_load = 1'b1;
      OP_SIM_COMPUTE:     dp_d.sim_compute = 1'b1;
      OP_SIMREG_LOAD:     dp_d.simreg_load = 1'b1;
      OP_SIMREG_ADD:      dp_d.simreg_add = 1'b1;
      OP_LCOMP_LOAD:      dp_d.lcomp_load = 1'b1;
      OP_GCOMP_LOAD:      dp_d.gcomp_load = 1'b1;
      OP_GCOMP_UPDATE:    dp_d.gcomp_update = 1'b1;
      OP_MEM_STORE_IBUFF: begin dp_d.store = 1'b1; dp_d.store_src = ST_IBUFF; end
      OP_MEM_STORE_BE:    begin dp_d.store = 1'b1; dp_d.store_src = ST_BE;    end
      OP_MEM_STORE_ACC:   begin dp_d.store = 1'b1; dp_d.store_src = ST_ACC;   end
      OP_OBUFF_VEC_LOAD:  dp_d.obuff_vec_load = 1'b1;
      OP_OBUFF_INT_LOAD:  dp_d.obuff_int_load = 1'b1;
      default: ;
    endcase
  end

  // ---------------- stage 2 register and shared address registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dp_o        <= '0;
      vec_addr_q  <= '0;
      addr_reg_o  <= '0;
    end else begin
      dp_o <= dp_d;
      if (dp_o.sim_compute) vec_addr_q <= dp_o.vec_addr;
      if ((dp_o.simreg_load || dp_o.simreg_add) && int'(dp_o.reg_idx) < N)
        addr_reg_o[IW'(dp_o.reg_idx)] <= vec_addr_q;
    end
  end

  // ---------------- structural hazard check: store and read in one SRAM
  localparam int unsigned PAW = $clog2(PART_ROWS);
  logic conflict;
  always_comb begin
    conflict = 1'b0;
    for (int t = 0; t < int'(M); t++) begin
      if (dp_o.store && dp_o.store_mask[t] && rd_en_o[t] && (dp_o.store_space == rd_space_o)) begin
        if (!rd_space_o) conflict = conflict || fold_zero_o;
        else conflict = conflict || ((dp_o.store_row >> PAW) == (rd_row_o >> PAW));
      end
    end
  end

  a_no_port_conflict: assert property (@(posedge clk) disable iff (!rst_n) !conflict)
    else $warning("VMU read and store meet in one single-port SRAM; the read returns stale data");
endmodule
