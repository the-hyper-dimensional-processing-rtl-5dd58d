// hpu_top: the Hyper-Dimensional Processing Unit (second-generation
// configuration) with its IO controller.
//
// The processor computes with binary hyper-dimensional vectors of a runtime
// length f*D, processed as f folds of D bits. One HD Encoder performs the
// element-wise operations (bind, permute, bundle with optional scaling by
// similarity values); M AM Tiles each hold a Vector Memory Unit and compute
// similarities to a query, in parallel across tiles; a Global Argmax Unit
// picks the best match over all tiles. The two kinds of unit are connected
// both ways, so any sequence of encoding and similarity steps can be
// programmed.
//
// Interface: one 25-bit instruction {opcode, argument} per cycle on instr_i
// (nop when idle); data pass through io_data_i/io_data_o one byte per cycle
// while io_shift_in_i / io_shift_out_i are high. Timing: an instruction on
// instr_i in cycle t is registered at the end of t, reads the VMUs in cycle
// t+1 and acts on the datapath in cycle t+2, so its result is visible from
// cycle t+3 on; a new instruction may follow every cycle.
//
// The sizes are the published second-generation ones: D = 1024, 2 tiles,
// 8-bit integers, 16 similarity registers per tile, 256 seed and cache rows
// and 4 x 128 vector rows per tile. The instruction-field layout, byte order
// on the pins and the behaviour in corner cases are this design's choices.
module hpu_top
  import hpu_pkg::*;
#(
  parameter int unsigned D         = 1024,
  parameter int unsigned M         = 2,
  parameter int unsigned K         = 8,
  parameter int unsigned N         = 16,
  parameter int unsigned SEED_ROWS = 256,
  parameter int unsigned PARTS     = 4,
  parameter int unsigned PART_ROWS = 128
) (
  input  logic            clk,
  input  logic            rst_n,
  input  instr_t          instr_i,
  input  logic [IO_W-1:0] io_data_i,
  input  logic            io_shift_in_i,
  input  logic            io_shift_out_i,
  output logic [IO_W-1:0] io_data_o
);
  localparam int unsigned IW    = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned TW    = (M > 1) ? $clog2(M) : 1;
  localparam int unsigned ADR_W = ROW_W + 1;

  // ---------------- control unit
  logic                    fold_zero, fold_par;
  logic [M-1:0][PARTS-1:0] part_en;
  logic [M-1:0][N-1:0]     lcomp_mask;
  logic [M-1:0]            rd_en;
  logic                    rd_space;
  logic [ROW_W-1:0]        rd_row;
  logic                    ibuff_vec_load, ibuff_int_load;
  dp_ctrl_t                dp;
  logic [N-1:0][ADR_W-1:0] addr_reg;

  hpu_ctrl #(.M(M), .N(N), .PARTS(PARTS), .PART_ROWS(PART_ROWS)) u_ctrl (
    .clk              (clk),
    .rst_n            (rst_n),
    .instr_i          (instr_i),
    .fold_zero_o      (fold_zero),
    .fold_par_o       (fold_par),
    .part_en_o        (part_en),
    .lcomp_mask_o     (lcomp_mask),
    .rd_en_o          (rd_en),
    .rd_space_o       (rd_space),
    .rd_row_o         (rd_row),
    .ibuff_vec_load_o (ibuff_vec_load),
    .ibuff_int_load_o (ibuff_int_load),
    .dp_o             (dp),
    .addr_reg_o       (addr_reg)
  );

  // ---------------- shared datapath signals
  logic [D-1:0]               vmu_data [M];
  logic [M-1:0][N-1:0][K-1:0] simreg;
  logic [M-1:0]               lmax_valid;
  logic [M-1:0][K-1:0]        lmax_val;
  logic [M-1:0][IW-1:0]       lmax_idx;
  logic [M-1:0][ADR_W-1:0]    lmax_addr;
  logic [D-1:0]               be_vec, acc_vec, ibuff_vec, store_data;
  logic signed [K-1:0]        ibuff_int, scale_val;
  logic [TW-1:0]              tsel;
  logic [IW-1:0]              rsel;

  assign tsel = (int'(dp.tile) < M) ? TW'(dp.tile) : '0;
  assign rsel = IW'(dp.reg_idx);

  always_comb begin
    unique case (dp.store_src)
      ST_BE:   store_data = be_vec;
      ST_ACC:  store_data = acc_vec;
      default: store_data = ibuff_vec;
    endcase
    scale_val = dp.scale_ibuff ? ibuff_int : $signed(simreg[tsel][rsel]);
  end

  // ---------------- AM tiles
  for (genvar t = 0; t < M; t++) begin : g_tile
    hpu_am_tile #(
      .D(D), .K(K), .N(N), .SEED_ROWS(SEED_ROWS), .PARTS(PARTS), .PART_ROWS(PART_ROWS)
    ) u_tile (
      .clk           (clk),
      .rst_n         (rst_n),
      .fold_zero_i   (fold_zero),
      .fold_par_i    (fold_par),
      .part_en_i     (part_en[t]),
      .rd_en_i       (rd_en[t]),
      .rd_space_i    (rd_space),
      .rd_row_i      (rd_row),
      .vmu_data_o    (vmu_data[t]),
      .wr_en_i       (dp.store && dp.store_mask[t]),
      .wr_space_i    (dp.store_space),
      .wr_row_i      (dp.store_row),
      .wr_data_i     (store_data),
      .query_load_i  (dp.query_load  && dp.tile_act[t]),
      .sim_load_i    (dp.sim_compute && dp.tile_act[t]),
      .quant_i       (dp.quant),
      .simreg_load_i (dp.simreg_load && dp.tile_act[t]),
      .simreg_add_i  (dp.simreg_add  && dp.tile_act[t]),
      .reg_i         (rsel),
      .simreg_o      (simreg[t]),
      .lcomp_load_i  (dp.lcomp_load  && dp.tile_act[t]),
      .lcomp_mask_i  (lcomp_mask[t]),
      .lmax_valid_o  (lmax_valid[t]),
      .lmax_o        (lmax_val[t]),
      .lmax_idx_o    (lmax_idx[t])
    );
    assign lmax_addr[t] = addr_reg[lmax_idx[t]];
  end

  // ---------------- HD Encoder
  hpu_hd_encoder #(.D(D), .K(K)) u_enc (
    .clk       (clk),
    .rst_n     (rst_n),
    .be_op_i   (dp.be_op),
    .src_acc_i (dp.be_src_acc),
    .vec_i     (vmu_data[tsel]),
    .acc_op_i  (dp.acc_op),
    .bank_i    (dp.bank),
    .scale_i   (dp.scale_en),
    .s_i       (scale_val),
    .be_o      (be_vec),
    .acc_o     (acc_vec)
  );

  // ---------------- Global Argmax Unit
  logic              g_valid;
  logic [K-1:0]      g_max;
  logic [TW-1:0]     gm_tile;
  logic [ADR_W-1:0]  g_addr;

  hpu_global_argmax #(.M(M), .K(K), .ADR_W(ADR_W)) u_gmax (
    .clk      (clk),
    .rst_n    (rst_n),
    .load_i   (dp.gcomp_load),
    .update_i (dp.gcomp_update),
    .valid_i  (lmax_valid & M'(dp.tile_act)),
    .sim_i    (lmax_val),
    .addr_i   (lmax_addr),
    .valid_o  (g_valid),
    .max_o    (g_max),
    .tile_o   (gm_tile),
    .addr_o   (g_addr)
  );

  // ---------------- IO controller
  logic [D-1:0] obuff_vec;
  logic [K-1:0] obuff_int;

  // The search result read out as a vector is {valid, tile, {space,row}} in
  // the low bits.
  assign obuff_vec = dp.obuff_global ? D'({g_valid, gm_tile, g_addr}) : vmu_data[tsel];
  assign obuff_int = dp.obuff_global ? g_max : simreg[tsel][rsel];

  hpu_io_ctrl #(.D(D), .K(K)) u_io (
    .clk              (clk),
    .rst_n            (rst_n),
    .data_i           (io_data_i),
    .shift_in_i       (io_shift_in_i),
    .shift_out_i      (io_shift_out_i),
    .data_o           (io_data_o),
    .ibuff_vec_load_i (ibuff_vec_load),
    .ibuff_int_load_i (ibuff_int_load),
    .ibuff_vec_o      (ibuff_vec),
    .ibuff_int_o      (ibuff_int),
    .obuff_vec_load_i (dp.obuff_vec_load),
    .obuff_vec_i      (obuff_vec),
    .obuff_int_load_i (dp.obuff_int_load),
    .obuff_int_i      (obuff_int)
  );
endmodule
