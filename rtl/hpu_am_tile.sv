// hpu_am_tile: Associative Memory tile.
//
// One Vector Memory Unit, one Similarity Accumulator and one Local Argmax
// Unit. The VMU output goes both to the HD Encoder (through the top level)
// and to this tile's query or vector register. The similarity registers are
// visible to the HD Encoder (scaled accumulation), to the output integer
// buffer and to the Local Argmax Unit. Several tiles run the same similarity
// instruction on different stored vectors at the same row address, which is
// how an associative search is parallelised. Timing follows the VMU (one
// cycle read) and the registers inside (one cycle per operation).
module hpu_am_tile
  import hpu_pkg::*;
#(
  parameter int unsigned D         = 1024,
  parameter int unsigned K         = 8,
  parameter int unsigned N         = 16,
  parameter int unsigned SEED_ROWS = 256,
  parameter int unsigned PARTS     = 4,
  parameter int unsigned PART_ROWS = 128,
  localparam int unsigned IW       = (N > 1) ? $clog2(N) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  // VMU
  input  logic                fold_zero_i,
  input  logic                fold_par_i,
  input  logic [PARTS-1:0]    part_en_i,
  input  logic                rd_en_i,
  input  logic                rd_space_i,
  input  logic [ROW_W-1:0]    rd_row_i,
  output logic [D-1:0]        vmu_data_o,
  input  logic                wr_en_i,
  input  logic                wr_space_i,
  input  logic [ROW_W-1:0]    wr_row_i,
  input  logic [D-1:0]        wr_data_i,
  // Similarity Accumulator
  input  logic                query_load_i,
  input  logic                sim_load_i,
  input  logic [QUANT_W-1:0]  quant_i,
  input  logic                simreg_load_i,
  input  logic                simreg_add_i,
  input  logic [IW-1:0]       reg_i,
  output logic [N-1:0][K-1:0] simreg_o,
  // Local Argmax
  input  logic                lcomp_load_i,
  input  logic [N-1:0]        lcomp_mask_i,
  output logic                lmax_valid_o,
  output logic [K-1:0]        lmax_o,
  output logic [IW-1:0]       lmax_idx_o
);
  logic [K-1:0] sim_q;

  hpu_vmu #(.D(D), .SEED_ROWS(SEED_ROWS), .PARTS(PARTS), .PART_ROWS(PART_ROWS)) u_vmu (
    .clk         (clk),
    .rst_n       (rst_n),
    .fold_zero_i (fold_zero_i),
    .fold_par_i  (fold_par_i),
    .part_en_i   (part_en_i),
    .rd_en_i     (rd_en_i),
    .rd_space_i  (rd_space_i),
    .rd_row_i    (rd_row_i),
    .rd_data_o   (vmu_data_o),
    .wr_en_i     (wr_en_i),
    .wr_space_i  (wr_space_i),
    .wr_row_i    (wr_row_i),
    .wr_data_i   (wr_data_i)
  );

  hpu_sim_accum #(.D(D), .K(K), .N(N), .QUANT_W(QUANT_W)) u_sa (
    .clk           (clk),
    .rst_n         (rst_n),
    .vec_i         (vmu_data_o),
    .query_load_i  (query_load_i),
    .sim_load_i    (sim_load_i),
    .quant_i       (quant_i),
    .simreg_load_i (simreg_load_i),
    .simreg_add_i  (simreg_add_i),
    .reg_i         (reg_i),
    .simreg_o      (simreg_o),
    .sim_q_o       (sim_q)
  );

  hpu_local_argmax #(.N(N), .K(K)) u_lmax (
    .clk     (clk),
    .rst_n   (rst_n),
    .load_i  (lcomp_load_i),
    .mask_i  (lcomp_mask_i),
    .sim_i   (simreg_o),
    .valid_o (lmax_valid_o),
    .max_o   (lmax_o),
    .idx_o   (lmax_idx_o)
  );
endmodule
