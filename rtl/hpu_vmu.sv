// hpu_vmu: Vector Memory Unit with CA90 cache and partitioned vector storage.
//
// Three memories, each D bits wide so that one vector fold moves per cycle:
//   * Seed SRAM (SEED_ROWS rows): one random seed per item vector; fold 0 of
//     an item is its seed.
//   * Cache SRAM (SEED_ROWS rows, dual port, D+1 bits): the latest CA90 step of
//     every seed plus one parity bit telling whether that step is of even or
//     odd number. It removes the need to re-run CA90 from the seed for every
//     fold (which costs f steps for fold f).
//   * Vector SRAM: PARTS partitions of PART_ROWS rows for encoded, class and
//     temporary vectors. A partition switched off by part_en_i is not
//     accessed; reads from it return zero and writes to it are dropped.
//
// Reads take one cycle: a request on cycle t (rd_en_i, rd_space_i, rd_row_i)
// gives rd_data_o on cycle t+1. Item reads depend on the current fold number:
//   * fold 0: the seed is output and CA90(seed) is written to the cache with
//     parity 1 on cycle t+1;
//   * fold f > 0, cached parity equal to f's parity: the cached vector is
//     output unchanged;
//   * otherwise the cached vector passes through the CA90 module, is output,
//     and is written back with parity of f on cycle t+1 through the second
//     port, so reads continue undisturbed.
// This gives the correct fold as long as each item is read at least once per
// fold with folds visited in increasing order, which is how programs step
// through folds. Writes (wr_en_i) take effect at the clock edge; a write to
// item space writes the Seed SRAM. The Seed SRAM and each partition have a
// single port: if a read and a write meet in one of them in the same cycle
// the write is done and the read returns stale data.
module hpu_vmu
  import hpu_pkg::*;
#(
  parameter int unsigned D         = 1024,
  parameter int unsigned SEED_ROWS = 256,
  parameter int unsigned PARTS     = 4,
  parameter int unsigned PART_ROWS = 128,
  localparam int unsigned SAW      = $clog2(SEED_ROWS),
  localparam int unsigned PAW      = $clog2(PART_ROWS),
  localparam int unsigned PW       = (PARTS > 1) ? $clog2(PARTS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             fold_zero_i,   // current fold number is 0
  input  logic             fold_par_i,    // parity of the current fold number
  input  logic [PARTS-1:0] part_en_i,
  input  logic             rd_en_i,
  input  logic             rd_space_i,    // 1: Vector SRAM, 0: item
  input  logic [ROW_W-1:0] rd_row_i,
  output logic [D-1:0]     rd_data_o,
  input  logic             wr_en_i,
  input  logic             wr_space_i,
  input  logic [ROW_W-1:0] wr_row_i,
  input  logic [D-1:0]     wr_data_i
);
  initial begin
    assert (SEED_ROWS <= (1 << ROW_W)) else $error("SEED_ROWS does not fit the row field");
    assert (PARTS * PART_ROWS <= (1 << ROW_W)) else $error("vector rows do not fit the row field");
  end

  // ---------------- request decode
  logic rd_item, rd_vec, wr_item, wr_vec;
  logic [PW-1:0] rd_part, wr_part;
  assign rd_item = rd_en_i && !rd_space_i;
  assign rd_vec  = rd_en_i &&  rd_space_i;
  assign wr_item = wr_en_i && !wr_space_i;
  assign wr_vec  = wr_en_i &&  wr_space_i;
  assign rd_part = PW'(rd_row_i >> PAW);
  assign wr_part = PW'(wr_row_i >> PAW);

  // ---------------- registered request (address register for write-back)
  logic             rd_q, space_q, fold_zero_q, fold_par_q, part_on_q;
  logic [ROW_W-1:0] row_q;
  logic [PW-1:0]    part_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q        <= 1'b0;
      space_q     <= 1'b0;
      fold_zero_q <= 1'b0;
      fold_par_q  <= 1'b0;
      part_on_q   <= 1'b0;
      row_q       <= '0;
      part_q      <= '0;
    end else begin
      rd_q <= rd_en_i;
      if (rd_en_i) begin
        space_q     <= rd_space_i;
        fold_zero_q <= fold_zero_i;
        fold_par_q  <= fold_par_i;
        part_on_q   <= part_en_i[rd_part];
        row_q       <= rd_row_i;
        part_q      <= rd_part;
      end
    end
  end

  // ---------------- Seed SRAM
  logic [D-1:0] seed_q;
  hpu_sram_sp #(.WIDTH(D), .DEPTH(SEED_ROWS)) u_seed (
    .clk     (clk),
    .ce_i    (wr_item || (rd_item && fold_zero_i)),
    .we_i    (wr_item),
    .addr_i  (wr_item ? SAW'(wr_row_i) : SAW'(rd_row_i)),
    .wdata_i (wr_data_i),
    .rdata_o (seed_q)
  );

  // ---------------- CA90 cache (dual port)
  logic [D:0]   cache_q;
  logic         wb_en;
  logic [D:0]   wb_data;
  logic [D-1:0] ca90_in, ca90_out;

  hpu_sram_dp #(.WIDTH(D + 1), .DEPTH(SEED_ROWS)) u_cache (
    .clk     (clk),
    .re_i    (rd_item && !fold_zero_i),
    .raddr_i (SAW'(rd_row_i)),
    .rdata_o (cache_q),
    .we_i    (wb_en),
    .waddr_i (SAW'(row_q)),
    .wdata_i (wb_data)
  );

  hpu_ca90 #(.D(D)) u_ca90 (
    .vec_i (ca90_in),
    .vec_o (ca90_out)
  );

  // Item read result and write-back decision, on the cycle after the request.
  logic seed_read, cache_hit, cache_update;
  always_comb begin
    seed_read    = rd_q && !space_q && fold_zero_q;
    cache_hit    = rd_q && !space_q && !fold_zero_q && (cache_q[D] == fold_par_q);
    cache_update = rd_q && !space_q && !fold_zero_q && (cache_q[D] != fold_par_q);
    ca90_in      = fold_zero_q ? seed_q : cache_q[D-1:0];
    wb_en        = seed_read || cache_update;
    wb_data      = {fold_zero_q ? 1'b1 : fold_par_q, ca90_out};
  end

  // ---------------- Vector SRAM partitions
  logic [D-1:0] part_q_data [PARTS];
  for (genvar p = 0; p < PARTS; p++) begin : g_part
    logic sel_rd, sel_wr;
    assign sel_rd = rd_vec && (rd_part == PW'(p));
    assign sel_wr = wr_vec && (wr_part == PW'(p));
    hpu_sram_sp #(.WIDTH(D), .DEPTH(PART_ROWS)) u_part (
      .clk     (clk),
      .ce_i    (part_en_i[p] && (sel_rd || sel_wr)),
      .we_i    (sel_wr),
      .addr_i  (sel_wr ? PAW'(wr_row_i) : PAW'(rd_row_i)),
      .wdata_i (wr_data_i),
      .rdata_o (part_q_data[p])
    );
  end

  // ---------------- output select
  always_comb begin
    if (space_q)          rd_data_o = part_on_q ? part_q_data[part_q] : '0;
    else if (fold_zero_q) rd_data_o = seed_q;
    else if (cache_hit)   rd_data_o = cache_q[D-1:0];
    else                  rd_data_o = ca90_out;
  end
endmodule
