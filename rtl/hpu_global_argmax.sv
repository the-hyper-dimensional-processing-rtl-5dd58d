// hpu_global_argmax: Global Argmax Unit.
//
// Compares the local argmax results of the active AM tiles with the same
// comparator tree as the tiles use. load_i (gcomp_load) registers the winner;
// update_i (gcomp_update) also enters the previously registered winner into
// the comparison, so an associative search can span more vectors than there
// are similarity registers. The result is the largest similarity and the
// address {tile, row} of its vector. Ties go to the lowest tile, and the
// previous winner counts as the last input.
module hpu_global_argmax #(
  parameter int unsigned M     = 2,
  parameter int unsigned K     = 8,
  parameter int unsigned ADR_W = 9,
  localparam int unsigned TW   = (M > 1) ? $clog2(M) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    load_i,
  input  logic                    update_i,
  input  logic [M-1:0]            valid_i,
  input  logic [M-1:0][K-1:0]     sim_i,
  input  logic [M-1:0][ADR_W-1:0] addr_i,
  output logic                    valid_o,
  output logic [K-1:0]            max_o,
  output logic [TW-1:0]           tile_o,
  output logic [ADR_W-1:0]        addr_o
);
  localparam int unsigned TAG_W = TW + ADR_W;

  logic [M:0]            v;
  logic [M:0][K-1:0]     val;
  logic [M:0][TAG_W-1:0] tag;
  logic                  t_valid;
  logic [K-1:0]          t_val;
  logic [TAG_W-1:0]      t_tag;

  always_comb begin
    for (int t = 0; t < M; t++) begin
      v[t]   = valid_i[t];
      val[t] = sim_i[t];
      tag[t] = {TW'(t), addr_i[t]};
    end
    v[M]   = update_i && valid_o;
    val[M] = max_o;
    tag[M] = {tile_o, addr_o};
  end

  hpu_argmax_tree #(.NIN(M + 1), .VAL_W(K), .TAG_W(TAG_W)) u_tree (
    .valid_i (v),
    .val_i   (val),
    .tag_i   (tag),
    .valid_o (t_valid),
    .val_o   (t_val),
    .tag_o   (t_tag)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_o <= 1'b0;
      max_o   <= '0;
      tile_o  <= '0;
      addr_o  <= '0;
    end else if (load_i || update_i) begin
      valid_o <= t_valid;
      max_o   <= t_val;
      {tile_o, addr_o} <= t_tag;
    end
  end
endmodule
