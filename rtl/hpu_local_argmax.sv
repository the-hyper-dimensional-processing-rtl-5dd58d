// hpu_local_argmax: Local Argmax Unit of an AM tile.
//
// On load_i (the lcomp_load instruction) it compares, in one cycle, the
// similarity registers selected by mask_i (set by lcomp_set) and registers
// the largest value and the index of its register. valid_o stays low when the
// mask selected nothing. The index is turned into a memory address by the
// shared address registers outside the tile.
module hpu_local_argmax #(
  parameter int unsigned N   = 16,
  parameter int unsigned K   = 8,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load_i,
  input  logic [N-1:0]        mask_i,
  input  logic [N-1:0][K-1:0] sim_i,
  output logic                valid_o,
  output logic [K-1:0]        max_o,
  output logic [IW-1:0]       idx_o
);
  logic [N-1:0][IW-1:0] tags;
  logic                 t_valid;
  logic [K-1:0]         t_val;
  logic [IW-1:0]        t_tag;

  always_comb begin
    for (int i = 0; i < N; i++) tags[i] = IW'(i);
  end

  hpu_argmax_tree #(.NIN(N), .VAL_W(K), .TAG_W(IW)) u_tree (
    .valid_i (mask_i),
    .val_i   (sim_i),
    .tag_i   (tags),
    .valid_o (t_valid),
    .val_o   (t_val),
    .tag_o   (t_tag)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_o <= 1'b0;
      max_o   <= '0;
      idx_o   <= '0;
    end else if (load_i) begin
      valid_o <= t_valid;
      max_o   <= t_val;
      idx_o   <= t_tag;
    end
  end
endmodule
