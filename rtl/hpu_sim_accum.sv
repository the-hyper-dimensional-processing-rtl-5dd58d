// hpu_sim_accum: Similarity Accumulator of an AM tile.
//
// Holds the query register and the vector register, the Similarity Unit that
// compares them, and N similarity registers of K bits. query_load_i and
// sim_load_i load vec_i (the VMU output) into the query or the vector
// register; sim_load_i also latches the quantization shift quant_i.
// simreg_load_i writes the quantized similarity of the two registers into
// register reg_i, simreg_add_i adds it with saturation, which accumulates a
// similarity over vector folds. All updates happen at the clock edge; the
// registers are cleared by reset.
module hpu_sim_accum #(
  parameter int unsigned D       = 1024,
  parameter int unsigned K       = 8,
  parameter int unsigned N       = 16,
  parameter int unsigned QUANT_W = 4,
  localparam int unsigned IW     = (N > 1) ? $clog2(N) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [D-1:0]        vec_i,
  input  logic                query_load_i,
  input  logic                sim_load_i,
  input  logic [QUANT_W-1:0]  quant_i,
  input  logic                simreg_load_i,
  input  logic                simreg_add_i,
  input  logic [IW-1:0]       reg_i,
  output logic [N-1:0][K-1:0] simreg_o,
  output logic [K-1:0]        sim_q_o     // quantized similarity of query and vector
);
  localparam int unsigned SW = $clog2(D) + 2;
  localparam logic signed [K:0] MAXV = (K+1)'(2**(K-1) - 1);
  localparam logic signed [K:0] MINV = -(K+1)'(2**(K-1));

  logic [D-1:0]         query_q, vector_q;
  logic [QUANT_W-1:0]   quant_q;
  logic signed [SW-1:0] sim_full;
  logic signed [K-1:0]  sim_q;
  logic signed [K:0]    sum;

  hpu_similarity #(.D(D), .K(K), .QUANT_W(QUANT_W)) u_sim (
    .a_i     (query_q),
    .b_i     (vector_q),
    .quant_i (quant_q),
    .sim_o   (sim_full),
    .q_o     (sim_q)
  );

  assign sim_q_o = sim_q;

  always_comb begin
    sum = (K+1)'($signed(simreg_o[reg_i])) + (K+1)'(sim_q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      query_q  <= '0;
      vector_q <= '0;
      quant_q  <= '0;
      simreg_o <= '0;
    end else begin
      if (query_load_i) query_q <= vec_i;
      if (sim_load_i) begin
        vector_q <= vec_i;
        quant_q  <= quant_i;
      end
      if (simreg_load_i) simreg_o[reg_i] <= sim_q;
      else if (simreg_add_i) begin
        if      (sum > MAXV) simreg_o[reg_i] <= MAXV[K-1:0];
        else if (sum < MINV) simreg_o[reg_i] <= MINV[K-1:0];
        else                 simreg_o[reg_i] <= sum[K-1:0];
      end
    end
  end
endmodule
