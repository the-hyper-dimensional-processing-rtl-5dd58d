// hpu_similarity: Similarity Unit of an AM tile (Hamann similarity).
//
// The two D-bit vectors are XORed; each result bit counts +1 when the
// vectors agree (0) and -1 when they differ (1), and an adder tree sums them.
// The result, in [-D, D], equals the dot product of the bipolar forms of the
// two vectors. It is then quantized by an arithmetic right shift of quant_i
// bits, chosen per instruction so that sums over many folds fit, and
// saturated to K bits. Combinational.
module hpu_similarity #(
  parameter int unsigned D       = 1024,
  parameter int unsigned K       = 8,
  parameter int unsigned QUANT_W = 4,
  localparam int unsigned SW     = $clog2(D) + 2
) (
  input  logic [D-1:0]         a_i,
  input  logic [D-1:0]         b_i,
  input  logic [QUANT_W-1:0]   quant_i,
  output logic signed [SW-1:0] sim_o,   // full-precision similarity
  output logic signed [K-1:0]  q_o      // quantized, saturated similarity
);
  localparam logic signed [SW-1:0] MAXV = SW'(2**(K-1) - 1);
  localparam logic signed [SW-1:0] MINV = -SW'(2**(K-1));

  logic [D-1:0]         diff;
  logic [SW-1:0]        ndiff;
  logic signed [SW-1:0] shifted;

  always_comb begin
    diff  = a_i ^ b_i;
    ndiff = '0;
    for (int i = 0; i < D; i++) begin
      ndiff = ndiff + SW'(diff[i]);
    end
    sim_o   = $signed(SW'(D)) - $signed(ndiff << 1);
    shifted = sim_o >>> quant_i;
    if      (shifted > MAXV) q_o = MAXV[K-1:0];
    else if (shifted < MINV) q_o = MINV[K-1:0];
    else                     q_o = shifted[K-1:0];
  end
endmodule
