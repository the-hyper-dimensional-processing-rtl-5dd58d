// hpu_scale_unit: binary-to-integer conversion with optional scaling.
//
// Turns each bit of the Binary Encoder output into a K-bit two's complement
// number: 1 -> +1 and 0 -> -1 without scaling, 1 -> +s and 0 -> -s when
// scale_i is set, where s is a similarity value. With this bipolar mapping the
// later threshold is just the sign of the sum. -s is saturated to the K-bit
// range (s = -2^(K-1) gives 2^(K-1)-1), a choice of this design.
// Combinational.
module hpu_scale_unit #(
  parameter int unsigned D = 1024,
  parameter int unsigned K = 8
) (
  input  logic [D-1:0]        vec_i,
  input  logic                scale_i,
  input  logic signed [K-1:0] s_i,
  output logic [D-1:0][K-1:0] int_o
);
  localparam logic signed [K-1:0] MAXV = {1'b0, {(K-1){1'b1}}};
  localparam logic signed [K-1:0] MINV = {1'b1, {(K-1){1'b0}}};
  localparam logic signed [K-1:0] ONE  = K'(1);

  logic signed [K-1:0] pos, neg;

  always_comb begin
    pos = scale_i ? s_i : ONE;
    neg = (pos == MINV) ? MAXV : -pos;
    for (int i = 0; i < D; i++) begin
      int_o[i] = vec_i[i] ? pos : neg;
    end
  end
endmodule
