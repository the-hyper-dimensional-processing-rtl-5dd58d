// hpu_binary_encoder: D Binary Compute Units forming the Binary Encoder.
//
// Builds one addend of an encoding: a vector loaded from a VMU or an
// accumulator bank, then bound (XOR) with further vectors and permuted. The
// permutation is a cyclic shift by one position: BCU i takes the bit of BCU
// i-1 and BCU 0 takes the bit of BCU D-1. Each operation takes one cycle and
// the result is visible on vec_o after the clock edge.
module hpu_binary_encoder
  import hpu_pkg::*;
#(
  parameter int unsigned D = 1024
) (
  input  logic         clk,
  input  logic         rst_n,
  input  be_op_e       op_i,
  input  logic [D-1:0] vec_i,
  output logic [D-1:0] vec_o
);
  for (genvar i = 0; i < D; i++) begin : g_bcu
    hpu_bcu u_bcu (
      .clk    (clk),
      .rst_n  (rst_n),
      .op_i   (op_i),
      .in_i   (vec_i[i]),
      .prev_i (vec_o[(i + D - 1) % D]),
      .q_o    (vec_o[i])
    );
  end
endmodule
