// hpu_hd_encoder: the HD Encoder, which performs all element-wise operations.
//
// An encoding is evaluated as a sum of terms built only from binding and
// permutation. The Binary Encoder builds one term at a time (load, bind with
// XOR, permute by cyclic shift), taking vectors from a VMU or, for nested
// sums, from the thresholded value of an accumulator bank (src_acc_i). The
// Scale Unit turns the term into +-1 or +-s integers, s being a similarity
// value, and the selected accumulator bank loads or adds it with
// saturation. acc_o is the thresholded (binary) vector of bank bank_i; it
// can be stored to memory or fed back to the Binary Encoder. Every operation
// takes one cycle; be_o and acc_o change after the clock edge.
module hpu_hd_encoder
  import hpu_pkg::*;
#(
  parameter int unsigned D = 1024,
  parameter int unsigned K = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  be_op_e              be_op_i,
  input  logic                src_acc_i,
  input  logic [D-1:0]        vec_i,
  input  acc_op_e             acc_op_i,
  input  logic                bank_i,
  input  logic                scale_i,
  input  logic signed [K-1:0] s_i,
  output logic [D-1:0]        be_o,
  output logic [D-1:0]        acc_o
);
  logic [D-1:0]        be_in;
  logic [D-1:0][K-1:0] scaled;
  logic [D-1:0]        thr [2];

  assign be_in = src_acc_i ? thr[bank_i] : vec_i;
  assign acc_o = thr[bank_i];

  hpu_binary_encoder #(.D(D)) u_be (
    .clk   (clk),
    .rst_n (rst_n),
    .op_i  (be_op_i),
    .vec_i (be_in),
    .vec_o (be_o)
  );

  hpu_scale_unit #(.D(D), .K(K)) u_scale (
    .vec_i   (be_o),
    .scale_i (scale_i),
    .s_i     (s_i),
    .int_o   (scaled)
  );

  hpu_acc_banks #(.D(D), .K(K), .BANKS(2)) u_acc (
    .clk    (clk),
    .rst_n  (rst_n),
    .op_i   (acc_op_i),
    .bank_i (bank_i),
    .int_i  (scaled),
    .thr_o  (thr)
  );
endmodule
