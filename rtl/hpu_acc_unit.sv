// hpu_acc_unit: one Accumulate Unit of an accumulator bank.
//
// A K-bit signed register that is loaded with, or has added to it, one element
// of the integer vector from the Scale Unit. The sum saturates at the limits
// of K bits ([-128, 127] for K = 8) instead of wrapping, so a large sum never
// changes sign by overflow. thr_o is the thresholded bit, the complement of
// the sign bit: negative sums give 0, zero and positive sums give 1. The
// register updates at the clock edge; thr_o follows it.
module hpu_acc_unit
  import hpu_pkg::*;
#(
  parameter int unsigned K = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  acc_op_e             op_i,
  input  logic signed [K-1:0] in_i,
  output logic signed [K-1:0] acc_o,
  output logic                thr_o
);
  localparam logic signed [K:0] MAXV = (K+1)'(2**(K-1) - 1);
  localparam logic signed [K:0] MINV = -(K+1)'(2**(K-1));

  logic signed [K:0] sum;

  always_comb begin
    sum = (K+1)'(acc_o) + (K+1)'(in_i);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) acc_o <= '0;
    else begin
      unique case (op_i)
        ACC_LOAD: acc_o <= in_i;
        ACC_ADD: begin
          if      (sum > MAXV) acc_o <= MAXV[K-1:0];
          else if (sum < MINV) acc_o <= MINV[K-1:0];
          else                 acc_o <= sum[K-1:0];
        end
        default: acc_o <= acc_o;
      endcase
    end
  end

  assign thr_o = ~acc_o[K-1];
endmodule
