// hpu_acc_banks: the accumulator banks of the HD Encoder.
//
// BANKS rows (two on the chip) of D Accumulate Units. Two banks let an
// encoding hold the integer value of an outer addition while an inner
// addition is summed in the other bank. op_i applies to the bank named by
// bank_i only: ACC_LOAD overwrites it with the scaled vector, ACC_ADD adds the
// scaled vector with saturation. One accumulation per cycle. thr_o gives the
// thresholded binary vector of every bank, updated after the clock edge.
module hpu_acc_banks
  import hpu_pkg::*;
#(
  parameter int unsigned D     = 1024,
  parameter int unsigned K     = 8,
  parameter int unsigned BANKS = 2,
  localparam int unsigned BW   = (BANKS > 1) ? $clog2(BANKS) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  acc_op_e             op_i,
  input  logic [BW-1:0]       bank_i,
  input  logic [D-1:0][K-1:0] int_i,
  output logic [D-1:0]        thr_o [BANKS]
);
  for (genvar b = 0; b < BANKS; b++) begin : g_bank
    acc_op_e bank_op;
    assign bank_op = (bank_i == BW'(b)) ? op_i : ACC_HOLD;
    for (genvar i = 0; i < D; i++) begin : g_unit
      logic [K-1:0] acc_val;
      hpu_acc_unit #(.K(K)) u_acc (
        .clk   (clk),
        .rst_n (rst_n),
        .op_i  (bank_op),
        .in_i  (int_i[i]),
        .acc_o (acc_val),
        .thr_o (thr_o[b][i])
      );
    end
  end
endmodule
