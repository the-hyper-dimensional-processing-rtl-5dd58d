// hpu_bcu: Binary Compute Unit, one bit of the Binary Encoder.
//
// A one-bit register fed by a three-way multiplexer: load the input bit (start
// a term from a vector), take the neighbouring BCU's bit (the BCUs then form a
// ring shift register, which is the permutation), or XOR the stored bit with
// the input bit (binding, i.e. multiplication of binary HD vectors). The
// operation select is shared by all BCUs; BE_HOLD keeps the bit. One
// operation per cycle; the bit is cleared by reset.
module hpu_bcu
  import hpu_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  be_op_e op_i,
  input  logic   in_i,    // bit from the encoder input vector
  input  logic   prev_i,  // bit held by the previous BCU
  output logic   q_o
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q_o <= 1'b0;
    else begin
      unique case (op_i)
        BE_LOAD: q_o <= in_i;
        BE_PERM: q_o <= prev_i;
        BE_MULT: q_o <= q_o ^ in_i;
        default: q_o <= q_o;
      endcase
    end
  end
endmodule
