// hpu_io_ctrl: IO controller with the input and output buffers.
//
// The core exchanges whole D-bit vectors and K-bit integers with the outside
// through 8 data pins in each direction and two shift controls. Vectors go
// through byte-wide shift registers that move only while the user holds the
// shift control high:
//   * shift_in_i: the input shift register takes data_i into its top byte and
//     moves down one byte, so after D/8 shifts the first byte is bits [7:0].
//     ibuff_vec_load_i (instruction ibuff_vec_load) copies it into the input
//     vector buffer, from which mem_store_ibuff writes a VMU.
//   * ibuff_int_load_i samples data_i into the input integer buffer, a custom
//     scale value for scaled accumulation.
//   * obuff_vec_load_i loads the output vector shift register; data_o shows
//     its bits [7:0] and shift_out_i moves the next byte down.
//   * obuff_int_load_i loads the output integer buffer and switches data_o to
//     it until the next obuff_vec_load.
// Byte order and the data_o selection are choices of this design. All
// registers update at the clock edge and are cleared by reset.
module hpu_io_ctrl
  import hpu_pkg::*;
#(
  parameter int unsigned D = 1024,
  parameter int unsigned K = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [IO_W-1:0]     data_i,
  input  logic                shift_in_i,
  input  logic                shift_out_i,
  output logic [IO_W-1:0]     data_o,
  input  logic                ibuff_vec_load_i,
  input  logic                ibuff_int_load_i,
  output logic [D-1:0]        ibuff_vec_o,
  output logic signed [K-1:0] ibuff_int_o,
  input  logic                obuff_vec_load_i,
  input  logic [D-1:0]        obuff_vec_i,
  input  logic                obuff_int_load_i,
  input  logic [K-1:0]        obuff_int_i
);
  initial begin
    assert (D % IO_W == 0) else $error("D must be a multiple of the IO width");
    assert (K <= IO_W) else $error("integers wider than the data pins");
  end

  logic [D-1:0] in_sr, out_sr;
  logic [K-1:0] obuff_int_q;
  logic         out_int_mode;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_sr        <= '0;
      ibuff_vec_o  <= '0;
      ibuff_int_o  <= '0;
      out_sr       <= '0;
      obuff_int_q  <= '0;
      out_int_mode <= 1'b0;
    end else begin
      if (shift_in_i)       in_sr       <= {data_i, in_sr[D-1:IO_W]};
      if (ibuff_vec_load_i) ibuff_vec_o <= in_sr;
      if (ibuff_int_load_i) ibuff_int_o <= data_i[K-1:0];
      if (obuff_vec_load_i) begin
        out_sr       <= obuff_vec_i;
        out_int_mode <= 1'b0;
      end else if (shift_out_i) begin
        out_sr <= {{IO_W{1'b0}}, out_sr[D-1:IO_W]};
      end
      if (obuff_int_load_i) begin
        obuff_int_q  <= obuff_int_i;
        out_int_mode <= 1'b1;
      end
    end
  end

  assign data_o = out_int_mode ? IO_W'($signed(obuff_int_q)) : out_sr[IO_W-1:0];
endmodule
