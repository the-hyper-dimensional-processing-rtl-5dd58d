// tb_hpu_io_ctrl: shifts a random vector in byte by byte, loads it into the
// input vector buffer, loads an integer from the pins, then loads a vector
// and an integer into the output side and shifts the vector out, checking
// every byte and that shifting only happens while the shift control is high.
module tb_hpu_io_ctrl;
  localparam int unsigned D = 1024, K = 8, NB = D / 8;
  logic clk = 0, rst_n = 0;
  logic [7:0] din = '0, dout;
  logic sin = 0, sout = 0, ivl = 0, iil = 0, ovl = 0, oil = 0;
  logic [D-1:0] ivec, ovec_in = '0, v;
  logic signed [K-1:0] iint;
  logic [K-1:0] oint_in = '0;
  int checks = 0, failures = 0;

  hpu_io_ctrl #(.D(D), .K(K)) dut (
    .clk(clk), .rst_n(rst_n), .data_i(din), .shift_in_i(sin), .shift_out_i(sout), .data_o(dout),
    .ibuff_vec_load_i(ivl), .ibuff_int_load_i(iil), .ibuff_vec_o(ivec), .ibuff_int_o(iint),
    .obuff_vec_load_i(ovl), .obuff_vec_i(ovec_in), .obuff_int_load_i(oil), .obuff_int_i(oint_in));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 0; w < D / 32; w++) v[w*32 +: 32] = $urandom;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < NB; b++) begin
      @(negedge clk); sin = 1; din = v[b*8 +: 8];
      @(negedge clk); sin = 0; din = 8'hA5;   // idle cycle: no shift
    end
    @(negedge clk); ivl = 1;
    @(negedge clk); ivl = 0;
    checks++;
    if (ivec !== v) begin failures++; $display("FAIL input vector"); end
    din = 8'hC3; iil = 1;
    @(negedge clk); iil = 0;
    checks++;
    if (iint !== 8'hC3) begin failures++; $display("FAIL input integer"); end
    // output vector
    for (int w = 0; w < D / 32; w++) v[w*32 +: 32] = $urandom;
    ovec_in = v; ovl = 1;
    @(negedge clk); ovl = 0;
    for (int b = 0; b < NB; b++) begin
      checks++;
      if (dout !== v[b*8 +: 8]) begin failures++; $display("FAIL out byte %0d", b); end
      if (b % 2 == 0) begin
        @(negedge clk);   // no shift: byte must stay
        checks++;
        if (dout !== v[b*8 +: 8]) begin failures++; $display("FAIL hold byte %0d", b); end
      end
      sout = 1;
      @(negedge clk); sout = 0;
    end
    oint_in = 8'h5A; oil = 1;
    @(negedge clk); oil = 0;
    checks++;
    if (dout !== 8'h5A) begin failures++; $display("FAIL out integer"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
