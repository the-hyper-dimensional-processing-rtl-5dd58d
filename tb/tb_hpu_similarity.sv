// tb_hpu_similarity: random vector pairs with a chosen number of differing
// bits; checks the Hamann similarity D - 2*hamming, the arithmetic shift by
// the quantization argument and saturation to 8 bits.
module tb_hpu_similarity;
  localparam int unsigned D = 1024, K = 8, QW = 4, SW = 12;
  logic [D-1:0] a, b;
  logic [QW-1:0] q;
  logic signed [SW-1:0] sim;
  logic signed [K-1:0] sq;
  int checks = 0, failures = 0, sat = 0;

  hpu_similarity #(.D(D), .K(K), .QUANT_W(QW)) dut (.a_i(a), .b_i(b), .quant_i(q), .sim_o(sim), .q_o(sq));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      int h, expv, qv;
      logic [D-1:0] flip;
      for (int w = 0; w < D / 32; w++) a[w*32 +: 32] = $urandom;
      // flip exactly h distinct bits
      h = (n < 10) ? n * 113 % (D + 1) : $urandom_range(D);
      flip = '0;
      for (int i = 0; i < h; i++) flip[i] = 1'b1;
      for (int i = D - 1; i > 0; i--) begin
        int j;
        logic t;
        j = $urandom_range(i);
        t = flip[i]; flip[i] = flip[j]; flip[j] = t;
      end
      b = a ^ flip;
      q = QW'($urandom_range(10));
      #1;
      expv = D - 2 * h;
      qv = expv >>> q;
      if (qv > 127) begin qv = 127; sat++; end
      if (qv < -128) begin qv = -128; sat++; end
      checks++;
      if (sim != expv || sq != qv) begin
        failures++;
        $display("FAIL h=%0d q=%0d sim=%0d sq=%0d exp=%0d/%0d", h, q, sim, sq, expv, qv);
      end
    end
    checks++;
    if (sat == 0) begin failures++; $display("FAIL saturation not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
