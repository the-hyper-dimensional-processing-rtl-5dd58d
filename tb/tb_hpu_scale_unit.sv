// tb_hpu_scale_unit: checks the {0,1} -> {-1,+1} mapping, the {0,1} ->
// {-s,+s} mapping for random and extreme s (including the saturating case
// s = -128).
module tb_hpu_scale_unit;
  localparam int unsigned D = 1024, K = 8;
  logic [D-1:0] v;
  logic scale;
  logic signed [K-1:0] s;
  logic [D-1:0][K-1:0] o;
  int checks = 0, failures = 0;

  hpu_scale_unit #(.D(D), .K(K)) dut (.vec_i(v), .scale_i(scale), .s_i(s), .int_o(o));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic sc, input int sv);
    int p, q;
    for (int w = 0; w < D / 32; w++) v[w*32 +: 32] = $urandom;
    scale = sc;
    s = K'(sv);
    #1;
    p = sc ? sv : 1;
    q = (p == -128) ? 127 : -p;
    for (int i = 0; i < D; i++) begin
      checks++;
      if ($signed(o[i]) != (v[i] ? p : q)) begin
        failures++;
        if (failures < 10) $display("FAIL i=%0d s=%0d sc=%0d got %0d", i, sv, sc, $signed(o[i]));
      end
    end
  endtask

  initial begin
    run(0, 37);
    run(1, 37);
    run(1, -5);
    run(1, 127);
    run(1, -128);
    run(1, 0);
    for (int n = 0; n < 20; n++) run(1, $urandom_range(255) - 128);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
