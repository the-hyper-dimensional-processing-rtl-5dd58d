// tb_hpu_local_argmax: random similarity registers and masks; checks the
// registered maximum and index after load, and that they hold otherwise.
module tb_hpu_local_argmax;
  localparam int unsigned N = 16, K = 8, IW = 4;
  logic clk = 0, rst_n = 0, load = 0, vo;
  logic [N-1:0] mask = '0;
  logic [N-1:0][K-1:0] sim = '0;
  logic [K-1:0] mx;
  logic [IW-1:0] idx;
  int checks = 0, failures = 0;

  hpu_local_argmax #(.N(N), .K(K)) dut (
    .clk(clk), .rst_n(rst_n), .load_i(load), .mask_i(mask), .sim_i(sim),
    .valid_o(vo), .max_o(mx), .idx_o(idx));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int best, bi;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      mask = N'($urandom) | N'(1 << (n % N));
      for (int i = 0; i < N; i++) sim[i] = K'($urandom_range(255) - 128);
      load = 1;
      best = -1000; bi = 0;
      for (int i = 0; i < N; i++)
        if (mask[i] && $signed(sim[i]) > best) begin best = $signed(sim[i]); bi = i; end
      @(negedge clk);
      load = 0;
      for (int i = 0; i < N; i++) sim[i] = K'($urandom);
      checks++;
      if (!vo || $signed(mx) != best || idx != IW'(bi)) begin
        failures++;
        $display("FAIL n=%0d exp %0d@%0d got %0d@%0d", n, best, bi, $signed(mx), idx);
      end
      @(negedge clk);
      checks++;
      if ($signed(mx) != best || idx != IW'(bi)) begin failures++; $display("FAIL hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
