// tb_hpu_sim_accum: loads random query and vector registers, then loads or
// adds the quantized similarity into random similarity registers; an integer
// model (D - 2*hamming, shifted, clamped to 8 bits, saturating adds) gives
// the expected register file.
module tb_hpu_sim_accum;
  localparam int unsigned D = 1024, K = 8, N = 16, QW = 4;
  logic clk = 0, rst_n = 0;
  logic [D-1:0] vec = '0;
  logic ql = 0, sl = 0, rl = 0, ra = 0;
  logic [QW-1:0] quant = '0;
  logic [3:0] r = '0;
  logic [N-1:0][K-1:0] regs;
  logic [K-1:0] simq;
  int model [N];
  int checks = 0, failures = 0, sats = 0;

  hpu_sim_accum #(.D(D), .K(K), .N(N), .QUANT_W(QW)) dut (
    .clk(clk), .rst_n(rst_n), .vec_i(vec), .query_load_i(ql), .sim_load_i(sl), .quant_i(quant),
    .simreg_load_i(rl), .simreg_add_i(ra), .reg_i(r), .simreg_o(regs), .sim_q_o(simq));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [D-1:0] rnd();
    logic [D-1:0] x;
    for (int w = 0; w < D / 32; w++) x[w*32 +: 32] = $urandom;
    return x;
  endfunction

  initial begin
    logic [D-1:0] qv, vv;
    for (int i = 0; i < N; i++) model[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      int s, h;
      if (n % 20 == 0) begin
        qv = rnd();
        @(negedge clk); vec = qv; ql = 1;
        @(negedge clk); ql = 0;
      end
      vv = (n % 3 == 0) ? (qv ^ D'($urandom & 32'h0000_00ff)) : rnd();
      @(negedge clk); vec = vv; sl = 1; quant = QW'($urandom_range(5));
      h = $countones(qv ^ vv);
      s = (int'(D) - 2 * h) >>> quant;
      if (s > 127) s = 127;
      if (s < -128) s = -128;
      @(negedge clk); sl = 0; vec = rnd();
      r = 4'($urandom);
      if ($urandom_range(3) == 0) begin
        rl = 1; model[r] = s;
      end else begin
        ra = 1; model[r] = model[r] + s;
        if (model[r] > 127) begin model[r] = 127; sats++; end
        if (model[r] < -128) begin model[r] = -128; sats++; end
      end
      checks++;
      if ($signed(simq) != s) begin failures++; $display("FAIL sim n=%0d %0d vs %0d", n, $signed(simq), s); end
      @(negedge clk); rl = 0; ra = 0;
      for (int i = 0; i < N; i++) begin
        checks++;
        if ($signed(regs[i]) != model[i]) begin
          failures++;
          $display("FAIL reg %0d n=%0d: %0d vs %0d", i, n, $signed(regs[i]), model[i]);
        end
      end
    end
    checks++;
    if (sats == 0) begin failures++; $display("FAIL no saturation"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
