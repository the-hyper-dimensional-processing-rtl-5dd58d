// tb_hpu_am_tile: stores a query and eight vectors of known distance in the
// tile's Vector SRAM, computes their similarities into similarity registers
// through the VMU, and checks the register values and the Local Argmax
// result (index of the closest vector).
module tb_hpu_am_tile;
  localparam int unsigned D = 1024, K = 8, N = 16;
  logic clk = 0, rst_n = 0;
  logic rd = 0, rsp = 1, wr = 0, wsp = 1;
  logic [8:0] rrow = '0, wrow = '0;
  logic [D-1:0] vmu, wdata = '0;
  logic ql = 0, sl = 0, rl = 0, ra = 0, ll = 0;
  logic [3:0] quant = '0, r = '0;
  logic [N-1:0] lmask = '0;
  logic [N-1:0][K-1:0] regs;
  logic lv;
  logic [K-1:0] lmax;
  logic [3:0] lidx;
  int checks = 0, failures = 0;
  int hdist [8];

  hpu_am_tile #(.D(D), .K(K), .N(N)) dut (
    .clk(clk), .rst_n(rst_n), .fold_zero_i(1'b1), .fold_par_i(1'b0), .part_en_i(4'hf),
    .rd_en_i(rd), .rd_space_i(rsp), .rd_row_i(rrow), .vmu_data_o(vmu),
    .wr_en_i(wr), .wr_space_i(wsp), .wr_row_i(wrow), .wr_data_i(wdata),
    .query_load_i(ql), .sim_load_i(sl), .quant_i(quant), .simreg_load_i(rl), .simreg_add_i(ra),
    .reg_i(r), .simreg_o(regs), .lcomp_load_i(ll), .lcomp_mask_i(lmask),
    .lmax_valid_o(lv), .lmax_o(lmax), .lmax_idx_o(lidx));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [D-1:0] q, v;
    for (int w = 0; w < D / 32; w++) q[w*32 +: 32] = $urandom;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk); wr = 1; wrow = 9'd0; wdata = q;
    for (int i = 0; i < 8; i++) begin
      hdist[i] = 100 + ((i * 37) % 8) * 50;   // all distinct
      v = q;
      for (int b = 0; b < hdist[i]; b++) v[(b * 7 + i) % D] = ~v[(b * 7 + i) % D];
      @(negedge clk); wrow = 9'(10 + i); wdata = v;
    end
    @(negedge clk); wr = 0;
    // query_load: read in one cycle, load in the next
    rd = 1; rrow = 9'd0;
    @(negedge clk); rd = 0; ql = 1;
    @(negedge clk); ql = 0;
    for (int i = 0; i < 8; i++) begin
      rd = 1; rrow = 9'(10 + i);
      @(negedge clk); rd = 0; sl = 1; quant = 4'd3;
      @(negedge clk); sl = 0; rl = 1; r = 4'(i);
      @(negedge clk); rl = 0;
    end
    for (int i = 0; i < 8; i++) begin
      int e;
      e = (D - 2 * hdist[i]) >>> 3;
      if (e > 127) e = 127;
      checks++;
      if ($signed(regs[i]) != e) begin failures++; $display("FAIL reg %0d: %0d vs %0d", i, $signed(regs[i]), e); end
    end
    lmask = 16'h00ff; ll = 1;
    @(negedge clk); ll = 0;
    begin
      int bi;
      bi = 0;
      for (int i = 1; i < 8; i++) if (hdist[i] < hdist[bi]) bi = i;
      checks++;
      if (!lv || lidx != 4'(bi)) begin failures++; $display("FAIL argmax %0d vs %0d", lidx, bi); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
