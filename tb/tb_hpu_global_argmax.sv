// tb_hpu_global_argmax: random local results from two tiles; checks
// gcomp_load (winner among valid tiles) and gcomp_update (winner among the
// tiles and the previous result), including searches spread over several
// update rounds.
module tb_hpu_global_argmax;
  localparam int unsigned M = 2, K = 8, AW = 10;
  logic clk = 0, rst_n = 0, load = 0, upd = 0, vo;
  logic [M-1:0] v = '0;
  logic [M-1:0][K-1:0] sim = '0;
  logic [M-1:0][AW-1:0] addr = '0;
  logic [K-1:0] mx;
  logic tile_o;
  logic [AW-1:0] ao;
  int checks = 0, failures = 0, updates_won = 0;

  hpu_global_argmax #(.M(M), .K(K), .ADR_W(AW)) dut (
    .clk(clk), .rst_n(rst_n), .load_i(load), .update_i(upd), .valid_i(v), .sim_i(sim),
    .addr_i(addr), .valid_o(vo), .max_o(mx), .tile_o(tile_o), .addr_o(ao));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int best, bt, ba;
    logic bv;
    repeat (2) @(negedge clk);
    rst_n = 1;
    bv = 0; best = 0; bt = 0; ba = 0;
    for (int n = 0; n < 600; n++) begin
      logic first;
      @(negedge clk);
      first = (n % 5 == 0);
      load = first; upd = !first;
      v = M'($urandom);
      for (int t = 0; t < M; t++) begin
        sim[t] = K'($urandom_range(255) - 128);
        addr[t] = AW'($urandom);
      end
      if (first) bv = 0;
      begin
        logic tv; int tbest, tt, ta;
        tv = 0; tbest = 0; tt = 0; ta = 0;
        for (int t = 0; t < M; t++)
          if (v[t] && (!tv || $signed(sim[t]) > tbest)) begin
            tv = 1; tbest = $signed(sim[t]); tt = t; ta = addr[t];
          end
        // a tile equal to the previous winner takes its place (lower tree input)
        if (tv && (!bv || tbest >= best)) begin
          if (bv && !first) updates_won++;
          bv = 1; best = tbest; bt = tt; ba = ta;
        end
      end
      @(negedge clk);
      load = 0; upd = 0;
      checks++;
      if (vo !== bv || (bv && ($signed(mx) != best || tile_o != 1'(bt) || ao != AW'(ba)))) begin
        failures++;
        $display("FAIL n=%0d exp v%0d %0d t%0d a%0d got v%0d %0d t%0d a%0d", n, bv, best, bt, ba,
                 vo, $signed(mx), tile_o, ao);
      end
    end
    checks++;
    if (updates_won == 0) begin failures++; $display("FAIL update never replaced a result"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
