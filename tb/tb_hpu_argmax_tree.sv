// tb_hpu_argmax_tree: random signed values, tags and valid masks (including
// all-negative sets, ties and empty sets) against a linear-scan model that
// keeps the first maximum.
module tb_hpu_argmax_tree;
  localparam int unsigned NIN = 16, VW = 8, TW = 10;
  logic [NIN-1:0] v;
  logic [NIN-1:0][VW-1:0] val;
  logic [NIN-1:0][TW-1:0] tag;
  logic ov;
  logic [VW-1:0] oval;
  logic [TW-1:0] otag;
  int checks = 0, failures = 0;

  hpu_argmax_tree #(.NIN(NIN), .VAL_W(VW), .TAG_W(TW)) dut (
    .valid_i(v), .val_i(val), .tag_i(tag), .valid_o(ov), .val_o(oval), .tag_o(otag));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int best, bi;
      v = NIN'($urandom);
      if (n % 50 == 0) v = '0;
      for (int i = 0; i < NIN; i++) begin
        int x;
        x = (n % 4 == 0) ? -$urandom_range(128) : $urandom_range(255) - 128;
        if (n % 7 == 0) x = $urandom_range(3);
        val[i] = VW'(x);
        tag[i] = TW'($urandom);
      end
      #1;
      best = -1000; bi = -1;
      for (int i = 0; i < NIN; i++)
        if (v[i] && $signed(val[i]) > best) begin best = $signed(val[i]); bi = i; end
      checks++;
      if (bi < 0) begin
        if (ov !== 1'b0) begin failures++; $display("FAIL empty set"); end
      end else if (!ov || $signed(oval) != best || otag != tag[bi]) begin
        failures++;
        $display("FAIL n=%0d best=%0d got %0d tag %0d exp %0d", n, best, $signed(oval), otag, tag[bi]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
