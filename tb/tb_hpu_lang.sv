// tb_hpu_lang: language-style classification workload on the full-size
// processor (D = 1024, 2 AM tiles), at the size of the European language
// benchmark: 27 letter items, 21 classes, folding factor 2 (2048-bit
// vectors).
//
// Each synthetic "language" is a set of 15 letter 4-grams. Training encodes
// every 4-gram of a class with the Ngram kernel (be_load, then be_perm and
// be_mult per letter) and bundles them in accumulator bank 0, fold by fold,
// storing the thresholded class vector as two rows in one tile (even classes
// in tile 0, odd classes in tile 1). A query bundles 10 4-grams, 8 drawn from
// one class and 2 random, and is stored in both tiles. The search computes
// quantized similarities over both folds in all tiles at once (sim_compute
// with simreg_load, then simreg_add), takes the local argmax per tile and the
// global argmax, and reads the winner's {tile, row} and similarity from the
// pins.
//
// The testbench keeps its own bit-exact model (CA90 folds, permutation,
// saturating bundling, Hamann similarity with shift and clipping) and checks
// the processor's winner and maximum against it, and against the true class.
// The benchmark's size comes from the architecture's evaluation; the
// synthetic languages and the 4-gram sets are this test's own.
module tb_hpu_lang;
  import hpu_pkg::*;
  localparam int unsigned D = 1024, NB = D / 8;
  localparam int NITEMS = 27, NCLASS = 21, F = 2, NG = 4, NTRAIN = 15, NQUERY = 10, NTEST = 6;
  localparam int unsigned QSH = 3;

  logic clk = 0, rst_n = 0;
  instr_t instr = '{op: OP_NOP, arg: '0};
  logic [7:0] din = '0, dout;
  logic sin = 0, sout = 0;
  int checks = 0, failures = 0;

  hpu_top dut (
    .clk(clk), .rst_n(rst_n), .instr_i(instr), .io_data_i(din),
    .io_shift_in_i(sin), .io_shift_out_i(sout), .io_data_o(dout));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [D-1:0] rnd();
    logic [D-1:0] x;
    for (int w = 0; w < D / 32; w++) x[w*32 +: 32] = $urandom;
    return x;
  endfunction
  function automatic logic [D-1:0] ca90(input logic [D-1:0] x);
    return {x[0], x[D-1:1]} ^ {x[D-2:0], x[D-1]};
  endfunction
  function automatic logic [D-1:0] perm(input logic [D-1:0] x);
    return {x[D-2:0], x[D-1]};
  endfunction
  function automatic int sat8(input int x);
    return (x > 127) ? 127 : (x < -128) ? -128 : x;
  endfunction
  function automatic int hsim(input logic [D-1:0] a, input logic [D-1:0] b);
    return sat8((int'(D) - 2 * $countones(a ^ b)) >>> QSH);
  endfunction

  task automatic chk(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask
  task automatic issue(input opcode_e op, input logic [ARG_W-1:0] arg);
    @(negedge clk);
    instr = '{op: op, arg: arg};
  endtask
  task automatic nops(input int n);
    repeat (n) issue(OP_NOP, '0);
  endtask
  function automatic logic [ARG_W-1:0] A(input logic space, input int row, input int tile = 0,
                                         input int bank = 0, input logic src = 0,
                                         input int r = 0, input logic scale = 0);
    return mk_arg(space, 9'(row), 2'(tile), 1'(bank), src, 4'(r), scale);
  endfunction

  task automatic load_vec(input int tile_mask, input logic space, input int row, input logic [D-1:0] v);
    for (int b = 0; b < NB; b++) begin
      @(negedge clk);
      instr = '{op: OP_NOP, arg: '0};
      sin = 1; din = v[b*8 +: 8];
    end
    @(negedge clk);
    sin = 0;
    issue(OP_IBUFF_VEC_LOAD, '0);
    issue(OP_MEM_STORE_IBUFF, A(space, row, 0, 0, 0, tile_mask));
    nops(2);
  endtask
  task automatic read_vec(input logic global_src, input int tile, input logic space, input int row,
                          output logic [D-1:0] v);
    issue(OP_OBUFF_VEC_LOAD, A(space, row, tile, 0, global_src));
    nops(3);
    for (int b = 0; b < NB; b++) begin
      v[b*8 +: 8] = dout;
      sout = 1;
      @(negedge clk);
      sout = 0;
    end
  endtask
  task automatic read_int(input logic global_src, input int tile, input int r, output int val);
    issue(OP_OBUFF_INT_LOAD, A(0, 0, tile, 0, global_src, r));
    nops(3);
    val = $signed(dout);
  endtask

  // ---------------- data and model
  logic [D-1:0] seed [NITEMS];
  logic [D-1:0] item [F][NITEMS];
  int gram [NCLASS][NTRAIN][NG];      // letters of each class's 4-grams
  int qgram [NQUERY][NG];
  logic [D-1:0] cls [NCLASS][F];
  logic [D-1:0] qv [F];

  function automatic logic [D-1:0] ngram_vec(input int f, input int g [NG]);
    logic [D-1:0] v;
    v = item[f][g[0]];
    for (int k = 1; k < NG; k++) v = perm(v) ^ item[f][g[k]];
    return v;
  endfunction

  // bundle model: saturating 8-bit accumulators of +1/-1, threshold sum >= 0
  task automatic bundle(input logic [D-1:0] vs [$], output logic [D-1:0] out);
    for (int i = 0; i < D; i++) begin
      int a;
      a = 0;
      foreach (vs[n]) a = sat8(a + (vs[n][i] ? 1 : -1));
      out[i] = (a >= 0);
    end
  endtask

  // processor program for one bundle of 4-grams at fold f into bank 0
  task automatic hpu_bundle(input int grams [$][NG]);
    foreach (grams[n]) begin
      issue(OP_BE_LOAD, A(0, grams[n][0]));
      for (int k = 1; k < NG; k++) begin
        issue(OP_BE_PERM, '0);
        issue(OP_BE_MULT, A(0, grams[n][k]));
      end
      issue(n == 0 ? OP_ACCBANK_LOAD : OP_ACCBANK_ADD, A(0, 0, 0, 0));
    end
  endtask

  int n_correct = 0, n_model = 0;

  initial begin
    int grams [$][NG];
    logic [D-1:0] vs [$];
    logic [D-1:0] got;
    int val;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // items: seeds in tile 0; the folds the CA90 cache will produce
    for (int i = 0; i < NITEMS; i++) begin
      seed[i] = rnd();
      item[0][i] = seed[i];
      for (int f = 1; f < F; f++) item[f][i] = ca90(item[f-1][i]);
      load_vec(1, 0, i, seed[i]);
    end
    for (int c = 0; c < NCLASS; c++)
      for (int n = 0; n < NTRAIN; n++)
        for (int k = 0; k < NG; k++) gram[c][n][k] = $urandom_range(NITEMS - 1);

    // ---- training: class c -> tile c % 2, vector rows 2*(c/2) + f
    for (int c = 0; c < NCLASS; c++) begin
      issue(OP_FOLD_RST, '0);
      for (int f = 0; f < F; f++) begin
        grams.delete(); vs.delete();
        for (int n = 0; n < NTRAIN; n++) begin
          int g [NG];
          for (int k = 0; k < NG; k++) g[k] = gram[c][n][k];
          grams.push_back(g);
          vs.push_back(ngram_vec(f, g));
        end
        bundle(vs, cls[c][f]);
        hpu_bundle(grams);
        issue(OP_MEM_STORE_ACC, A(1, 2 * (c / 2) + f, 0, 0, 0, 1 << (c % 2)));
        issue(OP_FOLD_INCR, '0);
      end
    end
    nops(2);
    // spot-check two stored class vectors
    read_vec(0, 0, 1, 2 * 3 + 1, got);
    chk(got === cls[6][1], "class 6 fold 1 stored");
    read_vec(0, 1, 1, 2 * 9 + 0, got);
    chk(got === cls[19][0], "class 19 fold 0 stored");

    // ---- inference
    issue(OP_LCOMP_SET, mk_cfg(16'((1 << ((NCLASS + 1) / 2)) - 1), 0));
    issue(OP_LCOMP_SET, mk_cfg(16'((1 << (NCLASS / 2)) - 1), 1));
    for (int t = 0; t < NTEST; t++) begin
      int truth, best, bestv, wt, wrow, wcls;
      int s [NCLASS];
      truth = $urandom_range(NCLASS - 1);
      for (int n = 0; n < NQUERY; n++)
        for (int k = 0; k < NG; k++)
          qgram[n][k] = (n < 8) ? gram[truth][(n * 7 + t) % NTRAIN][k] : $urandom_range(NITEMS - 1);
      issue(OP_FOLD_RST, '0);
      for (int f = 0; f < F; f++) begin
        grams.delete(); vs.delete();
        for (int n = 0; n < NQUERY; n++) begin
          int g [NG];
          for (int k = 0; k < NG; k++) g[k] = qgram[n][k];
          grams.push_back(g);
          vs.push_back(ngram_vec(f, g));
        end
        bundle(vs, qv[f]);
        hpu_bundle(grams);
        issue(OP_MEM_STORE_ACC, A(1, 300 + f, 0, 0, 0, 3));
        issue(OP_FOLD_INCR, '0);
      end
      nops(1);
      // search: both tiles in parallel, register j holds class 2j + tile
      for (int f = 0; f < F; f++) begin
        issue(OP_QUERY_LOAD, A(1, 300 + f));
        for (int j = 0; j < (NCLASS + 1) / 2; j++) begin
          issue(OP_SIM_COMPUTE, A(1, 2 * j + f, 0, 0, 0, QSH));
          issue(f == 0 ? OP_SIMREG_LOAD : OP_SIMREG_ADD, A(0, 0, 0, 0, 0, j));
        end
      end
      issue(OP_LCOMP_LOAD, '0);
      issue(OP_GCOMP_LOAD, '0);
      nops(2);
      // model: same tie rule (lower register, then lower tile)
      best = -1; bestv = -1000;
      for (int j = 0; j < (NCLASS + 1) / 2; j++)
        for (int tl = 0; tl < 2; tl++) begin
          int c;
          c = 2 * j + tl;
          if (c < NCLASS) begin
            s[c] = sat8(hsim(qv[0], cls[c][0]) + hsim(qv[1], cls[c][1]));
          end
        end
      for (int tl = 0; tl < 2; tl++)
        for (int j = 0; j < (NCLASS + 1) / 2; j++) begin
          int c;
          c = 2 * j + tl;
          if (c < NCLASS && s[c] > bestv) begin bestv = s[c]; best = c; end
        end
      read_vec(1, 0, 0, 0, got);
      wt = int'(got[10]); wrow = int'(got[8:0]);
      wcls = 2 * (wrow / 2) + wt;
      read_int(1, 0, 0, val);
      chk(got[11] && got[9], $sformatf("query %0d: result valid", t));
      chk(wcls == best && val == bestv,
          $sformatf("query %0d: processor class %0d (%0d), model class %0d (%0d)", t, wcls, val, best, bestv));
      if (wcls == best) n_model++;
      if (wcls == truth) n_correct++;
      $display("query %0d: true class %0d, predicted %0d, similarity %0d", t, truth, wcls, val);
    end
    chk(n_correct >= NTEST - 1, $sformatf("accuracy %0d of %0d", n_correct, NTEST));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
