// tb_hpu_fact: HD factorization workload on the full-size processor
// (D = 1024, 2 AM tiles), folding factor 2 (2048-bit vectors), 3 factors of
// 16 items each.
//
// A product vector s = x ^ y ^ z of one item from each codebook is stored,
// and the processor runs the iterative factorization (a resonator network):
// for each factor in turn
//   1. unbind the other two estimates from s, fold by fold, in the Binary
//      Encoder (be_load, be_mult, be_mult, mem_store_be);
//   2. compare the result with all 16 codebook items over both folds into
//      the similarity registers (query_load, sim_compute, simreg_load/add),
//      with quantization shift 3;
//   3. build the new estimate as the sum of the items scaled by their
//      similarities (be_load item, accbank_load/add with scaling by the
//      similarity registers), thresholded and stored.
// The codebook items are item seeds in tile 0, so every fold-1 read goes
// through the CA90 cache; only tile 0 is active during searches. After the
// iterations, the local and global argmax over each factor's similarities
// name the decoded item.
//
// A bit-exact model (CA90 folds, saturating 8-bit scaled accumulation,
// quantized Hamann similarity) predicts each estimate; the testbench checks
// the final estimates read from the pins, the decoded items, and that they
// are the true factors. The factor and item counts follow the "3 x i"
// factorization benchmarks of the architecture's evaluation, with 16 items;
// the iteration schedule is this test's own.
module tb_hpu_fact;
  import hpu_pkg::*;
  localparam int unsigned D = 1024, NB = D / 8;
  localparam int NF = 3, NI = 16, F = 2, ITERS = 6;
  localparam int unsigned QSH = 3;
  // vector rows (tile 0): product 0..1, estimates 10 + 2*factor + fold,
  // unbound query 20..21
  localparam int ROW_S = 0, ROW_EST = 10, ROW_U = 20;

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
    repeat (100000) @(posedge clk);
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
  function automatic int sat8(input int x);
    return (x > 127) ? 127 : (x < -128) ? -128 : x;
  endfunction
  function automatic int hsim(input logic [D-1:0] a, input logic [D-1:0] b);
    return sat8((int'(D) - 2 * $countones(a ^ b)) >>> QSH);
  endfunction
  function automatic int neg8(input int s);
    return (s == -128) ? 127 : -s;
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

  logic [D-1:0] cb [NF][NI][F];     // codebook item folds
  logic [D-1:0] s [F];
  logic [D-1:0] est [NF][F];
  int sim [NI];
  int truth [NF];

  // model of one factor update
  task automatic model_update(input int fac);
    logic [D-1:0] u [F];
    for (int f = 0; f < F; f++) begin
      u[f] = s[f];
      for (int o = 0; o < NF; o++) if (o != fac) u[f] = u[f] ^ est[o][f];
    end
    for (int i = 0; i < NI; i++) sim[i] = sat8(hsim(u[0], cb[fac][i][0]) + hsim(u[1], cb[fac][i][1]));
    for (int f = 0; f < F; f++)
      for (int b = 0; b < D; b++) begin
        int a;
        a = 0;
        for (int i = 0; i < NI; i++) a = sat8(a + (cb[fac][i][f][b] ? sim[i] : neg8(sim[i])));
        est[fac][f][b] = (a >= 0);
      end
  endtask

  // processor program for one factor update
  task automatic hpu_update(input int fac);
    for (int f = 0; f < F; f++) begin
      issue(OP_BE_LOAD, A(1, ROW_S + f));
      for (int o = 0; o < NF; o++)
        if (o != fac) issue(OP_BE_MULT, A(1, ROW_EST + 2 * o + f));
      issue(OP_MEM_STORE_BE, A(1, ROW_U + f, 0, 0, 0, 1));
      nops(1);
    end
    issue(OP_FOLD_RST, '0);
    for (int f = 0; f < F; f++) begin
      issue(OP_QUERY_LOAD, A(1, ROW_U + f));
      for (int i = 0; i < NI; i++) begin
        issue(OP_SIM_COMPUTE, A(0, fac * NI + i, 0, 0, 0, QSH));
        issue(f == 0 ? OP_SIMREG_LOAD : OP_SIMREG_ADD, A(0, 0, 0, 0, 0, i));
      end
      issue(OP_FOLD_INCR, '0);
    end
    issue(OP_FOLD_RST, '0);
    for (int f = 0; f < F; f++) begin
      for (int i = 0; i < NI; i++) begin
        issue(OP_BE_LOAD, A(0, fac * NI + i));
        issue(i == 0 ? OP_ACCBANK_LOAD : OP_ACCBANK_ADD, A(0, 0, 0, 0, 0, i, 1));
      end
      issue(OP_MEM_STORE_ACC, A(1, ROW_EST + 2 * fac + f, 0, 0, 0, 1));
      issue(OP_FOLD_INCR, '0);
    end
    nops(1);
  endtask

  initial begin
    logic [D-1:0] got;
    int n_conv;
    repeat (3) @(negedge clk);
    rst_n = 1;
    issue(OP_TILE_EN_SET, mk_cfg(16'h1, 0));
    issue(OP_LCOMP_SET, mk_cfg(16'hffff, 0));
    for (int fac = 0; fac < NF; fac++)
      for (int i = 0; i < NI; i++) begin
        cb[fac][i][0] = rnd();
        for (int f = 1; f < F; f++) cb[fac][i][f] = ca90(cb[fac][i][f-1]);
        load_vec(1, 0, fac * NI + i, cb[fac][i][0]);
      end
    for (int fac = 0; fac < NF; fac++) truth[fac] = $urandom_range(NI - 1);
    for (int f = 0; f < F; f++) begin
      s[f] = cb[0][truth[0]][f] ^ cb[1][truth[1]][f] ^ cb[2][truth[2]][f];
      load_vec(1, 1, ROW_S + f, s[f]);
    end
    // initial estimates: superposition of every item of the codebook
    for (int fac = 0; fac < NF; fac++) begin
      issue(OP_FOLD_RST, '0);
      for (int f = 0; f < F; f++) begin
        for (int b = 0; b < D; b++) begin
          int a;
          a = 0;
          for (int i = 0; i < NI; i++) a = sat8(a + (cb[fac][i][f][b] ? 1 : -1));
          est[fac][f][b] = (a >= 0);
        end
        for (int i = 0; i < NI; i++) begin
          issue(OP_BE_LOAD, A(0, fac * NI + i));
          issue(i == 0 ? OP_ACCBANK_LOAD : OP_ACCBANK_ADD, A(0, 0));
        end
        issue(OP_MEM_STORE_ACC, A(1, ROW_EST + 2 * fac + f, 0, 0, 0, 1));
        issue(OP_FOLD_INCR, '0);
      end
    end
    nops(1);
    // iterations
    n_conv = 0;
    for (int it = 0; it < ITERS; it++)
      for (int fac = 0; fac < NF; fac++) begin
        model_update(fac);
        hpu_update(fac);
      end
    nops(2);
    for (int fac = 0; fac < NF; fac++)
      for (int f = 0; f < F; f++) begin
        read_vec(0, 0, 1, ROW_EST + 2 * fac + f, got);
        chk(got === est[fac][f], $sformatf("estimate of factor %0d fold %0d", fac, f));
        chk(got === cb[fac][truth[fac]][f], $sformatf("factor %0d fold %0d converged to the true item", fac, f));
      end
    // decode each factor with one more search and the argmax units
    for (int fac = 0; fac < NF; fac++) begin
      int best, bestv, wrow;
      model_update(fac);
      hpu_update(fac);
      best = 0; bestv = sim[0];
      for (int i = 1; i < NI; i++) if (sim[i] > bestv) begin best = i; bestv = sim[i]; end
      issue(OP_LCOMP_LOAD, '0);
      issue(OP_GCOMP_LOAD, '0);
      nops(2);
      read_vec(1, 0, 0, 0, got);
      wrow = int'(got[8:0]);
      chk(got[11] && !got[9] && got[10] == 1'b0, $sformatf("factor %0d decode valid", fac));
      chk(wrow == fac * NI + best, $sformatf("factor %0d decoded row %0d, model %0d", fac, wrow, fac * NI + best));
      chk(wrow == fac * NI + truth[fac], $sformatf("factor %0d decoded item %0d, true %0d", fac, wrow - fac * NI, truth[fac]));
      $display("factor %0d: true item %0d, decoded %0d, similarity %0d", fac, truth[fac], wrow - fac * NI, bestv);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
