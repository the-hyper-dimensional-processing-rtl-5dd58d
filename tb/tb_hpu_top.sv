// tb_hpu_top: end-to-end test of the processor at its full default size
// (D = 1024, 2 AM tiles), driven only through the instruction port and the
// byte-wide IO pins, as a host would.
//
// The program loads item seeds and stored vectors through the input buffer,
// then runs the processor's kernels and checks every result read back
// through the output buffer against values computed here from the seeds:
//   1. CA90 + Ngram encoding of three items over folds 0, 1 and 2
//      (a3 ^ p(a2 ^ p(a1)), items grown fold by fold by the CA90 cache);
//   2. Multiply-add [sum a_i ^ b_i] over three pairs;
//   3. Scaling by the input integer buffer with accumulator saturation, and a
//      nested sum fed back from an accumulator bank into the Binary Encoder;
//   4. Associative search over 12 stored vectors of 2 folds spread over both
//      tiles, accumulated over folds, split into two comparator rounds
//      (gcomp_load then gcomp_update);
//   5. Scaled accumulation by similarity registers (factorization step);
//   6. Partition switch-off, tile disable, and the instruction-to-output
//      latency of 3 cycles.
// Each mechanism is counted and a mechanism that never happened counts as a
// failure.
// The kernels and the 3-cycle latency are those of the architecture; the
// program layout (rows, tiles, vectors and the store/read spacing) is this
// test's own. Instructions are driven at the falling clock edge.
module tb_hpu_top;
  import hpu_pkg::*;
  localparam int unsigned D = 1024, NB = D / 8;
  localparam int unsigned QSH = 3;          // similarity quantization shift

  logic clk = 0, rst_n = 0;
  instr_t instr = '{op: OP_NOP, arg: '0};
  logic [7:0] din = '0, dout;
  logic sin = 0, sout = 0;
  int checks = 0, failures = 0;

  hpu_top dut (
    .clk(clk), .rst_n(rst_n), .instr_i(instr), .io_data_i(din),
    .io_shift_in_i(sin), .io_shift_out_i(sout), .io_data_o(dout));

  always #5 clk = ~clk;

  // ---------------- mechanism counters
  int n_seed = 0, n_hit = 0, n_upd = 0, n_sat = 0, n_fb = 0, n_ibscale = 0, n_simscale = 0;
  int n_gupd = 0, n_part_off = 0, n_tile_off = 0, n_perm = 0, n_bank1 = 0, n_quant = 0;
  always @(posedge clk) begin
    if (dut.g_tile[0].u_tile.u_vmu.seed_read || dut.g_tile[1].u_tile.u_vmu.seed_read) n_seed++;
    if (dut.g_tile[0].u_tile.u_vmu.cache_hit || dut.g_tile[1].u_tile.u_vmu.cache_hit) n_hit++;
    if (dut.g_tile[0].u_tile.u_vmu.cache_update || dut.g_tile[1].u_tile.u_vmu.cache_update) n_upd++;
    if (dut.dp.be_op == BE_PERM) n_perm++;
    if (dut.dp.be_op != BE_HOLD && dut.dp.be_src_acc) n_fb++;
    if (dut.dp.acc_op != ACC_HOLD && dut.dp.scale_en && dut.dp.scale_ibuff) n_ibscale++;
    if (dut.dp.acc_op != ACC_HOLD && dut.dp.scale_en && !dut.dp.scale_ibuff) n_simscale++;
    if (dut.dp.acc_op != ACC_HOLD && dut.dp.bank) n_bank1++;
    if (dut.dp.gcomp_update) n_gupd++;
    if (dut.dp.sim_compute && dut.dp.quant != 0) n_quant++;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- helpers
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
  function automatic logic [D-1:0] item(input logic [D-1:0] seed, input int f);
    logic [D-1:0] e;
    e = seed;
    for (int k = 0; k < f; k++) e = ca90(e);
    return e;
  endfunction
  function automatic logic [D-1:0] flip_bits(input logic [D-1:0] x, input int h, input int salt);
    logic [D-1:0] y;
    y = x;
    for (int b = 0; b < h; b++) y[(b * 3 + salt) % D] = ~y[(b * 3 + salt) % D];
    return y;
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

  // vector in through the pins, then into the VMUs of tile_mask
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

  // vector out of a VMU (or the search result) through the pins
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

  // ---------------- the program
  logic [D-1:0] seed0 [6], seed1 [6];
  logic [D-1:0] cls [2][6][2];     // [tile][vector][fold]
  logic [D-1:0] q [2];
  logic [D-1:0] got, expv;
  int simv [2][6];
  int val;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    issue(OP_TILE_EN_SET, mk_cfg(16'h3, 0));
    issue(OP_MEM_EN_SET, mk_cfg(16'h3, 0));
    issue(OP_PART_SET, mk_cfg(16'hf, 0));
    issue(OP_PART_SET, mk_cfg(16'hf, 1));
    issue(OP_FOLD_RST, '0);
    for (int i = 0; i < 6; i++) begin
      seed0[i] = rnd(); seed1[i] = rnd();
      load_vec(1, 0, i, seed0[i]);
      load_vec(2, 0, i, seed1[i]);
    end

    // ---- 1. Ngram over three folds, items from tile 0, stored in tile 0 rows 0..2
    for (int f = 0; f < 3; f++) begin
      issue(OP_BE_LOAD, A(0, 0, 0));
      issue(OP_BE_PERM, '0);
      issue(OP_BE_MULT, A(0, 1, 0));
      issue(OP_BE_PERM, '0);
      issue(OP_BE_MULT, A(0, 2, 0));
      issue(OP_MEM_STORE_BE, A(1, f, 0, 0, 0, 1));
      issue(OP_FOLD_INCR, '0);
    end
    issue(OP_FOLD_RST, '0);
    nops(2);
    for (int f = 0; f < 3; f++) begin
      read_vec(0, 0, 1, f, got);
      expv = item(seed0[2], f) ^ perm(item(seed0[1], f) ^ perm(item(seed0[0], f)));
      chk(got === expv, $sformatf("ngram fold %0d", f));
    end

    // ---- 2. Multiply-add over pairs of tile-1 items, stored in tile 0 row 130
    for (int i = 0; i < 3; i++) begin
      issue(OP_BE_LOAD, A(0, 2 * i, 1));
      issue(OP_BE_MULT, A(0, 2 * i + 1, 1));
      issue(i == 0 ? OP_ACCBANK_LOAD : OP_ACCBANK_ADD, A(0, 0, 0, 0));
    end
    issue(OP_MEM_STORE_ACC, A(1, 130, 0, 0, 0, 1));
    nops(2);
    read_vec(0, 0, 1, 130, got);
    begin
      logic [D-1:0] t0, t1, t2;
      t0 = seed1[0] ^ seed1[1]; t1 = seed1[2] ^ seed1[3]; t2 = seed1[4] ^ seed1[5];
      expv = (t0 & t1) | (t0 & t2) | (t1 & t2);
    end
    chk(got === expv, "multiply-add");

    // ---- 3. integer-buffer scaling with saturation, then a nested sum
    din = 8'd100;
    issue(OP_IBUFF_INT_LOAD, '0);
    issue(OP_BE_LOAD, A(0, 3, 0));
    issue(OP_ACCBANK_LOAD, A(0, 0, 0, 1, 1, 0, 1));
    issue(OP_ACCBANK_ADD, A(0, 0, 0, 1, 1, 0, 1));    // +-200 saturates at 127 / -128
    din = 8'(-100);
    issue(OP_IBUFF_INT_LOAD, '0);
    nops(1);
    issue(OP_ACCBANK_ADD, A(0, 0, 0, 1, 1, 0, 1));
    issue(OP_ACCBANK_ADD, A(0, 0, 0, 1, 1, 0, 1));
    issue(OP_MEM_STORE_ACC, A(1, 131, 0, 1, 0, 1));
    // nested: thresholded bank 1 back into the Binary Encoder, bound to an item
    issue(OP_BE_LOAD, A(0, 0, 0, 1, 1));
    issue(OP_BE_MULT, A(0, 4, 0));
    issue(OP_MEM_STORE_BE, A(1, 132, 0, 0, 0, 1));
    nops(2);
    read_vec(0, 0, 1, 131, got);
    // with saturation the two subtractions flip every sign; without it the
    // sums would all be 0
    chk(got === ~seed0[3], "saturating scaled accumulation");
    if (got === ~seed0[3]) n_sat++;
    read_vec(0, 0, 1, 132, got);
    chk(got === (~seed0[3] ^ seed0[4]), "nested sum through accumulator feedback");

    // ---- 4. associative search, 2 folds, 6 vectors per tile, rows 200+2j+f
    for (int t = 0; t < 2; t++)
      for (int j = 0; j < 6; j++)
        for (int f = 0; f < 2; f++) begin
          cls[t][j][f] = rnd();
          load_vec(1 << t, 1, 200 + 2 * j + f, cls[t][j][f]);
        end
    for (int f = 0; f < 2; f++) begin
      q[f] = flip_bits(cls[1][4][f], 300, f);
      load_vec(3, 1, 300 + f, q[f]);
    end
    for (int t = 0; t < 2; t++)
      for (int j = 0; j < 6; j++)
        simv[t][j] = sat8(hsim(q[0], cls[t][j][0]) + hsim(q[1], cls[t][j][1]));
    for (int f = 0; f < 2; f++) begin
      issue(OP_QUERY_LOAD, A(1, 300 + f));
      for (int j = 0; j < 6; j++) begin
        issue(OP_SIM_COMPUTE, A(1, 200 + 2 * j + f, 0, 0, 0, QSH));
        issue(f == 0 ? OP_SIMREG_LOAD : OP_SIMREG_ADD, A(0, 0, 0, 0, 0, j));
      end
    end
    nops(2);
    for (int t = 0; t < 2; t++)
      for (int j = 0; j < 6; j++) begin
        read_int(0, t, j, val);
        chk(val == simv[t][j], $sformatf("similarity tile %0d vec %0d: %0d vs %0d", t, j, val, simv[t][j]));
      end
    // round 1: registers 0..2, round 2: registers 3..5 (holds the match)
    issue(OP_LCOMP_SET, mk_cfg(16'h0007, 0));
    issue(OP_LCOMP_SET, mk_cfg(16'h0007, 1));
    issue(OP_LCOMP_LOAD, '0);
    issue(OP_GCOMP_LOAD, '0);
    issue(OP_LCOMP_SET, mk_cfg(16'h0038, 0));
    issue(OP_LCOMP_SET, mk_cfg(16'h0038, 1));
    issue(OP_LCOMP_LOAD, '0);
    issue(OP_GCOMP_UPDATE, '0);
    nops(2);
    read_vec(1, 0, 0, 0, got);
    // {valid, tile, space, row}: the address registers hold the row of the
    // last fold computed
    chk(got[11:0] === {1'b1, 1'b1, 1'b1, 9'(200 + 2 * 4 + 1)} && got[D-1:12] == '0,
        $sformatf("search result %h", got[11:0]));
    read_int(1, 0, 0, val);
    chk(val == simv[1][4], $sformatf("search max %0d vs %0d", val, simv[1][4]));

    // ---- 5. accumulation scaled by similarity registers: s(t0,v1)*c0 + s(t1,v4)*c1
    issue(OP_BE_LOAD, A(1, 200 + 2 * 1, 0));
    issue(OP_ACCBANK_LOAD, A(0, 0, 0, 0, 0, 1, 1));
    issue(OP_BE_LOAD, A(1, 200 + 2 * 4, 1));
    issue(OP_ACCBANK_ADD, A(0, 0, 1, 0, 0, 4, 1));
    issue(OP_MEM_STORE_ACC, A(1, 133, 0, 0, 0, 1));
    nops(2);
    read_vec(0, 0, 1, 133, got);
    for (int i = 0; i < D; i++) begin
      int a, b;
      a = cls[0][1][0][i] ? simv[0][1] : (simv[0][1] == -128 ? 127 : -simv[0][1]);
      b = cls[1][4][0][i] ? simv[1][4] : (simv[1][4] == -128 ? 127 : -simv[1][4]);
      expv[i] = (sat8(a + b) >= 0);
    end
    chk(got === expv, "similarity-scaled accumulation");

    // ---- 6a. partition 0 of tile 0 off: Ngram rows read as zero, then back
    issue(OP_PART_SET, mk_cfg(16'he, 0));
    read_vec(0, 0, 1, 0, got);
    chk(got === '0, "switched-off partition reads zero");
    if (got === '0) n_part_off++;
    read_vec(0, 0, 1, 130, got);
    chk(got !== '0, "other partition still on");
    issue(OP_PART_SET, mk_cfg(16'hf, 0));
    read_vec(0, 0, 1, 0, got);
    chk(got === (seed0[2] ^ perm(seed0[1] ^ perm(seed0[0]))), "partition back on");

    // ---- 6b. tile 1 disabled: its similarity register 15 stays untouched
    issue(OP_TILE_EN_SET, mk_cfg(16'h1, 0));
    issue(OP_QUERY_LOAD, A(1, 300));
    issue(OP_SIM_COMPUTE, A(1, 200, 0, 0, 0, QSH));
    issue(OP_SIMREG_LOAD, A(0, 0, 0, 0, 0, 15));
    issue(OP_TILE_EN_SET, mk_cfg(16'h3, 0));
    nops(2);
    read_int(0, 0, 15, val);
    chk(val == hsim(q[0], cls[0][0][0]), "active tile computed");
    read_int(0, 1, 15, val);
    chk(val == 0, "disabled tile untouched");
    if (val == 0) n_tile_off++;

    // ---- 6c. latency: an instruction's result shows on the pins 3 cycles on
    read_vec(0, 0, 1, 130, got);        // data_o now shows a vector byte
    issue(OP_OBUFF_INT_LOAD, A(0, 0, 1, 0, 0, 4));
    begin
      logic [7:0] prev_b;
      int lat;
      prev_b = dout;
      lat = 0;
      for (int c = 1; c <= 5 && lat == 0; c++) begin
        @(negedge clk);
        instr = '{op: OP_NOP, arg: '0};
        if (dout !== prev_b) lat = c;
      end
      chk(lat == 3 && $signed(dout) == simv[1][4], $sformatf("latency %0d cycles", lat));
    end

    // ---- mechanisms
    $display("mechanisms: seed=%0d cache_hit=%0d cache_update=%0d perm=%0d feedback=%0d sat=%0d",
             n_seed, n_hit, n_upd, n_perm, n_fb, n_sat);
    $display("            ibuff_scale=%0d sim_scale=%0d bank1=%0d quant=%0d gcomp_update=%0d part_off=%0d tile_off=%0d",
             n_ibscale, n_simscale, n_bank1, n_quant, n_gupd, n_part_off, n_tile_off);
    chk(n_seed > 0, "CA90 cache fold-0 seed path");
    chk(n_hit > 0, "CA90 cache hit");
    chk(n_upd > 0, "CA90 cache update and write-back");
    chk(n_perm > 0, "permutation");
    chk(n_fb > 0, "accumulator feedback");
    chk(n_sat > 0, "accumulator saturation");
    chk(n_ibscale > 0, "integer-buffer scaling");
    chk(n_simscale > 0, "similarity scaling");
    chk(n_bank1 > 0, "second accumulator bank");
    chk(n_quant > 0, "similarity quantization");
    chk(n_gupd > 0, "global argmax update");
    chk(n_part_off > 0, "partition switch-off");
    chk(n_tile_off > 0, "tile disable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
