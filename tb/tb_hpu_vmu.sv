// tb_hpu_vmu: item reads across folds 0..F-1 with the CA90 cache, checked
// against CA90 applied f times to the seed, with repeated reads per fold (the
// parity-hit path) and single reads (the update path); vector writes and
// reads in every partition; reads and writes of a switched-off partition.
// Every read must deliver its data exactly one cycle after the request.
module tb_hpu_vmu;
  localparam int unsigned D = 1024, SEED_ROWS = 256, PARTS = 4, PART_ROWS = 128;
  localparam int unsigned NI = 12, F = 6;
  logic clk = 0, rst_n = 0;
  logic fz = 1, fp = 0, rd = 0, rsp = 0, wr = 0, wsp = 0;
  logic [PARTS-1:0] pen = '1;
  logic [8:0] rrow = '0, wrow = '0;
  logic [D-1:0] rdata, wdata = '0;
  logic [D-1:0] seeds [NI];
  logic [D-1:0] vecs [PARTS*PART_ROWS];
  int checks = 0, failures = 0, n_seed = 0, n_hit = 0, n_upd = 0;

  hpu_vmu #(.D(D), .SEED_ROWS(SEED_ROWS), .PARTS(PARTS), .PART_ROWS(PART_ROWS)) dut (
    .clk(clk), .rst_n(rst_n), .fold_zero_i(fz), .fold_par_i(fp), .part_en_i(pen),
    .rd_en_i(rd), .rd_space_i(rsp), .rd_row_i(rrow), .rd_data_o(rdata),
    .wr_en_i(wr), .wr_space_i(wsp), .wr_row_i(wrow), .wr_data_i(wdata));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (dut.seed_read) n_seed++;
    if (dut.cache_hit) n_hit++;
    if (dut.cache_update) n_upd++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
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

  task automatic write(input logic sp, input int row, input logic [D-1:0] d);
    @(negedge clk);
    wr = 1; wsp = sp; wrow = 9'(row); wdata = d;
    @(negedge clk);
    wr = 0;
  endtask

  task automatic read_check(input logic sp, input int row, input logic [D-1:0] expd, input string what);
    @(negedge clk);
    rd = 1; rsp = sp; rrow = 9'(row);
    @(negedge clk);
    rd = 0;
    checks++;
    if (rdata !== expd) begin failures++; $display("FAIL %s row %0d", what, row); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < NI; i++) begin
      seeds[i] = rnd();
      write(0, i * 17, seeds[i]);
    end
    // fold loop: fold f expects CA90^f(seed)
    for (int f = 0; f < F; f++) begin
      @(negedge clk);
      fz = (f == 0); fp = 1'(f);
      for (int i = 0; i < NI; i++) begin
        logic [D-1:0] e;
        e = seeds[i];
        for (int k = 0; k < f; k++) e = ca90(e);
        read_check(0, i * 17, e, "item");
        // every other item is read twice in the fold: the second read is a hit
        if (i % 2 == 0) read_check(0, i * 17, e, "item again");
      end
    end
    // back-to-back reads: one per cycle, each answered on the next cycle
    @(negedge clk);
    fz = 1; fp = 0;
    for (int i = 0; i < NI; i++) begin
      rd = 1; rsp = 0; rrow = 9'(i * 17);
      @(negedge clk);
      checks++;
      if (rdata !== seeds[i]) begin failures++; $display("FAIL pipelined read %0d", i); end
    end
    rd = 0;
    // vector SRAM partitions
    for (int p = 0; p < PARTS; p++) begin
      for (int k = 0; k < 5; k++) begin
        int row;
        row = p * PART_ROWS + k * 23;
        vecs[row] = rnd();
        write(1, row, vecs[row]);
      end
    end
    for (int p = 0; p < PARTS; p++)
      for (int k = 0; k < 5; k++) read_check(1, p * PART_ROWS + k * 23, vecs[p * PART_ROWS + k * 23], "vector");
    // partition 2 off: reads give zero, writes are dropped
    @(negedge clk);
    pen = 4'b1011;
    read_check(1, 2 * PART_ROWS, '0, "off partition");
    write(1, 2 * PART_ROWS, rnd());
    read_check(1, 3 * PART_ROWS, vecs[3 * PART_ROWS], "other partition");
    @(negedge clk);
    pen = 4'b1111;
    read_check(1, 2 * PART_ROWS, vecs[2 * PART_ROWS], "partition back on");
    checks++;
    if (n_seed == 0 || n_hit == 0 || n_upd == 0) begin
      failures++;
      $display("FAIL cache paths seed=%0d hit=%0d update=%0d", n_seed, n_hit, n_upd);
    end
    $display("cache paths: seed=%0d hit=%0d update=%0d", n_seed, n_hit, n_upd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
