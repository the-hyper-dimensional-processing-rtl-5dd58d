// tb_hpu_sram_dp: fills the dual-port memory through the write port, reads
// it back through the read port with one-cycle latency, and checks that a
// read and a write in the same cycle both happen, the read of the row being
// written returning its old word.
module tb_hpu_sram_dp;
  localparam int unsigned WIDTH = 1025, DEPTH = 256, AW = 8;
  logic clk = 0, re = 0, we = 0;
  logic [AW-1:0] raddr = '0, waddr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata;
  logic [WIDTH-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  hpu_sram_dp #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (
    .clk(clk), .re_i(re), .raddr_i(raddr), .rdata_o(rdata),
    .we_i(we), .waddr_i(waddr), .wdata_i(wdata));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [WIDTH-1:0] rnd();
    logic [WIDTH-1:0] x;
    for (int w = 0; w <= WIDTH / 32; w++) x[w*32 +: 32] = $urandom;
    return x;
  endfunction

  initial begin
    for (int r = 0; r < DEPTH; r++) begin
      @(negedge clk);
      we = 1; waddr = AW'(r); wdata = rnd(); model[r] = wdata;
    end
    @(negedge clk);
    we = 0;
    for (int n = 0; n < 300; n++) begin
      int r, w;
      logic [WIDTH-1:0] old;
      r = $urandom_range(DEPTH - 1);
      w = (n % 3 == 0) ? r : $urandom_range(DEPTH - 1);
      old = model[r];
      @(negedge clk);
      re = 1; raddr = AW'(r);
      we = 1; waddr = AW'(w); wdata = rnd();
      @(negedge clk);
      model[w] = wdata;
      re = 0; we = 0;
      checks++;
      if (rdata !== old) begin failures++; $display("FAIL read row %0d", r); end
    end
    for (int r = 0; r < DEPTH; r += 7) begin
      @(negedge clk);
      re = 1; raddr = AW'(r);
      @(negedge clk);
      re = 0;
      checks++;
      if (rdata !== model[r]) begin failures++; $display("FAIL final row %0d", r); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
