// tb_hpu_sram_sp: writes random words to every row, reads them back and
// checks the one-cycle read latency and that the output holds while the
// memory is not enabled.
module tb_hpu_sram_sp;
  localparam int unsigned WIDTH = 1024, DEPTH = 256, AW = 8;
  logic clk = 0, ce = 0, we = 0;
  logic [AW-1:0] addr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata;
  logic [WIDTH-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  hpu_sram_sp #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (
    .clk(clk), .ce_i(ce), .we_i(we), .addr_i(addr), .wdata_i(wdata), .rdata_o(rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [WIDTH-1:0] rnd();
    logic [WIDTH-1:0] x;
    for (int w = 0; w < WIDTH / 32; w++) x[w*32 +: 32] = $urandom;
    return x;
  endfunction

  initial begin
    for (int r = 0; r < DEPTH; r++) begin
      @(negedge clk);
      ce = 1; we = 1; addr = AW'(r); wdata = rnd(); model[r] = wdata;
    end
    for (int n = 0; n < 300; n++) begin
      int r;
      r = $urandom_range(DEPTH - 1);
      @(negedge clk);
      ce = 1; we = 0; addr = AW'(r);
      @(negedge clk);
      ce = 0;
      checks++;
      if (rdata !== model[r]) begin failures++; $display("FAIL read row %0d", r); end
      // output holds while disabled, even if the address changes
      addr = addr + 1'b1;
      @(negedge clk);
      checks++;
      if (rdata !== model[r]) begin failures++; $display("FAIL hold row %0d", r); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
