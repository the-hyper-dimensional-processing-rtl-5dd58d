// hpu_sram_dp: dual-port synchronous SRAM with one read and one write port.
//
// Stands for the dual-port macro of the CA90 cache, whose write port takes the
// automatic write-back while the read port keeps serving reads. re_i samples
// raddr_i and rdata_o shows the word from the next cycle on, holding otherwise.
// we_i writes wdata_i to waddr_i at the clock edge. Reading the row written at
// the same edge returns the old word. Contents are not reset.
module hpu_sram_dp #(
  parameter int unsigned WIDTH = 1025,
  parameter int unsigned DEPTH = 256,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             re_i,
  input  logic [AW-1:0]    raddr_i,
  output logic [WIDTH-1:0] rdata_o,
  input  logic             we_i,
  input  logic [AW-1:0]    waddr_i,
  input  logic [WIDTH-1:0] wdata_i
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (re_i) rdata_o <= mem[raddr_i];
  end

  always_ff @(posedge clk) begin
    if (we_i) mem[waddr_i] <= wdata_i;
  end
endmodule
