// hpu_sram_sp: single-port synchronous SRAM, written as an array.
//
// Stands for the foundry SRAM macros of the Seed SRAM and of each Vector SRAM
// partition (on the chip each memory is several narrower macros side by side,
// driven with the same address so they act as one wide memory). One access per
// cycle: with ce_i high, we_i high writes wdata_i to addr_i, we_i low reads
// addr_i and rdata_o shows the word from the next cycle on. rdata_o holds its
// value while ce_i is low. Contents are not reset.
module hpu_sram_sp #(
  parameter int unsigned WIDTH = 1024,
  parameter int unsigned DEPTH = 256,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             ce_i,
  input  logic             we_i,
  input  logic [AW-1:0]    addr_i,
  input  logic [WIDTH-1:0] wdata_i,
  output logic [WIDTH-1:0] rdata_o
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (ce_i) begin
      if (we_i) mem[addr_i] <= wdata_i;
      else      rdata_o     <= mem[addr_i];
    end
  end
endmodule
