// tb_hpu_ctrl: feeds instructions to the control unit and checks the
// pipeline timing (VMU read one cycle after the instruction is registered,
// datapath control one cycle later), the control registers (tile and VMU
// enables, partitions, local comparator masks, fold number) and the shared
// address registers.
module tb_hpu_ctrl;
  import hpu_pkg::*;
  localparam int unsigned M = 2, N = 16, PARTS = 4;
  logic clk = 0, rst_n = 0;
  instr_t instr = '{op: OP_NOP, arg: '0};
  logic fz, fp, ivl, iil, rsp;
  logic [M-1:0][PARTS-1:0] pen;
  logic [M-1:0][N-1:0] lmask;
  logic [M-1:0] rden;
  logic [ROW_W-1:0] rrow;
  dp_ctrl_t dp;
  logic [N-1:0][ROW_W:0] areg;
  int checks = 0, failures = 0;

  hpu_ctrl #(.M(M), .N(N), .PARTS(PARTS)) dut (
    .clk(clk), .rst_n(rst_n), .instr_i(instr), .fold_zero_o(fz), .fold_par_o(fp),
    .part_en_o(pen), .lcomp_mask_o(lmask), .rd_en_o(rden), .rd_space_o(rsp), .rd_row_o(rrow),
    .ibuff_vec_load_o(ivl), .ibuff_int_load_o(iil), .dp_o(dp), .addr_reg_o(areg));

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // drive at a negative edge; the instruction register takes it at the next
  // positive edge, so stage 1 is visible after that edge
  task automatic issue(input opcode_e op, input logic [ARG_W-1:0] arg);
    @(negedge clk);
    instr = '{op: op, arg: arg};
    @(negedge clk);
    instr = '{op: OP_NOP, arg: '0};
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    chk(fz && rden == '0 && dp.store == 1'b0, "reset state");
    // be_load from tile 1, vector row 37: stage 1 read, then stage 2 control
    issue(OP_BE_LOAD, mk_arg(1'b1, 9'd37, 2'd1, 1'b0, 1'b0, 4'd0, 1'b0));
    chk(rden == 2'b10 && rsp && rrow == 9'd37, "stage 1 read of be_load");
    chk(dp.be_op == BE_HOLD, "datapath not yet active in stage 1");
    @(negedge clk);
    chk(rden == '0 && dp.be_op == BE_LOAD && dp.tile == 2'd1, "stage 2 of be_load");
    // be_load from the accumulator bank reads no VMU
    issue(OP_BE_MULT, mk_arg(1'b0, 9'd3, 2'd0, 1'b1, 1'b1, 4'd0, 1'b0));
    chk(rden == '0, "no VMU read for bank source");
    @(negedge clk);
    chk(dp.be_op == BE_MULT && dp.be_src_acc && dp.bank, "bank source decode");
    // tile enable affects query_load reads
    issue(OP_TILE_EN_SET, mk_cfg(16'h0001, 2'd0));
    issue(OP_QUERY_LOAD, mk_arg(1'b1, 9'd5, 2'd0, 1'b0, 1'b0, 4'd0, 1'b0));
    chk(rden == 2'b01, "query_load reads active tiles only");
    @(negedge clk);
    chk(dp.query_load && dp.tile_act[1:0] == 2'b01, "query_load stage 2");
    issue(OP_TILE_EN_SET, mk_cfg(16'h0003, 2'd0));
    // VMU enable masks stores
    issue(OP_MEM_EN_SET, mk_cfg(16'h0002, 2'd0));
    issue(OP_MEM_STORE_BE, mk_arg(1'b1, 9'd100, 2'd0, 1'b0, 1'b0, 4'b0011, 1'b0));
    @(negedge clk);
    chk(dp.store && dp.store_src == ST_BE && dp.store_mask[1:0] == 2'b10 && dp.store_row == 9'd100,
        "store masked by VMU enable");
    issue(OP_MEM_EN_SET, mk_cfg(16'h0003, 2'd0));
    // partitions and comparator masks per tile
    issue(OP_PART_SET, mk_cfg(16'h0005, 2'd1));
    issue(OP_LCOMP_SET, mk_cfg(16'hBEEF, 2'd0));
    @(negedge clk);   // configuration registers update at the end of stage 1
    chk(pen[1] == 4'h5 && pen[0] == 4'hf, "part_set");
    chk(lmask[0] == 16'hBEEF && lmask[1] == 16'h0, "lcomp_set");
    // fold number
    issue(OP_FOLD_INCR, '0);
    @(negedge clk);
    chk(!fz && fp, "fold 1");
    issue(OP_FOLD_INCR, '0);
    @(negedge clk);
    chk(!fz && !fp, "fold 2");
    issue(OP_FOLD_RST, '0);
    @(negedge clk);
    chk(fz, "fold reset");
    // address registers: sim_compute row 77 then simreg_add into reg 9
    issue(OP_SIM_COMPUTE, mk_arg(1'b1, 9'd77, 2'd0, 1'b0, 1'b0, 4'd3, 1'b0));
    chk(rden == 2'b11, "sim_compute reads all active tiles");
    issue(OP_SIMREG_ADD, mk_arg(1'b0, 9'd0, 2'd0, 1'b0, 1'b0, 4'd9, 1'b0));
    repeat (2) @(negedge clk);
    chk(areg[9] == {1'b1, 9'd77}, "address register");
    issue(OP_IBUFF_INT_LOAD, '0);
    chk(iil && !ivl, "ibuff_int_load in stage 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
