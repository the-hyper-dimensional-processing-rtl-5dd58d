// tb_hpu_acc_banks: random load/add into either of the two banks, each
// element modelled as a saturating 8-bit integer; checks that only the
// selected bank changes and that the thresholded outputs match.
module tb_hpu_acc_banks;
  import hpu_pkg::*;
  localparam int unsigned D = 64, K = 8;
  logic clk = 0, rst_n = 0;
  acc_op_e op = ACC_HOLD;
  logic bank = 0;
  logic [D-1:0][K-1:0] in_v = '0;
  logic [D-1:0] thr [2];
  int model [2][D];
  int checks = 0, failures = 0;

  hpu_acc_banks #(.D(D), .K(K), .BANKS(2)) dut (
    .clk(clk), .rst_n(rst_n), .op_i(op), .bank_i(bank), .int_i(in_v), .thr_o(thr));

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < 2; b++) for (int i = 0; i < D; i++) model[b][i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      op = acc_op_e'($urandom_range(2));
      bank = 1'($urandom);
      for (int i = 0; i < D; i++) begin
        int x;
        x = $urandom_range(80) - 40;
        in_v[i] = K'(x);
        if (op == ACC_LOAD) model[bank][i] = x;
        if (op == ACC_ADD) begin
          model[bank][i] = model[bank][i] + x;
          if (model[bank][i] > 127) model[bank][i] = 127;
          if (model[bank][i] < -128) model[bank][i] = -128;
        end
      end
      @(posedge clk);
      #1;
      for (int b = 0; b < 2; b++) begin
        for (int i = 0; i < D; i++) begin
          checks++;
          if (thr[b][i] !== (model[b][i] >= 0)) begin
            failures++;
            if (failures < 10) $display("FAIL step %0d bank %0d elem %0d", n, b, i);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
