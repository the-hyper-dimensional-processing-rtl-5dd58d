// tb_hpu_acc_unit: random load/add/hold sequences on one accumulate unit
// against an integer model that clamps to [-128, 127]; checks the threshold
// bit (1 for sums >= 0) and that both saturation limits are reached.
module tb_hpu_acc_unit;
  import hpu_pkg::*;
  localparam int unsigned K = 8;
  logic clk = 0, rst_n = 0, thr;
  acc_op_e op = ACC_HOLD;
  logic signed [K-1:0] in_v = '0, acc;
  int model = 0, checks = 0, failures = 0, sat_hi = 0, sat_lo = 0;

  hpu_acc_unit #(.K(K)) dut (.clk(clk), .rst_n(rst_n), .op_i(op), .in_i(in_v), .acc_o(acc), .thr_o(thr));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      int x;
      @(negedge clk);
      op = acc_op_e'($urandom_range(2));
      // biased runs so that both limits are hit
      x = (n % 400 < 200) ? $urandom_range(60) : -$urandom_range(60);
      if (n % 13 == 0) x = $urandom_range(255) - 128;
      in_v = K'(x);
      case (op)
        ACC_LOAD: model = x;
        ACC_ADD: begin
          model = model + x;
          if (model > 127) begin model = 127; sat_hi++; end
          if (model < -128) begin model = -128; sat_lo++; end
        end
        default: ;
      endcase
      @(posedge clk);
      #1;
      checks++;
      if ($signed(acc) != model || thr !== (model >= 0)) begin
        failures++;
        $display("FAIL step %0d: acc %0d model %0d", n, $signed(acc), model);
      end
    end
    checks++;
    if (sat_hi == 0 || sat_lo == 0) begin failures++; $display("FAIL saturation not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
