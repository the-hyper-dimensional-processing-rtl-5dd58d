// tb_hpu_hd_encoder: random programs of load/bind/permute (from the input
// vector or from a bank) and scaled or unscaled accumulation into two banks,
// compared with an element-wise integer model including saturation and the
// threshold; also checks that nested sums can feed back through be_load from a
// bank.
module tb_hpu_hd_encoder;
  import hpu_pkg::*;
  localparam int unsigned D = 128, K = 8;
  logic clk = 0, rst_n = 0;
  be_op_e be_op = BE_HOLD;
  acc_op_e acc_op = ACC_HOLD;
  logic src_acc = 0, bank = 0, scale = 0;
  logic signed [K-1:0] s = '0;
  logic [D-1:0] vin = '0, be, acc;
  logic [D-1:0] mbe;
  int macc [2][D];
  int checks = 0, failures = 0, fb = 0, scaled = 0;

  hpu_hd_encoder #(.D(D), .K(K)) dut (
    .clk(clk), .rst_n(rst_n), .be_op_i(be_op), .src_acc_i(src_acc), .vec_i(vin),
    .acc_op_i(acc_op), .bank_i(bank), .scale_i(scale), .s_i(s), .be_o(be), .acc_o(acc));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [D-1:0] thr(input int b);
    logic [D-1:0] t;
    for (int i = 0; i < D; i++) t[i] = (macc[b][i] >= 0);
    return t;
  endfunction

  initial begin
    mbe = '0;
    for (int b = 0; b < 2; b++) for (int i = 0; i < D; i++) macc[b][i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 1500; n++) begin
      logic [D-1:0] src;
      @(negedge clk);
      be_op = BE_HOLD; acc_op = ACC_HOLD;
      bank = 1'($urandom);
      for (int w = 0; w < D / 32; w++) vin[w*32 +: 32] = $urandom;
      src_acc = ($urandom_range(7) == 0);
      if (src_acc) fb++;
      src = src_acc ? thr(bank) : vin;
      if ($urandom_range(1)) begin
        be_op = be_op_e'($urandom_range(1, 3));
        case (be_op)
          BE_LOAD: mbe = src;
          BE_MULT: mbe = mbe ^ src;
          BE_PERM: mbe = {mbe[D-2:0], mbe[D-1]};
          default: ;
        endcase
      end else begin
        int p, q;
        acc_op = acc_op_e'($urandom_range(1, 2));
        scale = 1'($urandom);
        s = K'($urandom_range(60) - 30);
        if (scale) scaled++;
        p = scale ? int'(s) : 1;
        q = (p == -128) ? 127 : -p;
        for (int i = 0; i < D; i++) begin
          int x;
          x = mbe[i] ? p : q;
          if (acc_op == ACC_LOAD) macc[bank][i] = x;
          else begin
            macc[bank][i] += x;
            if (macc[bank][i] > 127) macc[bank][i] = 127;
            if (macc[bank][i] < -128) macc[bank][i] = -128;
          end
        end
      end
      @(posedge clk);
      #1;
      checks++;
      if (be !== mbe) begin failures++; $display("FAIL be n=%0d", n); end
      checks++;
      if (acc !== thr(bank)) begin failures++; $display("FAIL acc n=%0d bank %0d", n, bank); end
    end
    checks++;
    if (fb == 0 || scaled == 0) begin failures++; $display("FAIL feedback/scale not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
