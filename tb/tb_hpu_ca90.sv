// tb_hpu_ca90: checks one rule-90 step against a shift-based reference,
// out = rotate_right(v) ^ rotate_left(v), on random vectors and on a single
// set bit (which must light its two neighbours, wrapping around the ends).
module tb_hpu_ca90;
  localparam int unsigned D = 1024;
  logic [D-1:0] v, o, ref_o;
  int checks = 0, failures = 0;

  hpu_ca90 #(.D(D)) dut (.vec_i(v), .vec_o(o));

  task automatic check(input logic [D-1:0] x);
    v = x;
    #1;
    ref_o = {x[0], x[D-1:1]} ^ {x[D-2:0], x[D-1]};
    checks++;
    if (o !== ref_o) begin
      failures++;
      $display("FAIL ca90 mismatch");
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [D-1:0] x;
    check('0);
    check({{(D-1){1'b0}}, 1'b1});
    check({1'b1, {(D-1){1'b0}}});
    for (int n = 0; n < 200; n++) begin
      for (int w = 0; w < D / 32; w++) x[w*32 +: 32] = $urandom;
      check(x);
    end
    // single bit at position 0 must give bits 1 and D-1
    v = D'(1);
    #1;
    checks++;
    if (!(o[1] && o[D-1] && $countones(o) == 2)) begin
      failures++;
      $display("FAIL ring neighbours");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
