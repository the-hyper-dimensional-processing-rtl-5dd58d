// tb_hpu_bcu: drives random operations into one Binary Compute Unit and
// compares its bit with a reference model of load / previous / XOR / hold.
module tb_hpu_bcu;
  import hpu_pkg::*;
  logic clk = 0, rst_n = 0, in_b = 0, prev_b = 0, q;
  be_op_e op = BE_HOLD;
  logic model;
  int checks = 0, failures = 0;

  hpu_bcu dut (.clk(clk), .rst_n(rst_n), .op_i(op), .in_i(in_b), .prev_i(prev_b), .q_o(q));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    checks++;
    if (q !== 1'b0) begin failures++; $display("FAIL reset"); end
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      op = be_op_e'($urandom_range(3));
      in_b = 1'($urandom);
      prev_b = 1'($urandom);
      case (op)
        BE_LOAD: model = in_b;
        BE_PERM: model = prev_b;
        BE_MULT: model = model ^ in_b;
        default: ;
      endcase
      @(posedge clk);
      #1;
      checks++;
      if (q !== model) begin failures++; $display("FAIL op %0d", op); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
