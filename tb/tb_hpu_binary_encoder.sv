// tb_hpu_binary_encoder: random sequences of load, bind and permute on the
// full 1024-bit Binary Encoder against a reference that permutes by
// rotating the whole vector left by one position.
module tb_hpu_binary_encoder;
  import hpu_pkg::*;
  localparam int unsigned D = 1024;
  logic clk = 0, rst_n = 0;
  be_op_e op = BE_HOLD;
  logic [D-1:0] vin = '0, vout, model;
  int checks = 0, failures = 0;
  int perms = 0;

  hpu_binary_encoder #(.D(D)) dut (.clk(clk), .rst_n(rst_n), .op_i(op), .vec_i(vin), .vec_o(vout));

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [D-1:0] rnd();
    logic [D-1:0] x;
    for (int w = 0; w < D / 32; w++) x[w*32 +: 32] = $urandom;
    return x;
  endfunction

  initial begin
    model = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      op  = be_op_e'($urandom_range(3));
      vin = rnd();
      case (op)
        BE_LOAD: model = vin;
        BE_PERM: begin model = {model[D-2:0], model[D-1]}; perms++; end
        BE_MULT: model = model ^ vin;
        default: ;
      endcase
      @(posedge clk);
      #1;
      checks++;
      if (vout !== model) begin failures++; $display("FAIL step %0d op %0d", n, op); end
    end
    checks++;
    if (perms == 0) begin failures++; $display("FAIL no permute exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
