// hpu_ca90: one step of the rule-90 cellular automaton on a D-bit vector.
//
// Every output bit is the XOR of the two input bits next to it, with the vector
// treated as a ring: out[i] = in[i-1] ^ in[i+1], indices taken modulo D. The
// VMUs use it to grow the next fold of an item vector from the previous one, so
// that only a D-bit seed per item has to be stored. Purely combinational.
module hpu_ca90 #(
  parameter int unsigned D = 1024
) (
  input  logic [D-1:0] vec_i,
  output logic [D-1:0] vec_o
);
  always_comb begin
    for (int i = 0; i < D; i++) begin
      vec_o[i] = vec_i[(i + D - 1) % D] ^ vec_i[(i + 1) % D];
    end
  end
endmodule
