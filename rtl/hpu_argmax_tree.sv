// hpu_argmax_tree: comparator tree returning the largest of NIN values.
//
// Each input is a signed value with a tag (the register index or the address
// it belongs to) and a valid flag. A binary tree of compare-and-select nodes
// finds the largest valid value and its tag in one combinational pass. Invalid
// inputs never win; when no input is valid, valid_o is low. Equal values go to
// the lower input index. Used by both the Local and the Global Argmax Units.
module hpu_argmax_tree #(
  parameter int unsigned NIN   = 16,
  parameter int unsigned VAL_W = 8,
  parameter int unsigned TAG_W = 4
) (
  input  logic [NIN-1:0]              valid_i,
  input  logic [NIN-1:0][VAL_W-1:0]   val_i,
  input  logic [NIN-1:0][TAG_W-1:0]   tag_i,
  output logic                        valid_o,
  output logic [VAL_W-1:0]            val_o,
  output logic [TAG_W-1:0]            tag_o
);
  // Tree stored level by level in a heap layout: node n has children 2n+1 and
  // 2n+2; leaves start at LEAVES-1.
  localparam int unsigned LEAVES = (NIN > 1) ? (1 << $clog2(NIN)) : 1;
  localparam int unsigned NODES  = 2 * LEAVES - 1;

  logic [NODES-1:0]             nv;
  logic [NODES-1:0][VAL_W-1:0]  nval;
  logic [NODES-1:0][TAG_W-1:0]  ntag;

  always_comb begin
    for (int l = 0; l < int'(LEAVES); l++) begin
      if (l < int'(NIN)) begin
        nv[LEAVES-1+l]   = valid_i[l];
        nval[LEAVES-1+l] = val_i[l];
        ntag[LEAVES-1+l] = tag_i[l];
      end else begin
        nv[LEAVES-1+l]   = 1'b0;
        nval[LEAVES-1+l] = '0;
        ntag[LEAVES-1+l] = '0;
      end
    end
    for (int n = int'(LEAVES) - 2; n >= 0; n--) begin
      // The right child wins only if it is valid and strictly larger, or the
      // left child is invalid.
      if (nv[2*n+2] && (!nv[2*n+1] || ($signed(nval[2*n+2]) > $signed(nval[2*n+1])))) begin
        nv[n]   = 1'b1;
        nval[n] = nval[2*n+2];
        ntag[n] = ntag[2*n+2];
      end else begin
        nv[n]   = nv[2*n+1];
        nval[n] = nval[2*n+1];
        ntag[n] = ntag[2*n+1];
      end
    end
    valid_o = nv[0];
    val_o   = nval[0];
    tag_o   = ntag[0];
  end
endmodule
