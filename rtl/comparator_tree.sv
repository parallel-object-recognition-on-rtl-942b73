// comparator_tree: maximum of IN votes, and the index of the input holding it.
//
// A binary tree of compare-select nodes, log2(IN) levels deep, built as a
// heap: leaves 2^L..2^(L+1)-1 hold the inputs, node k compares its children
// 2k and 2k+1 and forwards the larger vote with its index.  When the two
// votes are equal the left (lower-index) child wins, so the result is the
// lowest-index maximum.  Input counts that are not a power of two are
// padded with zero votes, which can never win against a real input.
// Purely combinational.  The document uses this tree with 8 inputs inside a
// PE and across the PEs for the global maximum; the tie rule and padding
// are this design's own choices.
module comparator_tree #(
  parameter int unsigned IN = 8,
  parameter int unsigned VW = 8
) (
  input  logic [IN-1:0][VW-1:0]                  vals,
  output logic [VW-1:0]                          max_val,
  output logic [(IN > 1 ? $clog2(IN) : 1)-1:0]   max_idx
);

  localparam int unsigned IW     = (IN > 1) ? $clog2(IN) : 1;
  localparam int unsigned LEAVES = 1 << IW;

  logic [2*LEAVES-1:1][VW-1:0] node_v;
  logic [2*LEAVES-1:1][IW-1:0] node_i;

  always_comb begin
    for (int unsigned k = 0; k < LEAVES; k++) begin
      node_v[LEAVES + k] = (k < IN) ? vals[k] : '0;
      node_i[LEAVES + k] = IW'(k);
    end
    for (int k = LEAVES - 1; k >= 1; k--) begin
      if (node_v[2*k+1] > node_v[2*k]) begin
        node_v[k] = node_v[2*k+1];
        node_i[k] = node_i[2*k+1];
      end else begin
        node_v[k] = node_v[2*k];
        node_i[k] = node_i[2*k];
      end
    end
  end

  assign max_val = node_v[1];
  assign max_idx = node_i[1];

endmodule
