// lrs_sum_tree: operation network that adds N W-bit terms modulo 2^W.
//
// Because modular addition is associative and commutative, the serial chain
// t0 + t1 + ... + t(N-1) can be regrouped into a balanced binary tree.  The
// terms are padded with zeros to P = 2^L leaves (L = ceil(log2 N)); level l+1
// holds the pairwise sums of level l, so the root is reached through L adders
// instead of N-1, while the number of useful adders stays N-1 (additions of a
// padding zero vanish in synthesis).  Purely combinational: sum_o follows
// terms_i in the same cycle.  The regrouping is the document's idea; pairing
// neighbouring terms level by level is this design's choice.
module lrs_sum_tree #(
  parameter int unsigned N = 6,
  parameter int unsigned W = 1024
) (
  input  logic [N-1:0][W-1:0] terms_i,
  output logic [W-1:0]        sum_o
);

  localparam int unsigned L = (N > 1) ? $clog2(N) : 0;
  localparam int unsigned P = 1 << L;

  // node[l][j]: j-th sum at level l (level 0 = the padded terms).
  logic [P-1:0][W-1:0] node [L+1];

  always_comb begin
    node[0] = '0;
    for (int j = 0; j < int'(N); j++) begin
      node[0][j] = terms_i[j];
    end
    for (int l = 1; l <= int'(L); l++) begin
      node[l] = '0;
      for (int j = 0; j < int'(P >> l); j++) begin
        node[l][j] = node[l-1][2*j] + node[l-1][2*j+1];
      end
    end
  end

  assign sum_o = node[L][0];

endmodule
