// oddeven_net: Batcher odd-even merge sorting network for P pairs.
//
// First stage of the multi-rate sorter. Its input tuple is in no particular
// order, so the bitonic shortcut of the later stages does not apply and a full
// sorting network is used; the odd-even merge sort has the fewest
// comparators of Batcher's two constructions (5 for P = 4, depth 3).
// The comparator list is generated by Batcher's iterative rule: for every
// merge size p and distance k, pairs (i+j, i+j+k) that fall in the same
// 2p-sized group are compare-exchanged. Sorting is on the key only, in
// ascending order; all pairs of one tuple share one block number and rank.
//
// Purely combinational: the caller registers the output. P must be a power
// of two; P = 1 passes the pair through.
module oddeven_net
  import sort_pkg::*;
#(
  parameter int unsigned P = 4
) (
  input  pair_t [P-1:0] in_data,
  output pair_t [P-1:0] out_data
);

  always_comb begin
    pair_t v [P];
    pair_t lo, hi;
    for (int i = 0; i < int'(P); i++) v[i] = in_data[i];
    for (int p = 1; p < int'(P); p = p * 2) begin
      for (int k = p; k >= 1; k = k / 2) begin
        for (int j = k % p; j + k < int'(P); j = j + 2 * k) begin
          for (int i = 0; i < k; i++) begin
            if ((i + j + k < int'(P)) && ((i + j) / (2 * p) == (i + j + k) / (2 * p))) begin
              cmp_swap(v[i+j], v[i+j+k], lo, hi);
              v[i+j]   = lo;
              v[i+j+k] = hi;
            end
          end
        end
      end
    end
    for (int i = 0; i < int'(P); i++) out_data[i] = v[i];
  end

endmodule
