// bitonic_net: last stage of Batcher's bitonic sorter for P pairs.
//
// Sorts a bitonic input (keys first non-decreasing, then non-increasing, as
// produced by min_select) into ascending key order. It has log2(P) layers of
// P/2 compare-exchange elements, k*2^(k-1) comparators for P = 2^k
// (4 for P = 4): in the layer of distance d, element i is compared with
// element i+d whenever bit d of i is clear.
//
// Purely combinational: merge_core registers its input and its output.
module bitonic_net
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
    for (int d = int'(P) / 2; d >= 1; d = d / 2) begin
      for (int i = 0; i < int'(P); i++) begin
        if ((i & d) == 0) begin
          cmp_swap(v[i], v[i+d], lo, hi);
          v[i]   = lo;
          v[i+d] = hi;
        end
      end
    end
    for (int i = 0; i < int'(P); i++) out_data[i] = v[i];
  end

endmodule
