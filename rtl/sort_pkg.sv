// sort_pkg: types and constants shared by the streaming sorter.
//
// Every record is a key-value pair: a 64-bit key that decides the order and a
// 64-bit value that travels with it (a reference to the real data), 128 bits
// in all, as in the sorter's problem statement. Records move in tuples of P
// pairs; every tuple carries one block number and one rank (see tagger.sv),
// which extend the key lexicographically: (block, rank, key).
//
// merge_buf_depth() gives the size of one input buffer of the K-way merge
// tree, from the buffer-sizing bound of the multi-pass design:
//   b(2) = 2(C+L),  b(k) = k (b(k-1)+C+L) / (k-1),  depth = b(K)/K + C + L
// with C the page size and L the total refill latency, all in tuples. The
// divisions are rounded up here so the depth is never below the bound.
package sort_pkg;

  localparam int unsigned KEY_W = 64;
  localparam int unsigned VAL_W = 64;

  typedef logic [KEY_W-1:0] key_t;
  typedef logic [VAL_W-1:0] val_t;

  typedef struct packed {
    key_t key;
    val_t val;
  } pair_t;

  localparam int unsigned PAIR_W = $bits(pair_t);

  // Compare-and-exchange on the key: lo gets the smaller key.
  function automatic void cmp_swap(input pair_t a, input pair_t b,
                                   output pair_t lo, output pair_t hi);
    if (b.key < a.key) begin
      lo = b;
      hi = a;
    end else begin
      lo = a;
      hi = b;
    end
  endfunction

  // Ceiling division for elaboration-time arithmetic.
  function automatic longint unsigned cdiv(longint unsigned a, longint unsigned b);
    return (a + b - 1) / b;
  endfunction

  // Witness s = b(K) of the no-stall proof (in tuples).
  function automatic longint unsigned buf_witness(longint unsigned k, longint unsigned c,
                                                  longint unsigned l);
    longint unsigned s;
    s = 2 * (c + l);
    for (longint unsigned i = 3; i <= k; i++)
      s = cdiv(i * (s + c + l), i - 1);
    return s;
  endfunction

  // Depth of each of the K input buffers of the merge tree (in tuples).
  function automatic int unsigned merge_buf_depth(int unsigned k, int unsigned c,
                                                  int unsigned l);
    longint unsigned kk, cc, ll;
    kk = 64'(k);
    cc = 64'(c);
    ll = 64'(l);
    return int'(cdiv(buf_witness(kk, cc, ll), kk) + cc + ll);
  endfunction

endpackage
