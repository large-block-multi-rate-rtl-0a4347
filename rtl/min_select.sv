// min_select: picks the P smallest of two sorted queues, rate P per cycle.
//
// This is the front end of the parallel merge. Queues A and B each hold a
// sorted run; their fronts are a0 <= a1 <= ... and b0 <= b1 <= ... . The P
// smallest elements of both are a0..a(k-1) together with b0..b(P-k-1) for a
// unique k, and k is found with exactly P comparisons:
//   t[j] = a[j] < b[P-1-j],  j = 0..P-1
// t is a thermometer code (true for j < k), so k = number of true t[j], and
// the element at position i is t[i] ? a[i] : b[P-1-i]. That sequence,
// a0..a(k-1) followed by b(P-k-1)..b0, rises then falls: it is bitonic and
// bitonic_net sorts it. No value is fed back, so unlike a merger that sorts
// 2P values and recirculates the larger half, only the offset update below
// closes a loop and the datapath pipelines freely.
//
// Order: elements compare as (block, rank, key). Block numbers are compared
// as serial numbers (the wrapped difference is negative for the older
// block), so they may wrap around; the window of blocks in flight must stay
// below half the block-number range. Ties take B first.
//
// Queue fronts: each side keeps a window of up to three tuples and an offset
// (0..P-1) of its first unconsumed element. The P front elements span at most
// the first two tuples, so a side is usable when it holds one tuple at offset
// 0, or two tuples. After a firing the offset grows by k (or P-k); when it
// passes P the front tuple is dropped, so each side consumes at most one
// tuple per cycle. a_ready/b_ready are registered (a free third slot), which
// is enough to sustain one tuple per cycle across both sides.
//
// Output: one registered tuple per firing with the P chosen pairs in bitonic
// order, the block number and rank of the group they belong to, and k.
// Latency one cycle; throughput one tuple per cycle while both sides hold data
// and out_ready is high.
module min_select
  import sort_pkg::*;
#(
  parameter int unsigned P  = 4,
  parameter int unsigned BW = 18,
  parameter int unsigned RW = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // queue A
  input  logic                  a_valid,
  output logic                  a_ready,
  input  pair_t [P-1:0]         a_data,
  input  logic [BW-1:0]         a_blk,
  input  logic [RW-1:0]         a_rank,
  // queue B
  input  logic                  b_valid,
  output logic                  b_ready,
  input  pair_t [P-1:0]         b_data,
  input  logic [BW-1:0]         b_blk,
  input  logic [RW-1:0]         b_rank,
  // P smallest, bitonic order
  output logic                  out_valid,
  input  logic                  out_ready,
  output pair_t [P-1:0]         out_data,
  output logic [BW-1:0]         out_blk,
  output logic [RW-1:0]         out_rank,
  output logic [$clog2(P+1)-1:0] out_k
);

  localparam int unsigned OFW = $clog2(2 * P) < 1 ? 1 : $clog2(2 * P);
  localparam int unsigned KW  = $clog2(P + 1);

  typedef struct packed {
    pair_t [P-1:0]   d;
    logic [BW-1:0]   blk;
    logic [RW-1:0]   rank;
  } tup_t;

  typedef struct packed {
    pair_t           p;
    logic [BW-1:0]   blk;
    logic [RW-1:0]   rank;
  } elem_t;

  // Element i of a side's front, given its window and offset.
  function automatic elem_t front(tup_t w0, tup_t w1, logic [OFW-1:0] off, int i);
    int   idx;
    tup_t t;
    elem_t e;
    idx    = int'(off) + i;
    t      = (idx < int'(P)) ? w0 : w1;
    e.p    = t.d[idx % int'(P)];
    e.blk  = t.blk;
    e.rank = t.rank;
    return e;
  endfunction

  // x < y in (block, rank, key) order; block numbers as serial numbers.
  function automatic logic elem_lt(elem_t x, elem_t y);
    logic [BW-1:0] diff;
    diff = x.blk - y.blk;
    if (x.blk != y.blk) return diff[BW-1];
    if (x.rank != y.rank) return x.rank < y.rank;
    return x.p.key < y.p.key;
  endfunction

  // side 0 = A, side 1 = B
  tup_t            win   [2][3];
  logic [1:0]      cnt   [2];
  logic [OFW-1:0]  off   [2];
  tup_t            win_n [2][3];
  logic [1:0]      cnt_n [2];
  logic [OFW-1:0]  off_n [2];

  logic            in_valid [2];
  tup_t            in_tup   [2];
  logic            side_ok  [2];
  logic [KW-1:0]   take     [2];

  elem_t           ea [P];
  elem_t           eb [P];
  logic [P-1:0]    t;
  logic [KW-1:0]   k;
  logic            fire;

  assign in_valid[0] = a_valid;
  assign in_valid[1] = b_valid;
  assign in_tup[0]   = '{d: a_data, blk: a_blk, rank: a_rank};
  assign in_tup[1]   = '{d: b_data, blk: b_blk, rank: b_rank};
  assign a_ready     = (cnt[0] != 2'd3);
  assign b_ready     = (cnt[1] != 2'd3);

  always_comb begin
    for (int s = 0; s < 2; s++)
      side_ok[s] = (cnt[s] != 2'd0) && ((off[s] == '0) || (cnt[s] >= 2'd2));
    for (int j = 0; j < int'(P); j++) begin
      ea[j] = front(win[0][0], win[0][1], off[0], j);
      eb[j] = front(win[1][0], win[1][1], off[1], j);
    end
    for (int j = 0; j < int'(P); j++)
      t[j] = elem_lt(ea[j], eb[int'(P)-1-j]);
    k = '0;
    for (int j = 0; j < int'(P); j++)
      k = k + KW'(t[j]);
    fire    = side_ok[0] && side_ok[1] && (!out_valid || out_ready);
    take[0] = k;
    take[1] = KW'(P) - k;
  end

  // Window and offset update: drop the front tuple when it is used up,
  // then append an accepted input tuple.
  always_comb begin
    for (int s = 0; s < 2; s++) begin
      logic [OFW:0] sum;
      logic [1:0]   c;
      for (int i = 0; i < 3; i++) win_n[s][i] = win[s][i];
      c      = cnt[s];
      sum    = {1'b0, off[s]} + (fire ? (OFW+1)'(take[s]) : '0);
      off_n[s] = OFW'(sum);
      if (sum >= (OFW+1)'(P)) begin
        off_n[s]    = OFW'(sum - (OFW+1)'(P));
        win_n[s][0] = win[s][1];
        win_n[s][1] = win[s][2];
        c           = c - 2'd1;
      end
      if (in_valid[s] && (cnt[s] != 2'd3)) begin
        win_n[s][c] = in_tup[s];
        c           = c + 2'd1;
      end
      cnt_n[s] = c;
    end
  end

  always_ff @(posedge clk) begin
    for (int s = 0; s < 2; s++) begin
      for (int i = 0; i < 3; i++) win[s][i] <= win_n[s][i];
      off[s] <= off_n[s];
    end
    if (!rst_n) begin
      for (int s = 0; s < 2; s++) begin
        cnt[s] <= '0;
        off[s] <= '0;
      end
    end else begin
      for (int s = 0; s < 2; s++) cnt[s] <= cnt_n[s];
    end
  end

  // Output register
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
    end else if (fire) begin
      out_valid <= 1'b1;
    end else if (out_ready) begin
      out_valid <= 1'b0;
    end
    if (fire) begin
      for (int i = 0; i < int'(P); i++)
        out_data[i] <= t[i] ? ea[i].p : eb[int'(P)-1-i].p;
      out_blk  <= t[0] ? ea[0].blk  : eb[0].blk;
      out_rank <= t[0] ? ea[0].rank : eb[0].rank;
      out_k    <= k;
    end
  end

endmodule
