// kway_merge_tree: merges K sorted streams into one, rate P.
//
// A regular binary tree of K-1 merge_cores (log2(K) levels), numbered as a
// heap: node i merges the outputs of nodes 2i and 2i+1, and numbers K..2K-1
// stand for the K inputs; node 1 gives the output. Compared with a chain
// ("flattened" tree) it does fewer comparisons and has log2(K) rather than K
// merge latencies. Inputs carry a block number (the batch of runs they
// belong to), so successive batches come out one after the other; within a
// batch the order is by key. K must be a power of two, at least 2.
//
// Interface: valid/ready per input and at the output. A node fires only when
// both of its inputs hold data, so an empty input buffer stalls its subtree.
module kway_merge_tree
  import sort_pkg::*;
#(
  parameter int unsigned P  = 4,
  parameter int unsigned K  = 64,
  parameter int unsigned BW = 13
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid [K],
  output logic          in_ready [K],
  input  pair_t [P-1:0] in_data  [K],
  input  logic [BW-1:0] in_blk   [K],
  output logic          out_valid,
  input  logic          out_ready,
  output pair_t [P-1:0] out_data,
  output logic [BW-1:0] out_blk
);

  // Heap-numbered streams; index 0 unused.
  logic          v  [2*K];
  logic          r  [2*K];
  pair_t [P-1:0] d  [2*K];
  logic [BW-1:0] b  [2*K];
  logic          rk [2*K];

  for (genvar j = 0; j < int'(K); j++) begin : g_leaf
    assign v[K+j]      = in_valid[j];
    assign in_ready[j] = r[K+j];
    assign d[K+j]      = in_data[j];
    assign b[K+j]      = in_blk[j];
    assign rk[K+j]     = 1'b0;
  end

  for (genvar i = 1; i < int'(K); i++) begin : g_node
    merge_core #(.P(P), .BW(BW), .RW(1)) u_mrg (
      .clk, .rst_n,
      .a_valid(v[2*i]),   .a_ready(r[2*i]),   .a_data(d[2*i]),   .a_blk(b[2*i]),   .a_rank(rk[2*i]),
      .b_valid(v[2*i+1]), .b_ready(r[2*i+1]), .b_data(d[2*i+1]), .b_blk(b[2*i+1]), .b_rank(rk[2*i+1]),
      .out_valid(v[i]), .out_ready(r[i]), .out_data(d[i]), .out_blk(b[i]), .out_rank(rk[i])
    );
  end

  assign out_valid = v[1];
  assign r[1]      = out_ready;
  assign out_data  = d[1];
  assign out_blk   = b[1];

  // Stream 0 does not exist; the root's rank is always zero.
  assign v[0]  = 1'b0;
  assign r[0]  = 1'b0;
  assign d[0]  = '0;
  assign b[0]  = '0;
  assign rk[0] = 1'b0;
  logic unused;
  assign unused = ^{v[0], r[0], d[0], b[0], rk[0], rk[1]};

endmodule
