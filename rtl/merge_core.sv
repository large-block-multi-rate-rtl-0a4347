// merge_core: two-input streaming merger of rate P (one tuple per cycle).
//
// Merges two sorted streams of tuples, A and B, into one sorted stream:
// min_select takes the P smallest front elements as a bitonic sequence and
// registers it; bitonic_net sorts that sequence and the result is registered
// again. It is the merge node of every sorter stage from the second on and
// of every node of the K-way merge tree.
//
// Interface: valid/ready streams of tuples (P pairs, block number, rank).
// Order is (block, rank, key); see min_select. Latency two cycles from the
// firing of min_select; one tuple per cycle sustained. Like any dataflow
// merge it fires only when both inputs hold data, so the tail of the last
// run stays inside until more input arrives.
module merge_core
  import sort_pkg::*;
#(
  parameter int unsigned P  = 4,
  parameter int unsigned BW = 18,
  parameter int unsigned RW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          a_valid,
  output logic          a_ready,
  input  pair_t [P-1:0] a_data,
  input  logic [BW-1:0] a_blk,
  input  logic [RW-1:0] a_rank,
  input  logic          b_valid,
  output logic          b_ready,
  input  pair_t [P-1:0] b_data,
  input  logic [BW-1:0] b_blk,
  input  logic [RW-1:0] b_rank,
  output logic          out_valid,
  input  logic          out_ready,
  output pair_t [P-1:0] out_data,
  output logic [BW-1:0] out_blk,
  output logic [RW-1:0] out_rank
);

  logic                   ms_valid, ms_ready;
  pair_t [P-1:0]          ms_data, srt_data;
  logic [BW-1:0]          ms_blk;
  logic [RW-1:0]          ms_rank;
  logic [$clog2(P+1)-1:0] ms_k;

  min_select #(.P(P), .BW(BW), .RW(RW)) u_pss (
    .clk, .rst_n,
    .a_valid, .a_ready, .a_data, .a_blk, .a_rank,
    .b_valid, .b_ready, .b_data, .b_blk, .b_rank,
    .out_valid(ms_valid), .out_ready(ms_ready), .out_data(ms_data),
    .out_blk(ms_blk), .out_rank(ms_rank), .out_k(ms_k)
  );

  bitonic_net #(.P(P)) u_bnet (.in_data(ms_data), .out_data(srt_data));

  assign ms_ready = !out_valid || out_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else if (ms_ready) out_valid <= ms_valid;
    if (ms_ready && ms_valid) begin
      out_data <= srt_data;
      out_blk  <= ms_blk;
      out_rank <= ms_rank;
    end
  end

  // ms_k (how many came from A) is for observation only.
  logic unused_k;
  assign unused_k = ^ms_k;

endmodule
