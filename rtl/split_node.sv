// split_node: sends each tuple of a merge stage to queue A or queue B.
//
// The queue is chosen by the parity of (block number XOR rank): within a
// block the two halves of every group alternate between A and B, and
// successive blocks alternate too, so that even a stream of one-tuple blocks
// keeps both queues of the merger supplied. The rank is halved on the way
// (a right shift), so that the merger of this stage sees the two halves of a
// group as equal-rank, and groups double in size from stage to stage.
//
// Combinational, valid/ready on all three sides.
module split_node
  import sort_pkg::*;
#(
  parameter int unsigned P  = 4,
  parameter int unsigned BW = 18,
  parameter int unsigned RW = 16
) (
  input  logic          in_valid,
  output logic          in_ready,
  input  pair_t [P-1:0] in_data,
  input  logic [BW-1:0] in_blk,
  input  logic [RW-1:0] in_rank,
  output logic          a_valid,
  input  logic          a_ready,
  output logic          b_valid,
  input  logic          b_ready,
  output pair_t [P-1:0] out_data,
  output logic [BW-1:0] out_blk,
  output logic [RW-1:0] out_rank
);

  logic to_b;

  assign to_b     = in_blk[0] ^ in_rank[0];
  assign a_valid  = in_valid && !to_b;
  assign b_valid  = in_valid &&  to_b;
  assign in_ready = to_b ? b_ready : a_ready;
  assign out_data = in_data;
  assign out_blk  = in_blk;
  assign out_rank = in_rank >> 1;

endmodule
