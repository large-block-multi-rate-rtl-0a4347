// buffer_stage: one merge stage of the sorter for long runs.
//
// Used from the fourth stage on (output runs of 8 tuples and more for
// P = 4), where the queues are large. shared_buffer keeps queues A and B in
// one memory of SLOTS tuples, about half an output run, and refills
// whichever input of merge_core it drained; merge_core merges the two halves
// of every group into one run of 2^R tuples. SLOTS is half a run plus one
// (what the two queues hold together while the merger keeps pace) plus 8
// tuples of slack: for the read pipeline, and because the merger must wait
// for the other side's next run when one side's run ends first, which
// leaves the tail of the longer run in the buffer for a while.
//
// Interface: valid/ready tuple streams; rank halved by the buffer. Rate one
// tuple per cycle once a stage has filled.
module buffer_stage
  import sort_pkg::*;
#(
  parameter int unsigned P     = 4,
  parameter int unsigned BW    = 18,
  parameter int unsigned RW    = 16,
  parameter int unsigned R     = 3,                      // log2 output run (tuples)
  parameter int unsigned SLOTS = (1 << (R - 1)) + 9      // half a run + 1 + 8 slack
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  pair_t [P-1:0] in_data,
  input  logic [BW-1:0] in_blk,
  input  logic [RW-1:0] in_rank,
  output logic          out_valid,
  input  logic          out_ready,
  output pair_t [P-1:0] out_data,
  output logic [BW-1:0] out_blk,
  output logic [RW-1:0] out_rank
);

  logic          a_valid, a_ready, b_valid, b_ready;
  pair_t [P-1:0] a_data, b_data;
  logic [BW-1:0] a_blk, b_blk;
  logic [RW-1:0] a_rank, b_rank;
  logic [$clog2(SLOTS+1)-1:0] occupancy;

  shared_buffer #(.P(P), .BW(BW), .RW(RW), .SLOTS(SLOTS)) u_buf (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_data, .in_blk, .in_rank,
    .a_valid, .a_ready, .a_data, .a_blk, .a_rank,
    .b_valid, .b_ready, .b_data, .b_blk, .b_rank,
    .occupancy
  );

  merge_core #(.P(P), .BW(BW), .RW(RW)) u_mrg (
    .clk, .rst_n,
    .a_valid, .a_ready, .a_data, .a_blk, .a_rank,
    .b_valid, .b_ready, .b_data, .b_blk, .b_rank,
    .out_valid, .out_ready, .out_data, .out_blk, .out_rank
  );

  logic unused_occ;
  assign unused_occ = ^occupancy;

endmodule
