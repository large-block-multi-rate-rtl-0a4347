// split_stage: one merge stage of the sorter for short runs.
//
// Used for the stages right after the input network (output runs of 2 and 4
// tuples for P = 4). split_node deals the incoming tuples to two FIFOs, the
// A and B edges, and merge_core merges them into runs twice as long. These
// stages are small, so each edge simply gets its own FIFO of DEPTH tuples; a
// full output run (2^R tuples) per edge keeps a stage from ever blocking on
// unequal halves, whatever the block sizes.
//
// Interface: valid/ready tuple streams. Rate one tuple per cycle; the latency
// of a tuple is about half a run plus four cycles.
module split_stage
  import sort_pkg::*;
#(
  parameter int unsigned P     = 4,
  parameter int unsigned BW    = 18,
  parameter int unsigned RW    = 16,
  parameter int unsigned R     = 1,          // log2 of the output run in tuples
  parameter int unsigned DEPTH = (1 << R)    // tuples per edge FIFO
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

  localparam int unsigned TW = P * PAIR_W + BW + RW;

  logic          sa_valid, sa_ready, sb_valid, sb_ready;
  pair_t [P-1:0] s_data;
  logic [BW-1:0] s_blk;
  logic [RW-1:0] s_rank;

  logic          qa_valid, qa_ready, qb_valid, qb_ready;
  logic [TW-1:0] qa_data, qb_data;
  logic [$clog2(DEPTH+1)-1:0] qa_cnt, qb_cnt;

  split_node #(.P(P), .BW(BW), .RW(RW)) u_spl (
    .in_valid, .in_ready, .in_data, .in_blk, .in_rank,
    .a_valid(sa_valid), .a_ready(sa_ready),
    .b_valid(sb_valid), .b_ready(sb_ready),
    .out_data(s_data), .out_blk(s_blk), .out_rank(s_rank)
  );

  tuple_fifo #(.W(TW), .DEPTH(DEPTH)) u_qa (
    .clk, .rst_n,
    .in_valid(sa_valid), .in_ready(sa_ready), .in_data({s_data, s_blk, s_rank}),
    .out_valid(qa_valid), .out_ready(qa_ready), .out_data(qa_data), .count(qa_cnt)
  );

  tuple_fifo #(.W(TW), .DEPTH(DEPTH)) u_qb (
    .clk, .rst_n,
    .in_valid(sb_valid), .in_ready(sb_ready), .in_data({s_data, s_blk, s_rank}),
    .out_valid(qb_valid), .out_ready(qb_ready), .out_data(qb_data), .count(qb_cnt)
  );

  merge_core #(.P(P), .BW(BW), .RW(RW)) u_mrg (
    .clk, .rst_n,
    .a_valid(qa_valid), .a_ready(qa_ready),
    .a_data(qa_data[TW-1 -: P*PAIR_W]), .a_blk(qa_data[RW +: BW]), .a_rank(qa_data[RW-1:0]),
    .b_valid(qb_valid), .b_ready(qb_ready),
    .b_data(qb_data[TW-1 -: P*PAIR_W]), .b_blk(qb_data[RW +: BW]), .b_rank(qb_data[RW-1:0]),
    .out_valid, .out_ready, .out_data, .out_blk, .out_rank
  );

  // The fill levels are not needed here.
  logic unused_cnt;
  assign unused_cnt = ^{qa_cnt, qb_cnt};

endmodule
