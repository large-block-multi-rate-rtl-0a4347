// multirate_sorter: single-pass streaming merge sort at rate P.
//
// Sorts blocks of up to N key-value pairs arriving as P pairs per cycle and
// delivers each block sorted (ascending key), also P pairs per cycle, while
// the next block is coming in. It is a merge sort unrolled in space: one
// hardware stage per merge level, all stages working at once on successive
// runs.
//
//   tagger       block number and rank per tuple (variable block sizes)
//   oddeven_net  stage 1: sorts the P pairs of each tuple (registered)
//   split_stage  stages for output runs of 2 and 4 tuples: split + 2 FIFOs
//                + merge_core
//   buffer_stage later stages: shared buffer of half a run + merge_core
// There are log2(N/P) merge stages; the last merges two half blocks.
//
// Interface: valid/ready. in_last marks the last tuple of a block. The
// output carries the block number; a block is complete when the block
// number changes. Blocks must be a multiple of P pairs. The tail of the
// newest block stays in the sorter until further input pushes it out.
// Steady rate: one tuple per cycle in and out. Latency about one block plus
// a few cycles per stage.
module multirate_sorter
  import sort_pkg::*;
#(
  parameter int unsigned P  = 4,
  parameter int unsigned N  = 262144,                    // max block size (pairs)
  parameter int unsigned S  = $clog2(N / P),             // merge stages
  parameter int unsigned RW = (S > 0) ? S : 1,           // rank width
  parameter int unsigned BW = RW + 2                     // block number width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  pair_t [P-1:0] in_data,
  input  logic          in_last,
  output logic          out_valid,
  input  logic          out_ready,
  output pair_t [P-1:0] out_data,
  output logic [BW-1:0] out_blk
);

  // Stream between stages: index 0 is the output of the input network.
  logic          sv  [S+1];
  logic          sr  [S+1];
  pair_t [P-1:0] sd  [S+1];
  logic [BW-1:0] sb  [S+1];
  logic [RW-1:0] srk [S+1];

  logic          t_valid, t_ready;
  pair_t [P-1:0] t_data, n_data;
  logic [BW-1:0] t_blk;
  logic [RW-1:0] t_rank;

  tagger #(.P(P), .NT(N / P), .BW(BW), .RW(RW)) u_tag (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_data, .in_last,
    .out_valid(t_valid), .out_ready(t_ready), .out_data(t_data),
    .out_blk(t_blk), .out_rank(t_rank)
  );

  oddeven_net #(.P(P)) u_net (.in_data(t_data), .out_data(n_data));

  assign t_ready = !sv[0] || sr[0];
  always_ff @(posedge clk) begin
    if (!rst_n) sv[0] <= 1'b0;
    else if (t_ready) sv[0] <= t_valid;
    if (t_ready && t_valid) begin
      sd[0]  <= n_data;
      sb[0]  <= t_blk;
      srk[0] <= t_rank;
    end
  end

  for (genvar r = 1; r <= int'(S); r++) begin : g_stage
    if (r <= 2) begin : g_spl
      split_stage #(.P(P), .BW(BW), .RW(RW), .R(r)) u_stage (
        .clk, .rst_n,
        .in_valid(sv[r-1]), .in_ready(sr[r-1]), .in_data(sd[r-1]),
        .in_blk(sb[r-1]), .in_rank(srk[r-1]),
        .out_valid(sv[r]), .out_ready(sr[r]), .out_data(sd[r]),
        .out_blk(sb[r]), .out_rank(srk[r])
      );
    end else begin : g_buf
      buffer_stage #(.P(P), .BW(BW), .RW(RW), .R(r)) u_stage (
        .clk, .rst_n,
        .in_valid(sv[r-1]), .in_ready(sr[r-1]), .in_data(sd[r-1]),
        .in_blk(sb[r-1]), .in_rank(srk[r-1]),
        .out_valid(sv[r]), .out_ready(sr[r]), .out_data(sd[r]),
        .out_blk(sb[r]), .out_rank(srk[r])
      );
    end
  end

  assign out_valid = sv[S];
  assign sr[S]     = out_ready;
  assign out_data  = sd[S];
  assign out_blk   = sb[S];

  // After the last stage every rank is zero.
  logic unused_rank;
  assign unused_rank = ^srk[S];

endmodule
