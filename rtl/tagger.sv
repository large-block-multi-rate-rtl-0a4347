// tagger: numbers blocks and the tuples inside them.
//
// The sorter accepts blocks of any size from P up to N pairs (a multiple of
// P; pad a block otherwise). To keep blocks apart and to let every merge
// stage work without knowing block sizes, each tuple gets
//   block number: incremented after the last tuple of a block (wraps),
//   rank:         index of the tuple within its block, 0, 1, 2, ...
// Sorting then uses the order (block, rank, key); every merge stage halves
// the rank, so stage r merges groups of 2^r tuples and the last stage sees
// the whole block as one group. A block ends on in_last or when it reaches
// N/P tuples, whichever comes first.
//
// Combinational data path with registered counters; valid/ready.
module tagger
  import sort_pkg::*;
#(
  parameter int unsigned P  = 4,
  parameter int unsigned NT = 65536,   // maximum block size in tuples (N/P)
  parameter int unsigned BW = 18,
  parameter int unsigned RW = 16
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
  output logic [BW-1:0] out_blk,
  output logic [RW-1:0] out_rank
);

  logic [BW-1:0] blk;
  logic [RW-1:0] rank;
  logic          fire, end_blk;

  assign out_valid = in_valid;
  assign in_ready  = out_ready;
  assign out_data  = in_data;
  assign out_blk   = blk;
  assign out_rank  = rank;
  assign fire      = in_valid && out_ready;
  assign end_blk   = in_last || (rank == RW'(NT - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      blk  <= '0;
      rank <= '0;
    end else if (fire) begin
      if (end_blk) begin
        blk  <= blk + BW'(1);
        rank <= '0;
      end else begin
        rank <= rank + RW'(1);
      end
    end
  end

endmodule
