// multipass_sorter: large-block sorter built from a streaming sorter, an
// external memory and a K-way merge tree.
//
// Blocks too large for on-chip memory are sorted in two passes:
//   pass 1  multirate_sorter turns the input stream into sorted runs of N
//           pairs, P pairs per cycle; rw_controller writes them, a page of C
//           tuples at a time, to external memory.
//   pass 2  rw_controller reads the runs back page by page into K
//           input_buffers, always refilling the emptiest one, and
//           kway_merge_tree merges each batch of K runs into one sorted
//           block of K*N pairs, P pairs per cycle.
// Both passes run at once: memory time alternates between writing pages of
// batch b and reading pages of batch b-1 (two halves of memory).
//
// Default configuration: P = 4 pairs of 128 bits per tuple, runs of
// N = 8192 pairs, K = 64, pages of C = 128 tuples (8 KB), latency allowance
// L = 10, giving input buffers of merge_buf_depth(64, 128, 10) = 792 tuples
// and output blocks of K*N = 524288 pairs (8 MB).
//
// Interfaces (all valid/ready unless noted):
//   in_*    P pairs per beat; in_last ends a block; feed full blocks of N
//           pairs, K of them per output block.
//   dram_*  page commands with addresses in tuples, write beats (no
//           backpressure) and read beats returned in request order.
//   out_*   P pairs per beat, ascending keys; out_batch numbers the output
//           block (wraps).
//   guard_hold  a write waits for the other memory half to be read.
//   tree_stall  buffered data is waiting but the merge tree delivers
//               nothing (one of its inputs is empty).
// The last tuples of the newest run and the newest output block stay inside
// until more input follows.
module multipass_sorter
  import sort_pkg::*;
#(
  parameter int unsigned P     = 4,
  parameter int unsigned N     = 8192,
  parameter int unsigned K     = 64,
  parameter int unsigned C     = 128,
  parameter int unsigned L     = 10,
  parameter int unsigned DEPTH = merge_buf_depth(K, C, L),
  parameter int unsigned NT    = N / P,
  parameter int unsigned BWT   = 8,
  parameter int unsigned LW    = $clog2(DEPTH + 1),
  parameter int unsigned AW    = 1 + $clog2(K) + $clog2(NT)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  pair_t [P-1:0] in_data,
  input  logic          in_last,
  output logic          dram_cmd_valid,
  input  logic          dram_cmd_ready,
  output logic          dram_cmd_write,
  output logic [AW-1:0] dram_cmd_addr,
  output logic          dram_wr_valid,
  output pair_t [P-1:0] dram_wr_data,
  input  logic          dram_rd_valid,
  input  pair_t [P-1:0] dram_rd_data,
  output logic          out_valid,
  input  logic          out_ready,
  output pair_t [P-1:0] out_data,
  output logic [BWT-1:0] out_batch,
  output logic          guard_hold,
  output logic          tree_stall,
  output logic [31:0]   batches_written
);

  localparam int unsigned S  = $clog2(NT);
  localparam int unsigned RW = (S > 0) ? S : 1;
  localparam int unsigned BW = RW + 2;

  // ---- pass 1: streaming sort -------------------------------------------------
  logic          s_valid, s_ready;
  pair_t [P-1:0] s_data;
  logic [BW-1:0] s_blk;

  multirate_sorter #(.P(P), .N(N)) u_srt (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_data, .in_last,
    .out_valid(s_valid), .out_ready(s_ready), .out_data(s_data), .out_blk(s_blk)
  );

  // ---- page scheduling --------------------------------------------------------
  logic [LW-1:0]  buf_level [K];
  logic [K-1:0]   buf_space, buf_reserve, buf_wr_valid;
  pair_t [P-1:0]  buf_wr_data;
  logic [BWT-1:0] buf_wr_blk;

  rw_controller #(.P(P), .K(K), .NT(NT), .C(C), .LW(LW), .BW(BWT), .AW(AW)) u_rw (
    .clk, .rst_n,
    .s_valid, .s_ready, .s_data,
    .cmd_valid(dram_cmd_valid), .cmd_ready(dram_cmd_ready), .cmd_write(dram_cmd_write),
    .cmd_addr(dram_cmd_addr), .wr_valid(dram_wr_valid), .wr_data(dram_wr_data),
    .rd_valid(dram_rd_valid), .rd_data(dram_rd_data),
    .buf_level, .buf_space, .buf_reserve, .buf_wr_valid, .buf_wr_data, .buf_wr_blk,
    .guard_hold, .batches_written
  );

  // ---- pass 2: input buffers and merge tree ----------------------------------
  logic           m_valid [K];
  logic           m_ready [K];
  pair_t [P-1:0]  m_data  [K];
  logic [BWT-1:0] m_blk   [K];
  logic [K-1:0]   nonempty;

  for (genvar i = 0; i < int'(K); i++) begin : g_buf
    input_buffer #(.P(P), .BW(BWT), .C(C), .DEPTH(DEPTH), .LW(LW)) u_ib (
      .clk, .rst_n,
      .reserve(buf_reserve[i]),
      .in_valid(buf_wr_valid[i]), .in_data(buf_wr_data), .in_blk(buf_wr_blk),
      .out_valid(m_valid[i]), .out_ready(m_ready[i]), .out_data(m_data[i]), .out_blk(m_blk[i]),
      .level(buf_level[i]), .page_space(buf_space[i])
    );
    assign nonempty[i] = m_valid[i];
  end

  kway_merge_tree #(.P(P), .K(K), .BW(BWT)) u_tree (
    .clk, .rst_n,
    .in_valid(m_valid), .in_ready(m_ready), .in_data(m_data), .in_blk(m_blk),
    .out_valid, .out_ready, .out_data, .out_blk(out_batch)
  );

  assign tree_stall = out_ready && !out_valid && (|nonempty);

  // Run boundaries are counted by rw_controller; the sorter's block number
  // is not needed.
  logic unused_blk;
  assign unused_blk = ^s_blk;

endmodule
