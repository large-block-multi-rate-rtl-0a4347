// input_buffer: one input queue of the K-way merge tree.
//
// Pages of C tuples read from external memory land here and the merge tree
// drains them. For the memory never to sit idle, there must always be one
// buffer with room for a whole page while the tree may stall on an empty
// one; refilling the fullest-empty (minimum-occupancy) buffer first bounds
// the occupancy, so that DEPTH = b(K)/K + C + L suffices (see
// sort_pkg::merge_buf_depth).
//
// The scheduler reserves a page with a one-cycle 'reserve' pulse when it
// issues the read; the page's C tuples arrive later on in_valid (no ready:
// the reservation guarantees room, which an assertion checks). level counts
// stored plus reserved tuples and is what the scheduler compares;
// page_space says C more tuples fit. Storage is a FIFO of DEPTH tuples.
module input_buffer
  import sort_pkg::*;
#(
  parameter int unsigned P     = 4,
  parameter int unsigned BW    = 13,
  parameter int unsigned C     = 128,   // page size in tuples
  parameter int unsigned DEPTH = 792,   // tuples
  parameter int unsigned LW    = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          reserve,
  input  logic          in_valid,
  input  pair_t [P-1:0] in_data,
  input  logic [BW-1:0] in_blk,
  output logic          out_valid,
  input  logic          out_ready,
  output pair_t [P-1:0] out_data,
  output logic [BW-1:0] out_blk,
  output logic [LW-1:0] level,
  output logic          page_space
);

  localparam int unsigned TW = P * PAIR_W + BW;

  logic          q_in_ready;
  logic [TW-1:0] q_out;
  logic [LW-1:0] count, pending;

  tuple_fifo #(.W(TW), .DEPTH(DEPTH)) u_q (
    .clk, .rst_n,
    .in_valid, .in_ready(q_in_ready), .in_data({in_data, in_blk}),
    .out_valid, .out_ready, .out_data(q_out), .count
  );

  assign {out_data, out_blk} = q_out;

  always_ff @(posedge clk) begin
    if (!rst_n) pending <= '0;
    else pending <= pending + (reserve ? LW'(C) : '0) - LW'(in_valid);
  end

  assign level      = count + pending;
  assign page_space = (level <= LW'(DEPTH - C));

  a_room: assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> q_in_ready)
    else $error("input_buffer: page data arrived without room");

endmodule
