// shared_buffer: both input queues of a merge stage in one memory.
//
// A merge stage with output runs of n elements receives two runs of n/2, A
// and B. Kept on separate edges, each queue needs room for a whole half run,
// although together they never hold much more than n/2: while B arrives the
// merger drains A and B at the rate B comes in. Here A and B share SLOTS
// places of one memory (about half a run, n/(2P)+1 tuples, plus a little
// slack), which halves the memory of the large stages.
//
// Because the two queues grow and shrink at both ends independently, a
// tuple is stored wherever a place is free and each queue is a list of
// place indices (indirection), held in two index FIFOs. A third index FIFO
// lists freed places; places never used yet are handed out by a counter
// after reset, so no list needs initialising.
//
//   write: an input tuple is dealt to A or B by the parity of
//          (block XOR rank) as in split_node, its rank is halved, it is
//          written to a free place and the place is appended to that
//          queue's index list.
//   read:  one place per cycle is read (synchronous memory read) from the
//          head of the A or B list, whichever side has less data waiting
//          for the merger, into a small output queue of that side (OQ
//          entries); the place goes back to the free list. The merger's
//          consumption is thus what decides which side is refilled. The
//          merger may take a tuple from both sides in one cycle while only
//          one place is read per cycle, so the output queues are four deep
//          to ride out such bursts; with two entries a side now and then
//          ran dry and the stage lost a cycle.
//
// One write and one read per cycle: a simple dual-port memory. in_ready
// drops when no place is free. occupancy counts places in use.
module shared_buffer
  import sort_pkg::*;
#(
  parameter int unsigned P     = 4,
  parameter int unsigned BW    = 18,
  parameter int unsigned RW    = 16,
  parameter int unsigned SLOTS = 9
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  pair_t [P-1:0] in_data,
  input  logic [BW-1:0] in_blk,
  input  logic [RW-1:0] in_rank,
  output logic          a_valid,
  input  logic          a_ready,
  output pair_t [P-1:0] a_data,
  output logic [BW-1:0] a_blk,
  output logic [RW-1:0] a_rank,
  output logic          b_valid,
  input  logic          b_ready,
  output pair_t [P-1:0] b_data,
  output logic [BW-1:0] b_blk,
  output logic [RW-1:0] b_rank,
  output logic [$clog2(SLOTS+1)-1:0] occupancy
);

  localparam int unsigned TW = P * PAIR_W + BW + RW;
  localparam int unsigned SW = (SLOTS > 1) ? $clog2(SLOTS) : 1;
  localparam int unsigned CW = $clog2(SLOTS + 1);

  logic [TW-1:0] mem [SLOTS];

  // ---- place allocation ----------------------------------------------------
  logic [CW-1:0] next_new;
  logic          free_valid, free_pop, free_push;
  logic [SW-1:0] free_head, rd_slot;
  logic [CW-1:0] free_cnt;
  logic          slot_avail, use_new;
  logic [SW-1:0] wr_slot;

  assign use_new    = !free_valid;
  assign slot_avail = free_valid || (next_new != CW'(SLOTS));
  assign wr_slot    = free_valid ? free_head : SW'(next_new);

  // ---- index lists of A and B ---------------------------------------------
  logic          to_b, wr_fire;
  logic          idx_in_valid [2], idx_in_ready [2];
  logic          idx_valid [2], idx_pop [2];
  logic [SW-1:0] idx_head [2];
  logic [CW-1:0] idx_cnt [2];

  assign to_b            = in_blk[0] ^ in_rank[0];
  assign in_ready        = slot_avail && (to_b ? idx_in_ready[1] : idx_in_ready[0]);
  assign wr_fire         = in_valid && in_ready;
  assign idx_in_valid[0] = wr_fire && !to_b;
  assign idx_in_valid[1] = wr_fire &&  to_b;
  assign free_pop        = wr_fire && free_valid;

  for (genvar s = 0; s < 2; s++) begin : g_idx
    tuple_fifo #(.W(SW), .DEPTH(SLOTS)) u_idx (
      .clk, .rst_n,
      .in_valid(idx_in_valid[s]), .in_ready(idx_in_ready[s]), .in_data(wr_slot),
      .out_valid(idx_valid[s]), .out_ready(idx_pop[s]), .out_data(idx_head[s]),
      .count(idx_cnt[s])
    );
  end

  logic free_in_ready;
  tuple_fifo #(.W(SW), .DEPTH(SLOTS)) u_free (
    .clk, .rst_n,
    .in_valid(free_push), .in_ready(free_in_ready), .in_data(rd_slot),
    .out_valid(free_valid), .out_ready(free_pop), .out_data(free_head),
    .count(free_cnt)
  );

  always_ff @(posedge clk) begin
    if (wr_fire) mem[wr_slot] <= {in_data, in_blk, in_rank >> 1};
    if (!rst_n) next_new <= '0;
    else if (wr_fire && use_new) next_new <= next_new + CW'(1);
  end

  assign occupancy = next_new - free_cnt;

  // ---- refill of the merger's two inputs ------------------------------------
  localparam int unsigned OQ = 4;

  logic          inflight [2];
  logic [2:0]    oq_cnt [2];
  logic          oq_in_ready [2], oq_valid [2], oq_ready [2];
  logic [TW-1:0] oq_data [2];
  logic [TW-1:0] rd_data;
  logic          want [2];
  logic [2:0]    pend [2];
  logic          rd_side, rd_fire, rr;

  always_comb begin
    for (int s = 0; s < 2; s++) begin
      pend[s] = oq_cnt[s] + 3'(inflight[s]);
      want[s] = idx_valid[s] && (pend[s] < 3'(OQ));
    end
    rd_fire = want[0] || want[1];
    if (want[0] && want[1])
      rd_side = (pend[0] == pend[1]) ? rr : (pend[1] < pend[0]);
    else
      rd_side = want[1];
    idx_pop[0] = rd_fire && !rd_side;
    idx_pop[1] = rd_fire &&  rd_side;
    rd_slot    = idx_head[rd_side];
    free_push  = rd_fire;
  end

  always_ff @(posedge clk) begin
    if (rd_fire) rd_data <= mem[rd_slot];
    if (!rst_n) begin
      inflight[0] <= 1'b0;
      inflight[1] <= 1'b0;
      rr          <= 1'b0;
    end else begin
      inflight[0] <= idx_pop[0];
      inflight[1] <= idx_pop[1];
      if (want[0] && want[1] && (pend[0] == pend[1])) rr <= !rr;
    end
  end

  for (genvar s = 0; s < 2; s++) begin : g_oq
    logic [2:0] cnt_full;
    tuple_fifo #(.W(TW), .DEPTH(OQ)) u_oq (
      .clk, .rst_n,
      .in_valid(inflight[s]), .in_ready(oq_in_ready[s]), .in_data(rd_data),
      .out_valid(oq_valid[s]), .out_ready(oq_ready[s]), .out_data(oq_data[s]),
      .count(cnt_full)
    );
    assign oq_cnt[s] = cnt_full;
  end

  assign a_valid     = oq_valid[0];
  assign oq_ready[0] = a_ready;
  assign {a_data, a_blk, a_rank} = oq_data[0];
  assign b_valid     = oq_valid[1];
  assign oq_ready[1] = b_ready;
  assign {b_data, b_blk, b_rank} = oq_data[1];

  // Ready flags of internal queues that by construction never fill, and
  // index-list levels, are not used.
  logic unused;
  assign unused = ^{free_in_ready, oq_in_ready[0], oq_in_ready[1], idx_cnt[0], idx_cnt[1]};

endmodule
