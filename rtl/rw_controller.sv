// rw_controller: external-memory page scheduler of the multi-pass sorter.
//
// Sorted runs of NT tuples (N pairs) come from the single-pass sorter. K of
// them form a batch that the K-way merge tree merges in the next pass. Runs
// are written to external memory and read back a page (C tuples) at a time,
// because a memory such as DDR only delivers its bandwidth on large
// transfers. Reads and writes take turns (round-robin): a write slice
// stores one page of the run being written, then a read slice loads one page
// into one of the K input buffers of the merge tree, and so on. A slice with
// nothing to do is skipped. Run data collect in a one-page FIFO and a write
// slice starts only when a whole page is there, so a write never holds the
// memory while waiting for data (the end of the newest run stays inside the
// first pass until more input arrives, and must not block the reads).
//
// Double buffering: memory is split into two halves of K runs; batch b goes
// to half b mod 2. Batch b is written only after every buffer has finished
// reading batch b-2 (otherwise a pending page would be overwritten; the
// 'guard_hold' output shows this wait), and a buffer reads pages of batch b
// only after the whole batch has been written.
//
// Read choice: min_occupancy_select picks, among buffers with a page to read
// and room for it, the one with the lowest level. The read data of each
// page is routed to the buffer it was requested for and tagged with the
// batch number, which keeps successive batches in order inside the tree.
//
// Memory interface: a command (cmd_valid/cmd_ready, cmd_write, cmd_addr in
// tuples) per page; write data follows as C beats on wr_valid (the memory
// takes one beat per cycle); read data returns in request order as C beats
// on rd_valid, any latency later. Address = {half, run, page, beat}.
// K, NT and C must be powers of two with C <= NT.
module rw_controller
  import sort_pkg::*;
#(
  parameter int unsigned P   = 4,
  parameter int unsigned K   = 64,
  parameter int unsigned NT  = 2048,   // run length in tuples (N/P)
  parameter int unsigned C   = 128,    // page size in tuples
  parameter int unsigned LW  = 10,     // width of buffer levels
  parameter int unsigned BW  = 8,      // batch tag width
  parameter int unsigned KW  = (K > 1) ? $clog2(K) : 1,
  parameter int unsigned AW  = 1 + $clog2(K) + $clog2(NT)
) (
  input  logic          clk,
  input  logic          rst_n,
  // sorted runs
  input  logic          s_valid,
  output logic          s_ready,
  input  pair_t [P-1:0] s_data,
  // external memory
  output logic          cmd_valid,
  input  logic          cmd_ready,
  output logic          cmd_write,
  output logic [AW-1:0] cmd_addr,
  output logic          wr_valid,
  output pair_t [P-1:0] wr_data,
  input  logic          rd_valid,
  input  pair_t [P-1:0] rd_data,
  // merge-tree input buffers
  input  logic [LW-1:0] buf_level [K],
  input  logic [K-1:0]  buf_space,
  output logic [K-1:0]  buf_reserve,
  output logic [K-1:0]  buf_wr_valid,
  output pair_t [P-1:0] buf_wr_data,
  output logic [BW-1:0] buf_wr_blk,
  // status
  output logic          guard_hold,
  output logic [31:0]   batches_written
);

  localparam int unsigned PG  = NT / C;                 // pages per run
  localparam int unsigned PGW = (PG > 1) ? $clog2(PG) : 1;
  localparam int unsigned CB  = $clog2(C);
  localparam int unsigned CW  = $clog2(C + 1);
  localparam int unsigned OW  = KW + BW;

  typedef enum logic [2:0] {ST_IDLE, ST_WCMD, ST_WDATA, ST_RCMD, ST_RSLICE} state_t;
  state_t state;

  logic          last_write;
  logic [CW-1:0] beat;

  // write position
  logic [PGW-1:0] wr_page;
  logic [KW-1:0]  wr_run;
  logic [31:0]    wr_batch;
  // read position per buffer
  logic [PGW-1:0] rd_page  [K];
  logic [31:0]    rd_batch [K];
  logic [KW-1:0]  rsel;

  // one page of run data, so a write slice never waits for data
  logic          wq_valid, wq_ready;
  pair_t [P-1:0] wq_data;
  logic [$clog2(C+1)-1:0] wq_cnt;

  tuple_fifo #(.W(P * PAIR_W), .DEPTH(C)) u_wq (
    .clk, .rst_n,
    .in_valid(s_valid), .in_ready(s_ready), .in_data(s_data),
    .out_valid(wq_valid), .out_ready(wq_ready), .out_data(wq_data), .count(wq_cnt)
  );

  logic [K-1:0]   eligible;
  logic           found, wr_ok, can_write, can_read;
  logic [KW-1:0]  sel;

  always_comb begin
    wr_ok = 1'b1;
    for (int i = 0; i < int'(K); i++) begin
      eligible[i] = (rd_batch[i] < wr_batch) && buf_space[i];
      if (rd_batch[i] + 32'd2 <= wr_batch) wr_ok = 1'b0;
    end
  end

  min_occupancy_select #(.K(K), .LW(LW), .KW(KW)) u_sel (
    .clk, .rst_n, .eligible, .level(buf_level), .found, .sel
  );

  assign can_write       = (wq_cnt == ($clog2(C+1))'(C)) && wr_ok;
  assign can_read        = found && eligible[sel];
  assign guard_hold      = (state == ST_IDLE) && (wq_cnt == ($clog2(C+1))'(C)) && !wr_ok;
  assign batches_written = wr_batch;

  function automatic logic [AW-1:0] page_addr(logic half, logic [KW-1:0] run,
                                               logic [PGW-1:0] page);
    logic [AW-1:0] a;
    a = AW'(half);
    a = (a << KW) | AW'(run);
    a = (a << $clog2(NT)) | (AW'(page) << CB);
    return a;
  endfunction

  // ---- slice sequencing -----------------------------------------------------
  always_comb begin
    cmd_valid = 1'b0;
    cmd_write = 1'b0;
    cmd_addr  = '0;
    case (state)
      ST_WCMD: begin
        cmd_valid = 1'b1;
        cmd_write = 1'b1;
        cmd_addr  = page_addr(wr_batch[0], wr_run, wr_page);
      end
      ST_RCMD: begin
        cmd_valid = 1'b1;
        cmd_addr  = page_addr(rd_batch[rsel][0], rsel, rd_page[rsel]);
      end
      default: ;
    endcase
  end

  assign wq_ready = (state == ST_WDATA);
  assign wr_valid = (state == ST_WDATA) && wq_valid;
  assign wr_data  = wq_data;

  always_ff @(posedge clk) begin
    buf_reserve <= '0;
    if (!rst_n) begin
      state      <= ST_IDLE;
      last_write <= 1'b0;
      beat       <= '0;
      wr_page    <= '0;
      wr_run     <= '0;
      wr_batch   <= '0;
      rsel       <= '0;
      for (int i = 0; i < int'(K); i++) begin
        rd_page[i]  <= '0;
        rd_batch[i] <= '0;
      end
    end else begin
      case (state)
        ST_IDLE: begin
          if (can_read && (last_write || !can_write)) begin
            rsel  <= sel;
            state <= ST_RCMD;
          end else if (can_write) begin
            state <= ST_WCMD;
          end
        end
        ST_WCMD: if (cmd_ready) begin
          beat  <= '0;
          state <= ST_WDATA;
        end
        ST_WDATA: if (wq_valid) begin
          beat <= beat + CW'(1);
          if (beat == CW'(C - 1)) begin
            last_write <= 1'b1;
            state      <= ST_IDLE;
            wr_page    <= wr_page + PGW'(1);
            if (wr_page == PGW'(PG - 1)) begin
              wr_page <= '0;
              wr_run  <= wr_run + KW'(1);
              if (wr_run == KW'(K - 1)) begin
                wr_run   <= '0;
                wr_batch <= wr_batch + 32'd1;
              end
            end
          end
        end
        ST_RCMD: if (cmd_ready) begin
          buf_reserve[rsel] <= 1'b1;
          rd_page[rsel]     <= rd_page[rsel] + PGW'(1);
          if (rd_page[rsel] == PGW'(PG - 1)) begin
            rd_page[rsel]  <= '0;
            rd_batch[rsel] <= rd_batch[rsel] + 32'd1;
          end
          beat  <= '0;
          state <= ST_RSLICE;
        end
        ST_RSLICE: begin
          // the read occupies the memory for one page time
          beat <= beat + CW'(1);
          if (beat == CW'(C - 1)) begin
            last_write <= 1'b0;
            state      <= ST_IDLE;
          end
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  // ---- routing of returned pages ---------------------------------------------
  logic          out_push, out_valid_q, out_pop, out_in_ready;
  logic [OW-1:0] out_head;
  logic [2:0]    out_cnt;
  logic [CW-1:0] rbeat;

  assign out_push = (state == ST_RCMD) && cmd_ready;

  tuple_fifo #(.W(OW), .DEPTH(4)) u_outstanding (
    .clk, .rst_n,
    .in_valid(out_push), .in_ready(out_in_ready),
    .in_data({rsel, rd_batch[rsel][BW-1:0]}),
    .out_valid(out_valid_q), .out_ready(out_pop), .out_data(out_head),
    .count(out_cnt)
  );

  assign out_pop = rd_valid && (rbeat == CW'(C - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) rbeat <= '0;
    else if (rd_valid) rbeat <= (rbeat == CW'(C - 1)) ? '0 : rbeat + CW'(1);
  end

  always_comb begin
    buf_wr_valid = '0;
    if (rd_valid) buf_wr_valid[out_head[OW-1 -: KW]] = 1'b1;
  end
  assign buf_wr_data = rd_data;
  assign buf_wr_blk  = out_head[BW-1:0];

  a_known_page: assert property (@(posedge clk) disable iff (!rst_n) rd_valid |-> out_valid_q)
    else $error("rw_controller: read data without a request");

  logic unused;
  assign unused = ^{out_in_ready, out_cnt};

endmodule
