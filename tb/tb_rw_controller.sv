// tb_rw_controller: checks the memory page scheduler with a memory model.
//
// Small configuration: K = 4 runs per batch, runs of NT = 8 tuples, pages of
// C = 4 tuples, memory latency 5 cycles. Sorted-run data is a pattern that
// encodes (batch, run, tuple), so any misplaced or overwritten page shows.
// The testbench models the K merge-tree input buffers (level = stored plus
// reserved tuples, room for a page while level <= 12 - C) and drains them at
// random, slowly in some stretches so that reads fall behind.
// Checked:
//   - write commands go to {half = batch mod 2, run, page} in order;
//   - every buffer receives exactly its own run, batch after batch, in
//     order, tagged with the batch number (so no page was overwritten
//     before it was read, and no run was read before it was complete);
//   - write and read slices alternate whenever both have work;
//   - the double-buffering wait (guard_hold) happened;
//   - with fast draining the run input is taken at the round-robin rate of
//     one page per C + 2 + C + 2 cycles.
module tb_rw_controller;
  import sort_pkg::*;

  localparam int unsigned P   = 4;
  localparam int unsigned K   = 4;
  localparam int unsigned NT  = 8;
  localparam int unsigned C   = 4;
  localparam int unsigned LW  = 5;
  localparam int unsigned BW  = 8;
  localparam int unsigned AW  = 1 + 2 + 3;
  localparam int unsigned D   = 12;
  localparam int NB = 12;

  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic          s_valid, s_ready;
  pair_t [P-1:0] s_data;
  logic          cmd_valid, cmd_ready, cmd_write;
  logic [AW-1:0] cmd_addr;
  logic          wr_valid, rd_valid;
  pair_t [P-1:0] wr_data, rd_data;
  logic [LW-1:0] buf_level [K];
  logic [K-1:0]  buf_space, buf_reserve, buf_wr_valid;
  pair_t [P-1:0] buf_wr_data;
  logic [BW-1:0] buf_wr_blk;
  logic          guard_hold;
  logic [31:0]   batches_written;

  rw_controller #(.P(P), .K(K), .NT(NT), .C(C), .LW(LW), .BW(BW)) dut (.*);

  dram_model #(.P(P), .AW(AW), .C(C), .LAT(5)) u_mem (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd_write, .cmd_addr,
    .wr_valid, .wr_data, .rd_valid, .rd_data
  );

  int checks = 0, failures = 0;

  function automatic pair_t [P-1:0] pat(int b, int r, int t);
    pair_t [P-1:0] d;
    for (int i = 0; i < int'(P); i++) begin
      d[i].key = key_t'({b[15:0], r[15:0], t[15:0], i[15:0]});
      d[i].val = ~val_t'({b[15:0], r[15:0], t[15:0], i[15:0]});
    end
    return d;
  endfunction

  // buffer models
  int stored [K], reserved [K], rx [K];   // rx: tuples received per buffer
  int bq [K][$];                          // stored tuples, as receive indices
  bit slow = 0;

  always_comb
    for (int i = 0; i < K; i++) begin
      buf_level[i] = LW'(stored[i] + reserved[i]);
      buf_space[i] = (stored[i] + reserved[i] <= int'(D - C));
    end

  int wcmds = 0, rcmds = 0, alternations = 0, guard = 0, back_to_back = 0;
  bit last_cmd_write = 0, expect_read = 0;

  always @(posedge clk) if (rst_n) begin
    // drain
    for (int i = 0; i < int'(K); i++)
      if (bq[i].size() > 0 && $urandom_range(0, slow ? 15 : 1) == 0) begin
        void'(bq[i].pop_front());
        stored[i]--;
      end
    for (int i = 0; i < int'(K); i++) begin
      if (buf_reserve[i]) reserved[i] += C;
      if (buf_wr_valid[i]) begin
        int b, t;
        b = rx[i] / int'(NT);
        t = rx[i] % int'(NT);
        checks++;
        if (buf_wr_data != pat(b, i, t) || buf_wr_blk != BW'(b) || $countones(buf_wr_valid) != 1) begin
          failures++;
          if (failures < 10) $display("FAIL buffer %0d tuple %0d (batch %0d): wrong data or tag", i, rx[i], b);
        end
        if (reserved[i] <= 0) begin
          failures++;
          $display("FAIL buffer %0d: data without reservation", i);
        end
        rx[i]++;
        reserved[i]--;
        stored[i]++;
        bq[i].push_back(rx[i]);
        if (stored[i] + reserved[i] > int'(D)) begin
          failures++;
          $display("FAIL buffer %0d overfilled", i);
        end
      end
    end
    if (cmd_valid && cmd_ready) begin
      if (cmd_write) begin
        int b, r, p;
        b = wcmds / int'(K * NT / C);
        r = (wcmds / int'(NT / C)) % int'(K);
        p = wcmds % int'(NT / C);
        checks++;
        if (cmd_addr != AW'({b[0], r[1:0], p[0], 2'b00})) begin
          failures++;
          $display("FAIL write %0d to address %0h", wcmds, cmd_addr);
        end
        wcmds++;
      end else rcmds++;
      if (cmd_write != last_cmd_write) alternations++;
      last_cmd_write = cmd_write;
    end
    // round robin: after a write slice, a pending read goes first
    if (expect_read && dut.state != 3'd3) back_to_back++;
    expect_read = (dut.state == 3'd0) && dut.last_write && dut.can_read;
    if (guard_hold) guard++;
  end

  // run source: batches of K runs of NT tuples, as a stream
  int sent = 0;
  int acc0, acc1;
  initial begin
    s_valid = 0; s_data = '0;
    for (int i = 0; i < int'(K); i++) begin stored[i] = 0; reserved[i] = 0; rx[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < NB; b++) begin
      slow = (b >= 4 && b < 7);
      for (int r = 0; r < int'(K); r++)
        for (int t = 0; t < int'(NT); t++) begin
          @(negedge clk);
          if (b == 8 && r == 0 && t == 0) acc0 = $time;
          s_valid = 1;
          s_data  = pat(b, r, t);
          #1;
          while (!s_ready) begin @(negedge clk); #1; end
          sent++;
          if (b == 10 && r == 0 && t == 0) acc1 = $time;
        end
    end
    @(negedge clk);
    s_valid = 0;
    repeat (500) @(posedge clk);
    checks++;
    // every batch must have been delivered to the buffers
    for (int i = 0; i < int'(K); i++)
      if (rx[i] != NB * int'(NT)) begin
        failures++;
        $display("FAIL buffer %0d received %0d tuples, expected %0d", i, rx[i], NB * NT);
      end
    checks++;
    if (guard == 0 || alternations < 20 || back_to_back != 0) begin
      failures++;
      $display("FAIL: guard waits %0d, alternations %0d, back-to-back writes %0d", guard, alternations, back_to_back);
    end
    // rate: batches 8 and 9 (2 * K * NT tuples) with fast draining
    checks++;
    if ((acc1 - acc0) / 10 > 2 * int'(K * NT / C) * int'(2 * C + 4) + 8) begin
      failures++;
      $display("FAIL rate: %0d cycles for %0d pages", (acc1 - acc0) / 10, 2 * K * NT / C);
    end
    $display("pages written %0d read %0d, guard waits %0d, %0d cycles for %0d pages",
             wcmds, rcmds, guard, (acc1 - acc0) / 10, 2 * K * NT / C);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
