// tb_buffer_stage: checks one large merge stage, whose two input queues
// share one indirectly addressed buffer (R = 4: runs of 8 tuples in, runs of
// 16 tuples out, buffer of 8 + 9 = 17 places).
//
// The input is what the previous stage delivers: blocks of random size (1 to
// 70 tuples, block number 4 bits wide so that it wraps), each cut into
// groups of 2^(R-1) tuples that share a rank and are sorted across the
// group; the last group of a block may be short. Keys come from a small
// range, so ties are common. Every output group (same block number and
// rank) must be the union of input groups 2j and 2j+1 of its block, in
// ascending key order, with rank j. Random input gaps and output stalls
// come first; then full blocks are streamed with the output always ready,
// and, once drained, the stage must take one tuple per cycle without
// stalling and deliver one per cycle. Those blocks have full-range random
// keys: the queue sizing keeps the rate for such data, while inputs where one
// run lies wholly below the other can stall a stage for part of a run. The newest group cannot leave (the merger waits for the
// other side), so some unchecked blocks follow.
module tb_buffer_stage;
  import sort_pkg::*;

  localparam int unsigned P  = 4;
  localparam int unsigned BW = 4;
  localparam int unsigned RW = 8;
  localparam int unsigned R  = 4;
  localparam int G     = 1 << (R - 1);   // input group size in tuples
  localparam int MAXB  = 70;             // largest random block (tuples)
  localparam int NRAND = 300;            // random blocks
  localparam int NFULL = 12;             // full blocks, rate phase
  localparam int NPAD  = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic in_valid, in_ready, out_valid, out_ready;
  pair_t [P-1:0] in_data, out_data;
  logic [BW-1:0] in_blk, out_blk;
  logic [RW-1:0] in_rank, out_rank;

  buffer_stage #(.P(P), .BW(BW), .RW(RW), .R(R)) dut (.*);

  typedef struct {
    pair_t [P-1:0] d;
    int            blk;
    int            rank;
  } tup_t;

  typedef struct {
    int   blk;
    int   rank;
    key_t keys [$];
    val_t vals [$];
  } grp_t;

  int checks = 0, failures = 0;
  tup_t stim [$];
  grp_t exp_q [$];
  int   nexp;
  int   vid = 0;

  // one block of nt tuples with block number b
  task automatic make_block(int b, int nt, bit record, bit wide);
    int ng;
    ng = (nt + G - 1) / G;
    for (int g = 0; g < ng; g++) begin
      key_t k [$];
      int len;
      len = (g == ng - 1) ? nt - g * G : G;
      for (int i = 0; i < len * int'(P); i++) k.push_back(wide ? {$urandom, $urandom} : key_t'($urandom_range(0, 30)));
      k.sort();
      for (int t = 0; t < len; t++) begin
        tup_t x;
        for (int i = 0; i < int'(P); i++) begin
          x.d[i].key = k[t * P + i];
          x.d[i].val = val_t'(vid++);
        end
        x.blk = b; x.rank = g;
        stim.push_back(x);
        if (record) begin
          if (g % 2 == 0 && t == 0) begin
            grp_t e;
            e.blk = b; e.rank = g / 2;
            exp_q.push_back(e);
          end
          for (int i = 0; i < int'(P); i++) begin
            exp_q[$].keys.push_back(x.d[i].key);
            exp_q[$].vals.push_back(x.d[i].val);
          end
        end
      end
    end
  endtask

  // monitor: gather output groups and compare them with exp_q in order
  grp_t cur;
  bit   have_cur = 0;
  int   groups_checked = 0, beats = 0;

  task automatic check_group(grp_t gg);
    grp_t e;
    key_t ek [$];
    val_t ev [$], gv [$];
    bit ok;
    if (exp_q.size() == 0) return;
    e = exp_q.pop_front();
    ek = e.keys; ek.sort();
    ev = e.vals; ev.sort();
    gv = gg.vals; gv.sort();
    ok = (gg.blk == e.blk % (1 << BW)) && (gg.rank == e.rank) && (gg.keys == ek) && (gv == ev);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10)
        $display("FAIL group %0d: blk %0d/%0d rank %0d/%0d, %0d/%0d pairs",
                 groups_checked, gg.blk, e.blk % (1 << BW), gg.rank, e.rank, gg.keys.size(), ek.size());
    end
    groups_checked++;
  endtask

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    beats++;
    if (have_cur && (cur.blk != int'(out_blk) || cur.rank != int'(out_rank))) begin
      check_group(cur);
      have_cur = 0;
    end
    if (!have_cur) begin
      cur.blk = int'(out_blk); cur.rank = int'(out_rank);
      cur.keys = {}; cur.vals = {};
      have_cur = 1;
    end
    for (int i = 0; i < int'(P); i++) begin
      cur.keys.push_back(out_data[i].key);
      cur.vals.push_back(out_data[i].val);
    end
  end

  bit fast = 0;
  always @(negedge clk) out_ready = fast || ($urandom_range(0, 3) != 0);

  int n_rand_tuples, stalls = 0;
  int t0_beats, t1_beats;

  initial begin
    in_valid = 0; in_data = '0; in_blk = '0; in_rank = '0; out_ready = 0;
    for (int b = 0; b < NRAND; b++) make_block(b, $urandom_range(1, MAXB), 1, 0);
    n_rand_tuples = stim.size();
    for (int b = NRAND; b < NRAND + NFULL; b++) make_block(b, 4 << R, 1, 1);
    for (int b = NRAND + NFULL; b < NRAND + NFULL + NPAD; b++) make_block(b, 4 << R, 0, 1);
    nexp = exp_q.size();
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (stim[n]) begin
      @(negedge clk);
      if (n == n_rand_tuples + 40) t0_beats = beats;
      if (n == n_rand_tuples) begin
        fast = 1;           // drain what the random phase left behind
        in_valid = 0;
        repeat (100) @(negedge clk);
      end
      if (!fast) while ($urandom_range(0, 3) == 0) begin in_valid = 0; @(negedge clk); end
      in_valid = 1;
      in_data = stim[n].d; in_blk = BW'(stim[n].blk); in_rank = RW'(stim[n].rank);
      #1;
      while (!in_ready) begin
        if (fast && n >= n_rand_tuples + 40) stalls++;
        @(negedge clk); #1;
      end
      if (n == n_rand_tuples + 40 + 400) t1_beats = beats;
    end
    @(negedge clk);
    in_valid = 0;
    repeat (200) @(posedge clk);
    checks++;
    if (groups_checked < nexp) begin
      failures++;
      $display("FAIL: %0d of %0d groups came out", groups_checked, nexp);
    end
    checks++;
    if (stalls != 0 || t1_beats - t0_beats < 400 - 2) begin
      failures++;
      $display("FAIL rate: %0d input stalls, %0d output tuples in 400 cycles", stalls, t1_beats - t0_beats);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
