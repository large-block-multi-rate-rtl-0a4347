// tb_multirate_sorter: self-checking test of the single-pass sorter.
//
// Runs a small sorter (P = 4, N = 64 pairs: one split_stage pair and two
// buffer_stages) through three phases:
//   1. random block sizes (P..N pairs) with random input gaps and output
//      backpressure, small key range so that equal keys occur;
//   2. back-to-back full-size blocks with the output always ready: the
//      input must never be stalled (rate one tuple per cycle) and the output
//      must deliver one tuple per cycle;
//   3. one-tuple blocks, the extreme case of the block alternation.
// Each output block (delimited by a change of block number) is checked
// against the input block: keys ascending and equal to the sorted input
// keys, values a permutation of the input values. A trailing block pushes
// the last checked block out.
module tb_multirate_sorter;
  import sort_pkg::*;

  localparam int unsigned P  = 4;
  localparam int unsigned N  = 64;
  localparam int unsigned NT = N / P;
  localparam int unsigned S  = $clog2(NT);
  localparam int unsigned RW = S;
  localparam int unsigned BW = RW + 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic          in_valid, in_ready, in_last, out_valid, out_ready;
  pair_t [P-1:0] in_data, out_data;
  logic [BW-1:0] out_blk;

  multirate_sorter #(.P(P), .N(N)) dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // reference: blocks of pairs, in input order
  pair_t ref_q [$][$];
  pair_t cur_in [$];
  pair_t cur_out [$];
  logic [BW-1:0] cur_blk;
  int blocks_checked = 0;
  int in_stalls = 0, out_beats = 0;
  logic count_stalls = 0;

  function automatic void check_block(pair_t got [$], pair_t exp [$]);
    key_t ek [$];
    val_t gv [$], ev [$];
    logic ok = 1;
    foreach (exp[i]) begin ek.push_back(exp[i].key); ev.push_back(exp[i].val); end
    ek.sort();
    ev.sort();
    if (got.size() != exp.size()) ok = 0;
    else begin
      foreach (got[i]) begin
        gv.push_back(got[i].val);
        if (got[i].key != ek[i]) ok = 0;
      end
      gv.sort();
      foreach (gv[i]) if (gv[i] != ev[i]) ok = 0;
    end
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL block %0d: size got %0d exp %0d", blocks_checked, got.size(), exp.size());
    end
    blocks_checked++;
  endfunction

  // output monitor
  logic first_out = 1;
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      out_beats++;
      if (!first_out && out_blk != cur_blk) begin
        check_block(cur_out, ref_q.pop_front());
        cur_out = {};
      end
      first_out = 0;
      cur_blk = out_blk;
      for (int i = 0; i < int'(P); i++) cur_out.push_back(out_data[i]);
    end
    if (count_stalls && in_valid && !in_ready) in_stalls++;
  end

  int vid = 0;
  // Inputs change just after the falling edge; a tuple is taken at the
  // rising edge where in_ready is high.
  task automatic send_block(int tuples, int key_range, bit gaps);
    for (int t = 0; t < tuples; t++) begin
      if (gaps) begin
        in_valid = 0;
        repeat ($urandom_range(0, 1)) @(negedge clk);
      end
      in_valid = 1;
      in_last  = (t == tuples - 1);
      for (int i = 0; i < int'(P); i++) begin
        pair_t p;
        p.key = (key_range == 0) ? {$urandom, $urandom} : key_t'($urandom_range(0, key_range));
        p.val = val_t'(vid++);
        in_data[i] = p;
        cur_in.push_back(p);
      end
      #1;
      while (!in_ready) begin
        @(negedge clk);
        #1;
      end
      @(negedge clk);
    end
    in_valid = 0;
    ref_q.push_back(cur_in);
    cur_in = {};
  endtask

  int t0, t1, beats0, beats1;
  initial begin
    in_valid = 0; in_last = 0; in_data = '0; out_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // phase 1: variable sizes, gaps, backpressure
    fork
      begin
        for (int b = 0; b < 60; b++) send_block($urandom_range(1, NT), 20, 1);
      end
      begin
        repeat (3000) begin
          @(negedge clk);
          out_ready = ($urandom_range(0, 3) != 0);
        end
        out_ready = 1;
      end
    join
    out_ready = 1;
    // phase 2: full blocks back to back, output always ready
    repeat (20) send_block(NT, 0, 0);   // let everything settle
    count_stalls = 1;
    t0 = cycle; beats0 = out_beats;
    repeat (16) send_block(NT, 0, 0);
    t1 = cycle;
    beats1 = out_beats;
    count_stalls = 0;
    checks++;
    if (in_stalls != 0) begin
      failures++;
      $display("FAIL: input stalled %0d cycles at full-size blocks", in_stalls);
    end
    checks++;
    if (beats1 - beats0 < (t1 - t0) - 8) begin
      failures++;
      $display("FAIL: output rate %0d tuples in %0d cycles", beats1 - beats0, t1 - t0);
    end
    // phase 3: one-tuple blocks
    repeat (40) send_block(1, 1000, 0);
    // trailing blocks to push out the last checked block
    repeat (4) send_block(NT, 0, 0);
    repeat (200) @(posedge clk);
    checks++;
    if (blocks_checked < 60 + 20 + 16 + 40) begin
      failures++;
      $display("FAIL: only %0d blocks came out", blocks_checked);
    end
    $display("blocks checked %0d, rate phase %0d tuples in %0d cycles",
             blocks_checked, beats1 - beats0, t1 - t0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
