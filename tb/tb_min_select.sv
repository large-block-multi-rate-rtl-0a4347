// tb_min_select: checks the min-select front end of the merger.
//
// Two sorted queues A and B are made of groups; group g carries block number
// g (4 bits, so the serial-number compare wraps many times) and rank 0, and
// has a random number of tuples on each side (0 to 6, so one side may skip a
// group), with keys from a small range so that ties are frequent. A reference
// merge of the whole stream, taking A only when it is strictly smaller (ties
// go to B), is computed beforehand. Every output tuple must hold the next P
// pairs of that reference in some order and report in out_k how many of
// them came from A. Inputs have random gaps and the output random stalls;
// in a last phase all handshakes stay high and the output must then deliver
// one tuple per cycle (rate P pairs per cycle). The newest pairs stay inside
// (a side needs data to compare against), so the end of the stream is padded
// with groups that are not checked.
module tb_min_select;
  import sort_pkg::*;

  localparam int unsigned P  = 4;
  localparam int unsigned BW = 4;
  localparam int unsigned RW = 2;
  localparam int NG    = 400;   // random groups
  localparam int NLONG = 8;     // long groups for the rate check
  localparam int NPAD  = 4;     // trailing groups

  typedef struct {
    int   grp;
    key_t key;
    val_t val;
    bit   from_a;
  } elem_t;

  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic a_valid, a_ready, b_valid, b_ready, out_valid, out_ready;
  pair_t [P-1:0] a_data, b_data, out_data;
  logic [BW-1:0] a_blk, b_blk, out_blk;
  logic [RW-1:0] a_rank, b_rank, out_rank;
  logic [$clog2(P+1)-1:0] out_k;

  min_select #(.P(P), .BW(BW), .RW(RW)) dut (.*);

  int checks = 0, failures = 0;
  elem_t qa [$], qb [$], ref_q [$];   // tuples of A and B as element lists
  int ta [$], tb [$];                 // group of each A/B tuple
  int nchk_tuples, tuples_out = 0;
  bit fast = 0;
  int t0, t1, beats0, beats1;

  function automatic bit less(elem_t x, elem_t y);
    if (x.grp != y.grp) return x.grp < y.grp;
    return x.key < y.key;
  endfunction

  task automatic make_groups(int g0, int n, int maxlen);
    for (int g = g0; g < g0 + n; g++)
      for (int side = 0; side < 2; side++) begin
        key_t k [$];
        int len;
        len = (maxlen > 6) ? maxlen : $urandom_range(0, maxlen);
        for (int i = 0; i < len * int'(P); i++) k.push_back(key_t'($urandom_range(0, 40)));
        k.sort();
        for (int i = 0; i < len * int'(P); i++) begin
          elem_t e;
          e.grp = g; e.key = k[i]; e.val = val_t'({g, side[0], i[15:0]}); e.from_a = (side == 0);
          if (side == 0) qa.push_back(e); else qb.push_back(e);
        end
        for (int i = 0; i < len; i++) if (side == 0) ta.push_back(g); else tb.push_back(g);
      end
  endtask

  // stimulus data for both sides (kept in separate copies)
  elem_t sa [$], sb [$];

  initial begin
    int ia, ib;
    make_groups(0, NG, 6);
    make_groups(NG, NLONG, 64);
    nchk_tuples = 0;
    // reference merge over the checked groups
    sa = qa; sb = qb;
    make_groups(NG + NLONG, NPAD, 6);
    ia = 0; ib = 0;
    while (ia < sa.size() || ib < sb.size()) begin
      if (ib >= sb.size() || (ia < sa.size() && less(sa[ia], sb[ib]))) ref_q.push_back(sa[ia++]);
      else ref_q.push_back(sb[ib++]);
    end
    nchk_tuples = ref_q.size() / int'(P);
  end

  // drivers: side A and B, one tuple per accepted handshake
  task automatic drive(bit is_a);
    int idx = 0, ntup;
    forever begin
      @(negedge clk);
      ntup = is_a ? ta.size() : tb.size();
      if (idx < ntup && (fast || $urandom_range(0, 3) != 0)) begin
        pair_t [P-1:0] d;
        for (int i = 0; i < int'(P); i++) begin
          elem_t e;
          e = is_a ? qa[idx * P + i] : qb[idx * P + i];
          d[i].key = e.key; d[i].val = e.val;
        end
        if (is_a) begin a_valid = 1; a_data = d; a_blk = BW'(ta[idx]); a_rank = '0; end
        else      begin b_valid = 1; b_data = d; b_blk = BW'(tb[idx]); b_rank = '0; end
        #1;
        while (!(is_a ? a_ready : b_ready)) begin @(negedge clk); #1; end
        idx++;
      end else begin
        if (is_a) a_valid = 0; else b_valid = 0;
      end
    end
  endtask

  initial begin
    a_valid = 0; b_valid = 0; a_data = '0; b_data = '0; a_blk = '0; b_blk = '0;
    a_rank = '0; b_rank = '0; out_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork drive(1); drive(0); join_none
  end

  always @(negedge clk) out_ready = fast || ($urandom_range(0, 3) != 0);

  // monitor
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    if (tuples_out < nchk_tuples) begin
      automatic key_t gk [$], ek [$];
      automatic val_t gv [$], ev [$];
      automatic int ka = 0;
      for (int i = 0; i < int'(P); i++) begin
        elem_t e;
        e = ref_q[tuples_out * P + i];
        ek.push_back(e.key); ev.push_back(e.val); ka += e.from_a;
        gk.push_back(out_data[i].key); gv.push_back(out_data[i].val);
      end
      gk.sort(); gv.sort(); ek.sort(); ev.sort();
      checks++;
      if (gk != ek || gv != ev || int'(out_k) != ka || int'(out_blk) != ref_q[tuples_out * P].grp % 16) begin
        failures++;
        if (failures < 10) $display("FAIL tuple %0d: k=%0d exp %0d, out=%p", tuples_out, out_k, ka, out_data);
      end
    end
    tuples_out++;
  end

  initial begin
    int slow_tuples;
    wait (nchk_tuples > 0);
    // random phase: until the long groups are reached
    slow_tuples = 0;
    foreach (ta[i]) if (ta[i] < NG) slow_tuples++;
    foreach (tb[i]) if (tb[i] < NG) slow_tuples++;
    wait (tuples_out >= slow_tuples - 4);
    @(negedge clk);
    fast = 1;
    repeat (40) @(posedge clk);
    t0 = $time; beats0 = tuples_out;
    repeat (200) @(posedge clk);
    t1 = $time; beats1 = tuples_out;
    checks++;
    if (beats1 - beats0 < 200) begin
      failures++;
      $display("FAIL rate: %0d tuples in 200 cycles", beats1 - beats0);
    end
    repeat (1500) @(posedge clk);
    checks++;
    if (tuples_out < nchk_tuples) begin
      failures++;
      $display("FAIL: only %0d of %0d tuples came out", tuples_out, nchk_tuples);
    end
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
