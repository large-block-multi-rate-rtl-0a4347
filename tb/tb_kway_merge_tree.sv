// tb_kway_merge_tree: checks the K-way merge tree (K = 8, P = 4).
//
// Every input carries a sequence of batches; in batch b each input holds a
// sorted run of random length (0 to 8 tuples, so an input may have nothing
// in a batch) tagged with block number b (4 bits, wrapping). The output of
// each batch must be all the pairs of that batch, over all inputs, in
// ascending key order (values compared as a multiset). Inputs present data
// with random gaps and the output stalls at random. In a last phase every
// input always has data and the output is always ready: the tree must then
// deliver close to one tuple per cycle (at least 95 %; a merger loses a
// cycle now and then when one side's run ends). The newest batch stays
// partly inside the tree, so unchecked batches follow.
module tb_kway_merge_tree;
  import sort_pkg::*;

  localparam int unsigned P  = 4;
  localparam int unsigned K  = 8;
  localparam int unsigned BW = 4;
  localparam int NRAND = 150;
  localparam int NLONG = 10;
  localparam int NPAD  = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic          in_valid [K];
  logic          in_ready [K];
  pair_t [P-1:0] in_data  [K];
  logic [BW-1:0] in_blk   [K];
  logic          out_valid, out_ready;
  pair_t [P-1:0] out_data;
  logic [BW-1:0] out_blk;

  kway_merge_tree #(.P(P), .K(K), .BW(BW)) dut (.*);

  typedef struct {
    pair_t [P-1:0] d;
    int            b;
  } tup_t;

  int checks = 0, failures = 0;
  tup_t  stim [K][$];
  key_t  exp_k [$][$];
  val_t  exp_v [$][$];
  int    nbatch_chk;
  int    vid = 0;
  int    n_slow_tuples = 0;

  task automatic make_batch(int b, int maxlen, bit wide, bit record);
    key_t ak [$];
    val_t av [$];
    for (int i = 0; i < int'(K); i++) begin
      key_t k [$];
      int len;
      len = (maxlen > 8) ? maxlen : $urandom_range(0, maxlen);
      for (int e = 0; e < len * int'(P); e++) k.push_back(wide ? {$urandom, $urandom} : key_t'($urandom_range(0, 50)));
      k.sort();
      for (int t = 0; t < len; t++) begin
        tup_t x;
        for (int e = 0; e < int'(P); e++) begin
          x.d[e].key = k[t * P + e];
          x.d[e].val = val_t'(vid++);
          ak.push_back(x.d[e].key);
          av.push_back(x.d[e].val);
        end
        x.b = b;
        stim[i].push_back(x);
      end
    end
    ak.sort();
    av.sort();
    if (record) begin
      exp_k.push_back(ak);
      exp_v.push_back(av);
    end
  endtask

  // output monitor, grouped by batch tag
  key_t cur_k [$];
  val_t cur_v [$];
  int   cur_b = -1, checked = 0, beats = 0;

  task automatic close_batch();
    val_t gv [$];
    if (checked >= nbatch_chk) return;
    gv = cur_v; gv.sort();
    checks++;
    if (cur_k != exp_k[checked] || gv != exp_v[checked] || cur_b != checked % 16) begin
      failures++;
      if (failures < 10)
        $display("FAIL batch %0d: tag %0d, %0d pairs, expected %0d", checked, cur_b, cur_k.size(), exp_k[checked].size());
    end
    checked++;
  endtask

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    beats++;
    if (cur_b != -1 && cur_b != int'(out_blk)) begin
      close_batch();
      cur_k = {}; cur_v = {};
    end
    cur_b = int'(out_blk);
    for (int e = 0; e < int'(P); e++) begin
      cur_k.push_back(out_data[e].key);
      cur_v.push_back(out_data[e].val);
    end
  end

  bit fast = 0;
  always @(negedge clk) out_ready = fast || ($urandom_range(0, 3) != 0);

  task automatic drive(int i);
    foreach (stim[i][n]) begin
      @(negedge clk);
      if (!fast) while ($urandom_range(0, 2) == 0) begin in_valid[i] = 0; @(negedge clk); end
      in_valid[i] = 1;
      in_data[i]  = stim[i][n].d;
      in_blk[i]   = BW'(stim[i][n].b);
      #1;
      while (!in_ready[i]) begin @(negedge clk); #1; end
    end
    @(negedge clk);
    in_valid[i] = 0;
  endtask

  int b0, b1;
  initial begin
    for (int i = 0; i < int'(K); i++) begin in_valid[i] = 0; in_data[i] = '0; in_blk[i] = '0; end
    out_ready = 0;
    for (int b = 0; b < NRAND; b++) make_batch(b, 8, 0, 1);
    for (int i = 0; i < int'(K); i++) n_slow_tuples += stim[i].size();
    for (int b = NRAND; b < NRAND + NLONG; b++) make_batch(b, 40, 1, 1);
    for (int b = NRAND + NLONG; b < NRAND + NLONG + NPAD; b++) make_batch(b, 40, 1, 0);
    nbatch_chk = NRAND + NLONG;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < int'(K); i++) begin
      automatic int ii = i;
      fork drive(ii); join_none
    end
    // switch to the rate phase once the random batches are through
    wait (checked >= NRAND);
    fast = 1;
    repeat (100) @(posedge clk);
    b0 = beats;
    repeat (1000) @(posedge clk);
    b1 = beats;
    checks++;
    if (b1 - b0 < 950) begin
      failures++;
      $display("FAIL rate: %0d tuples in 1000 cycles", b1 - b0);
    end
    repeat (5000) @(posedge clk);
    checks++;
    if (checked != nbatch_chk) begin
      failures++;
      $display("FAIL: %0d of %0d batches came out", checked, nbatch_chk);
    end
    $display("rate phase: %0d tuples in 1000 cycles", b1 - b0);
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
