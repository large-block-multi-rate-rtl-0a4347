// tb_multipass_sorter: end-to-end test of the two-pass sorter.
//
// Small configuration (P = 4, runs of N = 256 pairs, K = 4, pages of C = 4
// tuples) with the behavioural memory model. Six batches of K full runs are
// streamed in; every output block of K*N pairs (one batch) is checked
// against its input: ascending keys equal to the sorted input keys, values a
// permutation of the input values. The last two batches only push the
// checked ones out (the tail of the newest data stays inside).
// Output backpressure in some batches makes the memory reads fall behind,
// so that writes must wait for the other memory half. The test counts how
// often each mechanism acted and fails if one never did: write slices, read
// slices, the double-buffering wait, merge-tree stalls on an empty input
// buffer, input backpressure, and refills of every input buffer.
module tb_multipass_sorter;
  import sort_pkg::*;

  localparam int unsigned P  = 4;
  localparam int unsigned N  = 256;
  localparam int unsigned K  = 4;
  localparam int unsigned C  = 4;
  localparam int unsigned L  = 8;
  localparam int unsigned NT = N / P;
  localparam int unsigned AW = 1 + $clog2(K) + $clog2(NT);
  localparam int unsigned NB = 6;      // batches sent
  localparam int unsigned NC = NB - 2; // batches checked

  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic          in_valid, in_ready, in_last;
  pair_t [P-1:0] in_data;
  logic          dram_cmd_valid, dram_cmd_ready, dram_cmd_write;
  logic [AW-1:0] dram_cmd_addr;
  logic          dram_wr_valid, dram_rd_valid;
  pair_t [P-1:0] dram_wr_data, dram_rd_data;
  logic          out_valid, out_ready;
  pair_t [P-1:0] out_data;
  logic [7:0]    out_batch;
  logic          guard_hold, tree_stall;
  logic [31:0]   batches_written;

  multipass_sorter #(.P(P), .N(N), .K(K), .C(C), .L(L)) dut (.*);

  dram_model #(.P(P), .AW(AW), .C(C), .LAT(L - 2)) u_mem (
    .clk, .rst_n,
    .cmd_valid(dram_cmd_valid), .cmd_ready(dram_cmd_ready), .cmd_write(dram_cmd_write),
    .cmd_addr(dram_cmd_addr), .wr_valid(dram_wr_valid), .wr_data(dram_wr_data),
    .rd_valid(dram_rd_valid), .rd_data(dram_rd_data)
  );

  int checks = 0, failures = 0;
  pair_t ref_q [$][$];
  pair_t cur_in [$];
  pair_t cur_out [$];
  logic [7:0] cur_b;
  logic first_out = 1;
  int batches_checked = 0;

  // mechanism counters
  int n_wslice = 0, n_rslice = 0, n_guard = 0, n_tstall = 0, n_inbp = 0;
  int reads_per_buf [K];

  function automatic void check_batch(pair_t got [$], pair_t exp [$]);
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
      $display("FAIL batch %0d: got %0d pairs, expected %0d", batches_checked, got.size(), exp.size());
    end
    batches_checked++;
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      if (out_valid && out_ready) begin
        if (!first_out && out_batch != cur_b) begin
          if (batches_checked < int'(NC)) check_batch(cur_out, ref_q.pop_front());
          cur_out = {};
        end
        first_out = 0;
        cur_b = out_batch;
        for (int i = 0; i < int'(P); i++) cur_out.push_back(out_data[i]);
      end
      if (dram_cmd_valid && dram_cmd_ready) begin
        if (dram_cmd_write) n_wslice++;
        else begin
          n_rslice++;
          reads_per_buf[dram_cmd_addr[AW-2 -: $clog2(K)]]++;
        end
      end
      if (guard_hold) n_guard++;
      if (tree_stall) n_tstall++;
      if (in_valid && !in_ready) n_inbp++;
    end
  end

  int vid = 0;
  task automatic send_run();
    for (int t = 0; t < int'(NT); t++) begin
      in_valid = 1;
      in_last  = (t == int'(NT) - 1);
      for (int i = 0; i < int'(P); i++) begin
        pair_t p;
        p.key = {$urandom, $urandom};
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
  endtask

  logic slow = 0;
  initial begin
    forever begin
      @(negedge clk);
      out_ready = slow ? ($urandom_range(0, 15) == 0) : 1'b1;
    end
  end

  initial begin
    for (int i = 0; i < int'(K); i++) reads_per_buf[i] = 0;
    in_valid = 0; in_last = 0; in_data = '0; out_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int b = 0; b < int'(NB); b++) begin
      slow = (b >= 1 && b <= 3);
      for (int r = 0; r < int'(K); r++) send_run();
      ref_q.push_back(cur_in);
      cur_in = {};
    end
    slow = 0;
    repeat (3000) @(posedge clk);
    checks++;
    if (batches_checked != int'(NC)) begin
      failures++;
      $display("FAIL: %0d batches checked, expected %0d", batches_checked, NC);
    end
    checks++;
    if (n_wslice < int'((NB - 1) * K * NT / C)) begin
      failures++;
      $display("FAIL: only %0d pages written", n_wslice);
    end
    checks++; if (n_rslice == 0) begin failures++; $display("FAIL: no read slice"); end
    checks++; if (n_guard == 0) begin failures++; $display("FAIL: double-buffer wait never happened"); end
    checks++; if (n_tstall == 0) begin failures++; $display("FAIL: merge tree never stalled"); end
    checks++; if (n_inbp == 0) begin failures++; $display("FAIL: input never back-pressured"); end
    for (int i = 0; i < int'(K); i++) begin
      checks++;
      if (reads_per_buf[i] == 0) begin failures++; $display("FAIL: buffer %0d never refilled", i); end
    end
    $display("pages written %0d read %0d, guard waits %0d, tree stalls %0d, input stalls %0d",
             n_wslice, n_rslice, n_guard, n_tstall, n_inbp);
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
