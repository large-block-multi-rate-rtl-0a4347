// tb_multipass_full: one complete two-pass sort at the default size.
//
// The top is used with all its defaults: P = 4, runs of N = 8192 pairs,
// K = 64 runs per batch, pages of C = 128 tuples, memory latency L = 10.
// One batch is K * N = 524288 pairs (8 MB of 128-bit pairs). Batch 0 and
// batch 1 are streamed in, followed by a few runs of batch 2 that push the
// end of batch 1 out of the first pass (the newest data stays inside until
// more arrives). Batch 0 must come out complete: keys ascending and equal to
// the sorted input keys, values a permutation of the input values. The
// testbench also reports how fast the input was taken while the memory
// alternates between writing runs and reading pages for the merge tree, and
// checks that this is at least a third of one tuple per cycle (one page
// written per write slice plus read slice, with a few cycles of command
// overhead each).
module tb_multipass_full;
  import sort_pkg::*;

  localparam int unsigned P  = 4;
  localparam int unsigned N  = 8192;
  localparam int unsigned K  = 64;
  localparam int unsigned NT = N / P;
  localparam int unsigned AW = 1 + $clog2(K) + $clog2(NT);

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

  multipass_sorter dut (.*);

  dram_model #(.P(P), .AW(AW), .C(128), .LAT(8)) u_mem (
    .clk, .rst_n,
    .cmd_valid(dram_cmd_valid), .cmd_ready(dram_cmd_ready), .cmd_write(dram_cmd_write),
    .cmd_addr(dram_cmd_addr), .wr_valid(dram_wr_valid), .wr_data(dram_wr_data),
    .rd_valid(dram_rd_valid), .rd_data(dram_rd_data)
  );

  int checks = 0, failures = 0;
  key_t in_k [$];
  val_t in_v [$];
  key_t out_k [$];
  val_t out_v [$];
  bit   batch0_done = 0;
  longint cyc = 0;
  int n_tstall = 0, n_wslice = 0, n_rslice = 0;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (tree_stall) n_tstall++;
    if (dram_cmd_valid && dram_cmd_ready) begin
      if (dram_cmd_write) n_wslice++; else n_rslice++;
    end
    if (out_valid && out_ready && !batch0_done) begin
      if (out_batch != 8'd0) batch0_done = 1;
      else
        for (int i = 0; i < int'(P); i++) begin
          out_k.push_back(out_data[i].key);
          out_v.push_back(out_data[i].val);
        end
    end
  end

  int vid = 0;
  longint c0, c1;
  initial begin
    in_valid = 0; in_last = 0; in_data = '0; out_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // batch 0, batch 1, four runs of batch 2
    for (int r = 0; r < 2 * int'(K) + 4; r++) begin
      if (r == int'(K) / 2) c0 = cyc;
      if (r == int'(K) + int'(K) / 2) c1 = cyc;
      for (int t = 0; t < int'(NT); t++) begin
        @(negedge clk);
        in_valid = 1;
        in_last  = (t == int'(NT) - 1);
        for (int i = 0; i < int'(P); i++) begin
          in_data[i].key = {$urandom, $urandom};
          in_data[i].val = val_t'(vid++);
          if (r < int'(K)) begin
            in_k.push_back(in_data[i].key);
            in_v.push_back(in_data[i].val);
          end
        end
        #1;
        while (!in_ready) begin @(negedge clk); #1; end
      end
    end
    @(negedge clk);
    in_valid = 0;
    wait (batch0_done);
    in_k.sort();
    in_v.sort();
    out_v.sort();
    checks++;
    if (out_k.size() != in_k.size()) begin
      failures++;
      $display("FAIL: batch 0 has %0d pairs, expected %0d", out_k.size(), in_k.size());
    end else begin
      int bad = 0;
      foreach (out_k[i]) if (out_k[i] != in_k[i] || out_v[i] != in_v[i]) bad++;
      if (bad != 0) begin
        failures++;
        $display("FAIL: batch 0 differs from the sorted input at %0d places", bad);
      end
    end
    // input rate over one batch (K runs) in steady state
    checks++;
    if ((c1 - c0) * 1 > 3 * longint'(K * NT)) begin
      failures++;
      $display("FAIL rate: %0d cycles for %0d tuples", c1 - c0, K * NT);
    end
    $display("batch 0: %0d pairs; %0d cycles for one batch of %0d tuples; pages written %0d read %0d; tree stalls %0d",
             out_k.size(), c1 - c0, K * NT, n_wslice, n_rslice, n_tstall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
