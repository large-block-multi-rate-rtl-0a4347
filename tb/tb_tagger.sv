// tb_tagger: checks block numbering and ranks.
//
// Small maximum block (NT = 8 tuples) and a 4-bit block number, so both the
// forced block end at NT tuples and the wrap of the block number occur.
// Tuples are sent with random gaps, in_last at random places (including
// every tuple, and never for long stretches) and random output stalls. A
// reference counter pair in the testbench predicts block number and rank of
// every tuple that passes; the data must pass unchanged. The path is
// combinational, so each accepted tuple is checked in the cycle it passes.
module tb_tagger;
  import sort_pkg::*;

  localparam int unsigned P  = 4;
  localparam int unsigned NT = 8;
  localparam int unsigned BW = 4;
  localparam int unsigned RW = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic in_valid, in_ready, in_last, out_valid, out_ready;
  pair_t [P-1:0] in_data, out_data;
  logic [BW-1:0] out_blk;
  logic [RW-1:0] out_rank;

  tagger #(.P(P), .NT(NT), .BW(BW), .RW(RW)) dut (.*);

  int checks = 0, failures = 0;
  int exp_blk = 0, exp_rank = 0, passed = 0, forced = 0, wraps = 0;

  always @(posedge clk) if (rst_n && in_valid && in_ready) begin
    checks++;
    if (!out_valid || out_data != in_data || int'(out_blk) != exp_blk % 16 || int'(out_rank) != exp_rank) begin
      failures++;
      if (failures < 10)
        $display("FAIL tuple %0d: blk %0d exp %0d, rank %0d exp %0d", passed, out_blk, exp_blk % 16, out_rank, exp_rank);
    end
    passed++;
    if (in_last || exp_rank == int'(NT) - 1) begin
      if (!in_last) forced++;
      if (exp_blk % 16 == 15) wraps++;
      exp_blk++;
      exp_rank = 0;
    end else exp_rank++;
  end

  always @(negedge clk) out_ready = ($urandom_range(0, 3) != 0);

  initial begin
    in_valid = 0; in_last = 0; in_data = '0; out_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int mode;
      mode = (n / 500) % 3;
      @(negedge clk);
      while ($urandom_range(0, 4) == 0) begin in_valid = 0; @(negedge clk); end
      in_valid = 1;
      for (int i = 0; i < int'(P); i++) in_data[i] = {$urandom, $urandom, $urandom, $urandom};
      in_last = (mode == 0) ? ($urandom_range(0, 5) == 0) : (mode == 1) ? 1'b1 : 1'b0;
      #1;
      while (!in_ready) begin @(negedge clk); #1; end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (passed != 3000 || forced == 0 || wraps == 0) begin
      failures++;
      $display("FAIL: %0d tuples passed, %0d forced block ends, %0d wraps", passed, forced, wraps);
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
