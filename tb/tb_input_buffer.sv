// tb_input_buffer: checks one merge-tree input buffer (C = 4, DEPTH = 10).
//
// The testbench plays the page scheduler and the memory: whenever the buffer
// reports room for a page (page_space) it may reserve one, and the page's C
// tuples arrive 2 to 12 cycles later, one per cycle, pages in order. The
// merge tree side drains with random stalls. Checked: tuples leave in
// arrival order with their batch tag; level equals stored plus reserved
// tuples as counted by the testbench; page_space is exactly level <= DEPTH-C;
// the buffer fills up (page_space low) and drains empty at least once each.
module tb_input_buffer;
  import sort_pkg::*;

  localparam int unsigned P     = 4;
  localparam int unsigned BW    = 4;
  localparam int unsigned C     = 4;
  localparam int unsigned DEPTH = 10;
  localparam int unsigned LW    = $clog2(DEPTH + 1);

  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic          reserve, in_valid, out_valid, out_ready, page_space;
  pair_t [P-1:0] in_data, out_data;
  logic [BW-1:0] in_blk, out_blk;
  logic [LW-1:0] level;

  input_buffer #(.P(P), .BW(BW), .C(C), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  int stored = 0, reserved = 0, full_seen = 0, empty_seen = 0;
  int sent = 0, got = 0;
  int due [$];           // arrival start time of each reserved page
  longint cyc = 0;
  int beat = 0;

  function automatic pair_t [P-1:0] pat(int n);
    pair_t [P-1:0] d;
    for (int i = 0; i < int'(P); i++) begin
      d[i].key = key_t'(n * 7 + i);
      d[i].val = val_t'(n);
    end
    return d;
  endfunction

  // model and checks, sampled before the clock edge updates the buffer
  always @(posedge clk) if (rst_n) begin
    cyc++;
    checks++;
    if (int'(level) != stored + reserved || page_space != (stored + reserved <= int'(DEPTH - C))) begin
      failures++;
      if (failures < 10) $display("FAIL level %0d exp %0d, page_space %0d", level, stored + reserved, page_space);
    end
    if (!page_space) full_seen++;
    if (stored == 0 && reserved == 0 && got > 0) empty_seen++;
    if (out_valid && out_ready) begin
      checks++;
      if (out_data != pat(got) || int'(out_blk) != (got / 8) % 16) begin
        failures++;
        if (failures < 10) $display("FAIL tuple %0d out of order", got);
      end
      got++;
      stored--;
    end
    if (reserve) reserved += C;
    if (in_valid) begin stored++; reserved--; end
  end

  initial begin
    reserve = 0; in_valid = 0; in_data = '0; in_blk = '0; out_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      // drain side: long fast and slow stretches
      out_ready = ((n / 300) % 2 == 0) ? ($urandom_range(0, 7) == 0) : ($urandom_range(0, 3) != 0);
      // scheduler: reserve a page when there is room
      reserve = page_space && ($urandom_range(0, 1) == 0) && due.size() < 3;
      if (reserve) due.push_back(int'(cyc) + $urandom_range(2, 12));
      // memory: deliver the oldest page, one beat per cycle
      in_valid = 0;
      if (due.size() > 0 && due[0] <= int'(cyc)) begin
        in_valid = 1;
        in_data  = pat(sent);
        in_blk   = BW'((sent / 8) % 16);
        sent++;
        beat++;
        if (beat == int'(C)) begin beat = 0; void'(due.pop_front()); end
      end
    end
    @(negedge clk);
    reserve = 0; in_valid = 0;
    checks++;
    if (full_seen == 0 || empty_seen == 0 || got < 1000) begin
      failures++;
      $display("FAIL: full %0d, empty %0d, %0d tuples", full_seen, empty_seen, got);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
