// tb_min_occupancy_select: checks the refill choice of the merge tree.
//
// K = 8 buffers with 4-bit levels. Random eligibility masks (sparse, dense,
// none) and random levels with many ties are applied; one cycle later
// 'found' must say whether any buffer was eligible and 'sel' must be the
// eligible buffer with the lowest level, the lowest index among equals, as
// computed by a reference loop in the testbench.
module tb_min_occupancy_select;

  localparam int unsigned K  = 8;
  localparam int unsigned LW = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic [K-1:0]  eligible;
  logic [LW-1:0] level [K];
  logic          found;
  logic [2:0]    sel;

  min_occupancy_select #(.K(K), .LW(LW)) dut (.*);

  int checks = 0, failures = 0;
  bit exp_found;
  int exp_sel;

  initial begin
    eligible = '0;
    for (int i = 0; i < int'(K); i++) level[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      case (n % 4)
        0: eligible = K'($urandom);
        1: eligible = K'(1 << $urandom_range(0, K - 1));
        2: eligible = (n % 40 == 2) ? '0 : K'($urandom | $urandom);
        default: eligible = K'($urandom & $urandom);
      endcase
      for (int i = 0; i < int'(K); i++) level[i] = LW'($urandom_range(0, (n % 3 == 0) ? 3 : 15));
      exp_found = 0;
      exp_sel = 0;
      for (int i = 0; i < int'(K); i++)
        if (eligible[i] && (!exp_found || level[i] < level[exp_sel])) begin
          exp_found = 1;
          exp_sel = i;
        end
      @(posedge clk);
      #1;
      checks++;
      if (found != exp_found || (exp_found && int'(sel) != exp_sel)) begin
        failures++;
        if (failures < 10) $display("FAIL: eligible %b found %0d sel %0d, expected %0d %0d", eligible, found, sel, exp_found, exp_sel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
