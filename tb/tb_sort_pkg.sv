// tb_sort_pkg: checks the shared functions of the sorter package.
//
// merge_buf_depth is compared with values of the buffer-size recurrence
// worked out by hand beforehand (b(2) = 2(C+L), b(k) = ceil(k(b(k-1)+C+L) /
// (k-1)), depth = ceil(b(K)/K) + C + L), including the default
// configuration K = 64, C = 128, L = 10, which needs 792 tuples per buffer.
// cmp_swap is checked on random and equal keys: lo must carry the smaller
// key, ties keep the order of the inputs.
module tb_sort_pkg;
  import sort_pkg::*;

  int checks = 0, failures = 0;

  task automatic check_depth(int k, int c, int l, int exp);
    int got;
    got = int'(merge_buf_depth(k, c, l));
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL merge_buf_depth(%0d, %0d, %0d) = %0d, expected %0d", k, c, l, got, exp);
    end
  endtask

  initial begin
    pair_t a, b, lo, hi;
    check_depth(64, 128, 10, 792);
    check_depth(4, 4, 8, 34);
    check_depth(2, 4, 8, 24);
    check_depth(32, 128, 10, 695);
    check_depth(8, 16, 4, 73);
    check_depth(16, 64, 10, 321);
    for (int n = 0; n < 2000; n++) begin
      a.key = (n % 4 == 0) ? key_t'(5) : {$urandom, $urandom};
      b.key = (n % 4 == 0) ? key_t'(5) : {$urandom, $urandom};
      a.val = val_t'(n);
      b.val = val_t'(n + 100000);
      cmp_swap(a, b, lo, hi);
      checks++;
      if ((b.key < a.key) ? (lo != b || hi != a) : (lo != a || hi != b)) begin
        failures++;
        $display("FAIL cmp_swap %0h %0h", a.key, b.key);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
