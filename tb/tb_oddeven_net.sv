// tb_oddeven_net: checks the odd-even merge sorting network.
//
// Two instances, P = 4 (the default) and P = 8, get random tuples (with many
// repeated keys) and hand-made ones (sorted, reversed, all equal). Each output
// must hold the input pairs in ascending key order: keys are compared with a
// reference sort, values as a multiset. The network is combinational, so
// results are sampled 1 time unit after the inputs change.
module tb_oddeven_net;
  import sort_pkg::*;

  int checks = 0, failures = 0;

  pair_t [3:0] in4, out4;
  pair_t [7:0] in8, out8;

  oddeven_net #(.P(4)) u4 (.in_data(in4), .out_data(out4));
  oddeven_net #(.P(8)) u8 (.in_data(in8), .out_data(out8));

  function automatic key_t rkey(int mode);
    case (mode)
      0: return key_t'($urandom_range(0, 3));
      1: return {$urandom, $urandom};
      default: return key_t'($urandom_range(0, 20));
    endcase
  endfunction

  task automatic check4();
    key_t k [$];
    val_t vi [$], vo [$];
    for (int i = 0; i < 4; i++) begin
      k.push_back(in4[i].key); vi.push_back(in4[i].val); vo.push_back(out4[i].val);
    end
    k.sort(); vi.sort(); vo.sort();
    checks++;
    for (int i = 0; i < 4; i++)
      if (out4[i].key != k[i] || vo[i] != vi[i]) begin
        failures++;
        if (failures < 10) $display("FAIL P=4 in=%p out=%p", in4, out4);
        break;
      end
  endtask

  task automatic check8();
    key_t k [$];
    val_t vi [$], vo [$];
    for (int i = 0; i < 8; i++) begin
      k.push_back(in8[i].key); vi.push_back(in8[i].val); vo.push_back(out8[i].val);
    end
    k.sort(); vi.sort(); vo.sort();
    checks++;
    for (int i = 0; i < 8; i++)
      if (out8[i].key != k[i] || vo[i] != vi[i]) begin
        failures++;
        if (failures < 10) $display("FAIL P=8 in=%p out=%p", in8, out8);
        break;
      end
  endtask

  initial begin
    // fixed patterns: ascending, descending, all equal
    for (int pat = 0; pat < 3; pat++) begin
      for (int i = 0; i < 4; i++) begin
        in4[i].key = (pat == 0) ? key_t'(i) : (pat == 1) ? key_t'(3 - i) : key_t'(7);
        in4[i].val = val_t'(i);
      end
      for (int i = 0; i < 8; i++) begin
        in8[i].key = (pat == 0) ? key_t'(i) : (pat == 1) ? key_t'(7 - i) : key_t'(7);
        in8[i].val = val_t'(i);
      end
      #1; check4(); check8();
    end
    for (int n = 0; n < 3000; n++) begin
      for (int i = 0; i < 4; i++) begin in4[i].key = rkey(n % 3); in4[i].val = val_t'(n * 16 + i); end
      for (int i = 0; i < 8; i++) begin in8[i].key = rkey(n % 3); in8[i].val = val_t'(n * 16 + i); end
      #1; check4(); check8();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
