// tb_threshold_logic: self-checking test of the threshold comparator and the
// mean-deviation computation. Runs training windows of N = 128 random NEO
// values for several channels, checking the running sum after every value and
// the threshold 16 * floor(sum / 128) at the end of the window, then compares
// NEO values around each threshold (equal, one above, one below, negative).
module tb_threshold_logic;
  logic signed [32:0] neo = '0;
  logic [38:0] thr_rd = '0, thr_next;
  logic detect = 1'b0, win_first = 1'b0, win_last = 1'b0, spike;
  int checks = 0, failures = 0;

  threshold_logic dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    for (int chn = 0; chn < 6; chn++) begin
      longint sum, thr, v;
      sum = 0;
      for (int i = 0; i < 128; i++) begin
        case (chn)
          0: v = longint'($urandom_range(2000, 0)) - 1000;
          1: v = (i % 2) ? 64'sd2147483648 : -64'sd1073741824;   // extremes
          default: v = longint'($urandom_range(200000, 0)) - 50000;
        endcase
        neo = 33'(v); thr_rd = 39'(sum); detect = 1'b0;
        win_first = (i == 0); win_last = (i == 127);
        if (i == 0) thr_rd = 39'($urandom);   // stale word must be ignored
        #1;
        sum += (v < 0) ? -v : v;
        check(spike == 1'b0, "no spike while training");
        if (i < 127) check(longint'(thr_next) == sum, $sformatf("running sum ch %0d step %0d", chn, i));
      end
      thr = (sum / 128) * 16;
      check(longint'(thr_next) == thr, $sformatf("threshold ch %0d: %0d vs %0d", chn, thr_next, thr));
      if (chn == 1) check(thr == 64'd25769803776, "threshold of the extreme window");
      win_first = 1'b0; win_last = 1'b0; detect = 1'b1; thr_rd = thr_next;
      if (thr + 2 < 64'sd4294967296)     // NEO itself stays below 2^32
        for (int d = -2; d <= 2; d++) begin
          neo = 33'(thr + d); #1;
          check(spike == (d > 0), $sformatf("compare thr offset %0d", d));
        end
      neo = -33'sd5; #1 check(spike == (thr < -5), "negative NEO");
      detect = 1'b0; neo = 33'sd4294967295; #1 check(!spike, "no spike outside the detection phase");
    end
    for (int i = 0; i < 500; i++) begin
      longint t, v;
      t = longint'($urandom_range(100000, 0));
      v = longint'($urandom_range(200000, 0)) - 50000;
      thr_rd = 39'(t); neo = 33'(v); detect = 1'b1; #1;
      check(spike == (v > t), "random compare");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
