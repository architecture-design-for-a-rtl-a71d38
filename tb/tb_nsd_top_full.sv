// tb_nsd_top_full: end-to-end self-checking test of the spike detection platform
// at its default size: 20 units x 128 channels, a 128-round training window
// and 128-block output FIFOs (about 700,000 clocks).
//
// A time-multiplexed stream (one sample per clock, with random one-clock gaps)
// carries uniform noise plus sparse biphasic spikes on every channel. The
// reference model (tb_nsd_model_pkg) predicts, per reduction unit, the thresholds
// and every 48-word AP record (time stamp, channel ID, 46 samples). Each unit's
// output stream is compared word by word, with its first/last flags.
// Every output stream is read with random back-pressure; no spike may be dropped.
// The test counts each mechanism of the design and fails if one never occurs:
// warm-up and training ending in detection, spikes, 16-sample copies, moves to
// the second refractory state, record commits, output back-pressure, input
// gaps.
module tb_nsd_top_full;
  import nsd_pkg::*;
  import tb_nsd_model_pkg::*;

  localparam int NU     = 20;
  localparam int CH     = 128;
  localparam int WIN    = 7;
  localparam int ROUNDS = 260;
  localparam int FIRST  = 140;     // round of the earliest spike
  localparam int DROPU  = -1;     // unit whose output is not read (-1: none)
  localparam int CAP    = 128;       // output FIFO blocks of a unit
  localparam int PERIOD = 160;       // window length of the cyclic workload

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic               rx_valid = 1'b0;
  logic [15:0]        rx_data = '0;
  logic [NU-1:0]      ap_valid, ap_ready, ap_first, ap_last, ev_spike, ev_drop, ev_overrun;
  logic [15:0]        ap_data [NU];
  phase_e             phase [NU];
  logic [NU-1:0]      rnd_ready = '0;
  bit                 drain = 1'b0;

  nsd_top dut (
    .clk, .rst_n, .rx_valid, .rx_data, .ap_valid, .ap_ready, .ap_data, .ap_first,
    .ap_last, .phase, .ev_spike, .ev_drop, .ev_overrun);

  int checks = 0, failures = 0;
  nsd_model m;
  logic [15:0] q [NU][$];
  logic [15:0] tq[$];
  int nrec[NU], ndrop[NU], ninc[NU], got[NU], nspk[NU], ndrp[NU];
  longint thr[];
  int n_ovr = 0, n_bp = 0, n_gap = 0, n_copy = 0, n_refb = 0, n_commit = 0, n_spk_all = 0;
  int n_drop_all = 0, n_rec_all = 0;
  int dummy[3];
  int fr_ts[NU * CH][$];
  int fr_spikes = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  always_ff @(posedge clk)
    for (int u = 0; u < NU; u++) rnd_ready[u] <= ($urandom_range(9, 0) < 8);
  for (genvar u = 0; u < NU; u++) begin : g_rdy
    assign ap_ready[u] = (u == DROPU) ? drain : rnd_ready[u];
  end

  // mechanism probes in unit 0 (its controller and output FIFO)
  always @(posedge clk) if (rst_n) begin
    // end of a 16-sample copy (controller state code 5 is its copy state)
    if (dut.g_units[0].u_unit.u_ctrl.st_wr_en && dut.g_units[0].u_unit.u_ctrl.state_q == 3'd5) n_copy++;
    if (dut.g_units[0].u_unit.u_ctrl.st_wr_en &&
        dut.g_units[0].u_unit.u_ctrl.st_wr_data.state == CH_REFR_B) n_refb++;
    if (dut.g_units[0].u_unit.u_ctrl.fifo_commit) n_commit++;
  end

  always @(posedge clk) if (rst_n) begin
    if (!rx_valid) n_gap++;
    for (int u = 0; u < NU; u++) begin
      if (ev_spike[u]) nspk[u]++;
      if (ev_drop[u]) ndrp[u]++;
      if (ev_overrun[u]) n_ovr++;
      if (ap_valid[u] && !ap_ready[u] && u != DROPU) n_bp++;
      if (ap_valid[u] && ap_ready[u]) begin
        check(q[u].size() > 0 && ap_data[u] == q[u][0],
              $sformatf("unit %0d word %0d: %h vs %h", u, got[u], ap_data[u], (q[u].size() > 0) ? q[u][0] : 16'h0));
        check(ap_first[u] == (got[u] % 48 == 0) && ap_last[u] == (got[u] % 48 == 47),
              $sformatf("unit %0d flags word %0d", u, got[u]));
        if (q[u].size() > 0) void'(q[u].pop_front());
        got[u]++;
      end
    end
  end

  initial begin
    m = new(NU, CH, WIN, ROUNDS);
    m.generate_signal(20, 40, 90, FIRST);
    for (int u = 0; u < NU; u++) begin
      tq.delete();
      m.run_unit(u, (u == DROPU) ? CAP : -1, tq, nrec[u], ndrop[u], ninc[u], thr);
      foreach (tq[i]) q[u].push_back(tq[i]);

      n_rec_all += nrec[u];
      got[u] = 0; nspk[u] = 0; ndrp[u] = 0;
    end
    $display("model: %0d records over %0d units", n_rec_all, NU);
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    for (int r = 0; r < ROUNDS; r++) begin
      if (r == 8 + (1 << WIN) + 1) begin
        tq.delete();
        m.run_unit(0, -1, tq, dummy[0], dummy[1], dummy[2], thr);
        for (int b = 0; b < CH; b++) begin
          check(longint'(dut.g_units[0].u_unit.u_thr_ram.mem[b]) == thr[b], $sformatf("threshold unit 0 ch %0d", b));
        end
        for (int u = 0; u < NU; u++) check(phase[u] == PH_DETECT, $sformatf("unit %0d detecting", u));
      end
      for (int i = 0; i < NU * CH; i++) begin
        while ($urandom_range(19, 0) == 0) begin
          rx_valid <= 1'b0;
          @(posedge clk);
        end
        rx_valid <= 1'b1;
        rx_data  <= 16'(m.x(i, r));
        @(posedge clk);
      end
    end
    rx_valid <= 1'b0;
    repeat (3000) @(posedge clk);
    drain <= 1'b1;
    repeat (3000) @(posedge clk);
    for (int u = 0; u < NU; u++) begin
      check(q[u].size() == 0 && got[u] == 48 * nrec[u],
            $sformatf("unit %0d: %0d words out, %0d expected", u, got[u], 48 * nrec[u]));
      check(nspk[u] == nrec[u] + ninc[u], $sformatf("unit %0d spike events %0d vs %0d", u, nspk[u], nrec[u] + ninc[u]));
      check(ndrp[u] == ndrop[u], $sformatf("unit %0d drops %0d vs %0d", u, ndrp[u], ndrop[u]));
      n_spk_all += nspk[u];
      n_drop_all += ndrp[u];
    end
    check(n_ovr == 0, "no sample overrun");
    // every mechanism must have happened
    check(n_spk_all > 0, "spikes detected");
    check(n_copy > 0, "16-sample copies");
    check(n_refb > 0, "second refractory state");
    check(n_commit > 0, "records committed");
    check(n_bp > 0, "output back-pressure");
    check(n_gap > 0, "input gaps");
    check(n_drop_all == 0, "no spike dropped");
    $display("records %0d, spikes %0d, drops %0d, copies(u0) %0d, refractory-B(u0) %0d, commits(u0) %0d, back-pressure %0d, gaps %0d",
             n_rec_all, n_spk_all, n_drop_all, n_copy, n_refb, n_commit, n_bp, n_gap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (ROUNDS * NU * CH * 2 + 20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
