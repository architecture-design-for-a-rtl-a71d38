// tb_spike_reduction_unit: self-checking test of one reduction unit.
//
// A reduced unit (8 channels, training window of 8 rounds) receives one sample
// every 20 clocks, as in the 20-unit platform. The signal is uniform noise with
// sparse biphasic spikes; the reference model (tb_nsd_model_pkg) predicts every
// AP record. Two units see the same stream:
//   dut_a  has a 128-block output FIFO drained with random back-pressure; its
//          whole output stream, the first/last flags, the trained thresholds and
//          the event counts are compared with the model;
//   dut_b  has a 4-block FIFO that is not read until the stream ends, so later
//          spikes are dropped; its drop count and drained records are checked.
// The controller's longest procedure (the 16-sample copy) must finish within
// 19 clocks, and no sample may arrive while the unit is busy.
module tb_spike_reduction_unit;
  import nsd_pkg::*;
  import tb_nsd_model_pkg::*;

  localparam int CH     = 8;
  localparam int WIN    = 3;
  localparam int ROUNDS = 400;
  localparam int GAP    = 20;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                s_valid = 1'b0;
  logic [15:0]         s_data = '0;
  logic [2:0]          s_ch = '0;
  logic [3:0]          s_slot = '0;
  logic [15:0]         s_ts = '0;
  logic [11:0]         s_chid = '0;

  logic        a_valid, a_ready, a_first, a_last, b_valid, b_ready, b_first, b_last;
  logic [15:0] a_data, b_data;
  phase_e      a_phase, b_phase;
  logic        a_spk, a_drop, a_ovr, b_spk, b_drop, b_ovr;

  spike_reduction_unit #(.CH(CH), .WIN_LOG2(WIN), .FIFO_BLOCKS(128)) dut_a (
    .clk, .rst_n, .s_valid, .s_data, .s_ch, .s_slot, .s_ts, .s_chid,
    .m_valid(a_valid), .m_ready(a_ready), .m_data(a_data), .m_first(a_first), .m_last(a_last),
    .phase(a_phase), .ev_spike(a_spk), .ev_drop(a_drop), .ev_overrun(a_ovr));

  spike_reduction_unit #(.CH(CH), .WIN_LOG2(WIN), .FIFO_BLOCKS(4)) dut_b (
    .clk, .rst_n, .s_valid, .s_data, .s_ch, .s_slot, .s_ts, .s_chid,
    .m_valid(b_valid), .m_ready(b_ready), .m_data(b_data), .m_first(b_first), .m_last(b_last),
    .phase(b_phase), .ev_spike(b_spk), .ev_drop(b_drop), .ev_overrun(b_ovr));

  int checks = 0, failures = 0;
  nsd_model   m;
  logic [15:0] qa[$], qb[$];
  int nrec_a, ndrop_a, ninc_a, nrec_b, ndrop_b, ninc_b;
  longint thr_a[], thr_b[];
  int n_spk_a = 0, n_drop_a = 0, n_ovr = 0, n_spk_b = 0, n_drop_b = 0;
  int got_a = 0, got_b = 0, busy_len = 0, busy_max = 0, bp_a = 0;
  bit drain_b = 1'b0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // random back-pressure on dut_a, dut_b only drained at the end
  always_ff @(posedge clk) a_ready <= ($urandom_range(9, 0) < 7);
  assign b_ready = drain_b;

  always @(posedge clk) if (rst_n) begin
    if (a_spk) n_spk_a++;
    if (a_drop) n_drop_a++;
    if (a_ovr || b_ovr) n_ovr++;
    if (b_spk) n_spk_b++;
    if (b_drop) n_drop_b++;
    if (a_valid && !a_ready) bp_a++;
    if (dut_a.u_ctrl.busy) busy_len++;
    else begin
      if (busy_len > busy_max) busy_max = busy_len;
      busy_len = 0;
    end
    if (a_valid && a_ready) begin
      check(qa.size() > 0 && a_data == qa[0], $sformatf("dut_a word %0d: got %h exp %h", got_a, a_data, (qa.size() > 0) ? qa[0] : 16'h0));
      check(a_first == (got_a % 48 == 0) && a_last == (got_a % 48 == 47), $sformatf("dut_a flags word %0d", got_a));
      if (qa.size() > 0) void'(qa.pop_front());
      got_a++;
    end
    if (b_valid && b_ready) begin
      check(qb.size() > 0 && b_data == qb[0], $sformatf("dut_b word %0d", got_b));
      if (qb.size() > 0) void'(qb.pop_front());
      got_b++;
    end
  end

  initial begin
    m = new(1, CH, WIN, ROUNDS);
    m.generate_signal(20, 40, 90, 20);
    m.run_unit(0, -1, qa, nrec_a, ndrop_a, ninc_a, thr_a);
    m.run_unit(0, 4, qb, nrec_b, ndrop_b, ninc_b, thr_b);
    $display("model: dut_a %0d records (%0d incomplete), dut_b %0d records, %0d drops",
             nrec_a, ninc_a, nrec_b, ndrop_b);
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    for (int r = 0; r < ROUNDS; r++) begin
      if (r == 8 + (1 << WIN)) begin
        for (int b = 0; b < CH; b++)
          check(longint'(dut_a.u_thr_ram.mem[b]) == thr_a[b],
                $sformatf("threshold ch %0d: %0d vs %0d", b, dut_a.u_thr_ram.mem[b], thr_a[b]));
        check(a_phase == PH_DETECT, "detection enabled after training");
      end
      for (int b = 0; b < CH; b++) begin
        s_valid <= 1'b1;
        s_data  <= 16'(m.x(b, r));
        s_ch    <= 3'(b);
        s_slot  <= 4'(r);
        s_ts    <= 16'(r);
        s_chid  <= 12'(b);
        @(posedge clk);
        s_valid <= 1'b0;
        repeat (GAP - 1) @(posedge clk);
      end
    end
    repeat (2000) @(posedge clk);
    check(qa.size() == 0, $sformatf("dut_a records missing: %0d words left", qa.size()));
    check(got_a == 48 * nrec_a, "dut_a word count");
    check(n_spk_a == nrec_a + ninc_a, $sformatf("dut_a spikes %0d vs %0d", n_spk_a, nrec_a + ninc_a));
    check(n_drop_a == 0, "dut_a no drops");
    check(n_drop_b == ndrop_b && ndrop_b > 0, $sformatf("dut_b drops %0d vs %0d", n_drop_b, ndrop_b));
    check(n_ovr == 0, "no overrun");
    check(busy_max + 1 <= 19 && busy_max + 1 >= 18, $sformatf("longest procedure %0d cycles", busy_max + 1));
    check(bp_a > 0, "back-pressure exercised");
    check(nrec_a > 10, "enough spikes in the stimulus");
    drain_b <= 1'b1;
    repeat (2000) @(posedge clk);
    check(qb.size() == 0 && got_b == 48 * nrec_b, $sformatf("dut_b drained %0d words, %0d left", got_b, qb.size()));
    $display("spikes %0d, records %0d, drops(b) %0d, longest procedure %0d cycles",
             n_spk_a, nrec_a, n_drop_b, busy_max + 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (ROUNDS * CH * GAP + 20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
