// tb_bram_read_ctrl: self-checking test of the BRAM read control state machine.
//
// The controller is wired to the unit's memories, NEO, threshold logic and
// spike counter, but its output-FIFO write port goes to a memory in this
// testbench. Every time the controller commits a block, the 48 words of that
// block are compared with the next record of the reference model. The test also
// checks the procedure lengths: a 16-sample copy is 16 writes on consecutive
// clocks and ends the controller's busy time 18 clocks after the sample
// arrived; a refractory sample is written one clock after arrival; the time
// stamp and channel ID headers are written on consecutive clocks; the write
// address of the refractory samples steps only its low 4 bits except at the
// 10->11 and 11->00 status changes. Blocks are freed right after commit.
module tb_bram_read_ctrl;
  import nsd_pkg::*;
  import tb_nsd_model_pkg::*;

  localparam int CH = 4, CW = 2, WIN = 2, ROUNDS = 300, GAP = 20;
  localparam int THR_W = NEO_W - 1 + WIN;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic s_valid = 1'b0;
  logic [15:0] s_data = '0, s_ts = '0;
  logic [CW-1:0] s_ch = '0;
  logic [3:0] s_slot = '0;
  logic [11:0] s_chid = '0;

  logic ib_rd_en, st_rd_en, st_wr_en, thr_rd_en, thr_wr_en, neo_in_valid, neo_out_valid;
  logic [CW-1:0] ib_rd_ch, st_wr_ch, thr_wr_ch;
  logic [3:0] ib_rd_slot;
  logic [15:0] ib_rd_data, neo_x_0, neo_x_p;
  ch_status_t st_rd_data, st_wr_data;
  logic [THR_W-1:0] thr_rd_data, tl_thr_next;
  logic signed [NEO_W-1:0] neo;
  logic tl_detect, tl_win_first, tl_win_last, tl_spike;
  logic alloc_req, alloc_ok, fifo_wr_en, fifo_commit, busy, ev_spike, ev_drop, ev_overrun;
  logic [FIFO_AW-1:0] alloc_base, fifo_wr_addr;
  logic [15:0] fifo_wr_data;
  logic [7:0] in_use;
  phase_e phase;
  logic free_q = 1'b0;

  input_bram #(.CH(CH)) u_ib (.clk, .wr_en(s_valid), .wr_ch(s_ch), .wr_slot(s_slot), .wr_data(s_data),
    .rd_en(ib_rd_en), .rd_ch(ib_rd_ch), .rd_slot(ib_rd_slot), .rd_data(ib_rd_data));
  channel_status_ram #(.CH(CH)) u_st (.clk, .wr_en(st_wr_en), .wr_ch(st_wr_ch), .wr_data(st_wr_data),
    .rd_en(st_rd_en), .rd_ch(s_ch), .rd_data(st_rd_data));
  threshold_ram #(.CH(CH), .THR_W(THR_W)) u_thr (.clk, .wr_en(thr_wr_en), .wr_ch(thr_wr_ch),
    .wr_data(tl_thr_next), .rd_en(thr_rd_en), .rd_ch(s_ch), .rd_data(thr_rd_data));
  neo_preproc u_neo (.clk, .rst_n, .in_valid(neo_in_valid), .x_m(ib_rd_data), .x_0(neo_x_0),
    .x_p(neo_x_p), .out_valid(neo_out_valid), .neo);
  threshold_logic #(.WIN_LOG2(WIN), .THR_W(THR_W)) u_tl (.neo, .thr_rd(thr_rd_data),
    .detect(tl_detect), .win_first(tl_win_first), .win_last(tl_win_last),
    .spike(tl_spike), .thr_next(tl_thr_next));
  spike_counter_rom u_sc (.clk, .rst_n, .alloc_req, .alloc_ok, .alloc_base, .free(free_q), .in_use);

  bram_read_ctrl #(.CH(CH), .WIN_LOG2(WIN)) dut (
    .clk, .rst_n, .s_valid, .s_data, .s_ch, .s_slot, .s_ts, .s_chid,
    .ib_rd_en, .ib_rd_ch, .ib_rd_slot, .ib_rd_data,
    .st_rd_en, .st_rd_data, .st_wr_en, .st_wr_ch, .st_wr_data,
    .thr_rd_en, .thr_wr_en, .thr_wr_ch,
    .neo_in_valid, .neo_x_0, .neo_x_p, .neo_out_valid,
    .tl_detect, .tl_win_first, .tl_win_last, .tl_spike,
    .alloc_req, .alloc_ok, .alloc_base,
    .fifo_wr_en, .fifo_wr_addr, .fifo_wr_data, .fifo_commit,
    .phase, .busy, .ev_spike, .ev_drop, .ev_overrun);

  int checks = 0, failures = 0;
  nsd_model m;
  logic [15:0] q[$];
  int nrec, ndrop, ninc, ncommit = 0, nspk = 0, ncopy = 0, nhdr = 0, nrefr = 0;
  longint thr[];
  logic [15:0] fmem [8192];
  int since_valid = 0, run = 0;
  logic [FIFO_AW-1:0] prev_addr;
  bit prev_wr = 1'b0;
  int base;
  logic [15:0] w;
  // controller state codes (declaration order of its state enum)

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    free_q <= fifo_commit;       // block handed back right after commit
    since_valid = s_valid ? 0 : since_valid + 1;
    if (fifo_wr_en) begin
      fmem[fifo_wr_addr] = fifo_wr_data;
      run = prev_wr ? run + 1 : 1;
      if (prev_wr && !(since_valid == 2 && dut.state_q == 3'd5))
        check(fifo_wr_addr == prev_addr + 1'b1, "consecutive FIFO writes use consecutive addresses");
      if (dut.state_q == 3'd1) begin
        nrefr++;
        check(since_valid == 1, "refractory sample written one clock after arrival");
      end
      if (dut.state_q == 3'd4) nhdr++;
    end else begin
      if (prev_wr && run == 16) begin
        ncopy++;
        check(since_valid == 18 && !busy, $sformatf("copy ended %0d clocks after arrival", since_valid));
      end
      if (prev_wr) run = 0;
    end
    prev_wr   = fifo_wr_en;
    prev_addr = fifo_wr_addr;
    if (ev_spike) nspk++;
    if (fifo_commit) begin
      base = (int'(fifo_wr_addr) / 48) * 48;
      check(fifo_wr_addr == FIFO_AW'(base + 47), "commit on the last word of a block");
      for (int k = 0; k < 48; k++) begin
        // the last word is written in this very cycle
        w = (k == 47) ? fifo_wr_data : fmem[base + k];
        check(q.size() > 0 && w == q[0], $sformatf("block %0d word %0d: %h vs %h", ncommit, k, w, (q.size() > 0) ? q[0] : 16'h0));
        if (q.size() > 0) void'(q.pop_front());
      end
      ncommit++;
    end
  end

  initial begin
    m = new(1, CH, WIN, ROUNDS);
    m.generate_signal(20, 36, 70, 14);
    m.run_unit(0, -1, q, nrec, ndrop, ninc, thr);
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    for (int r = 0; r < ROUNDS; r++) begin
      if (r == 8 + (1 << WIN)) begin
        for (int b = 0; b < CH; b++)
          check(longint'(u_thr.mem[b]) == thr[b], $sformatf("threshold ch %0d", b));
        check(phase == PH_DETECT, "detection phase after training");
      end else if (r == 3) check(phase == PH_WARMUP, "warm-up phase");
      else if (r == 9) check(phase == PH_TRAIN, "training phase");
      for (int b = 0; b < CH; b++) begin
        s_valid <= 1'b1;
        s_data  <= 16'(m.x(b, r));
        s_ch    <= CW'(b);
        s_slot  <= 4'(r);
        s_ts    <= 16'(r);
        s_chid  <= 12'(b);
        @(posedge clk);
        s_valid <= 1'b0;
        repeat (GAP - 1) @(posedge clk);
      end
    end
    repeat (50) @(posedge clk);
    check(ncommit == nrec && q.size() == 0, $sformatf("commits %0d vs %0d", ncommit, nrec));
    check(nspk == nrec + ninc, "spike events");
    check(ncopy == nspk, $sformatf("copies %0d vs spikes %0d", ncopy, nspk));
    check(nhdr == nspk, "one channel-ID header per spike");
    check(nrefr >= 30 * nrec, "refractory samples");
    check(nrec > 5, "enough spikes in the stimulus");
    $display("records %0d, copies %0d, refractory writes %0d", nrec, ncopy, nrefr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (ROUNDS * CH * GAP + 5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
