// spike_reduction_unit: spike-based data reduction for 128 time-multiplexed
// channels.
//
// The unit receives every NUM_UNITS-th sample of the platform's stream, each
// tagged with its channel (7 bits), history slot (sample number modulo 16), time
// stamp and global channel ID. The sample is written to the input BRAM in the
// cycle it arrives; the BRAM read controller then tests it with the NEO and the
// channel's threshold or, for a channel whose spike is being recorded, copies
// AP samples to the output FIFO. Each detected spike yields a 48-word record in
// the output FIFO: time stamp of the spike sample, channel ID, then 10 samples
// before the spike, the spike sample and 35 after it. Complete records leave on
// the m_* valid/ready stream in detection order.
//
// After reset the unit spends 8 sample rounds warming up and 2^WIN_LOG2 rounds
// estimating each channel's threshold (16 x mean |NEO|) before it detects
// (phase output). ev_spike, ev_drop (spike lost for lack of a free output
// block) and ev_overrun (sample arrived before the previous one was handled)
// are one-cycle event pulses.
module spike_reduction_unit
  import nsd_pkg::*;
#(
  parameter int unsigned CH          = nsd_pkg::CH_PER_UNIT,
  parameter int unsigned WIN_LOG2    = nsd_pkg::MD_WIN_LOG2,
  parameter int unsigned FIFO_BLOCKS = nsd_pkg::FIFO_BLOCKS
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  s_valid,
  input  logic [SAMPLE_W-1:0]   s_data,
  input  logic [$clog2(CH)-1:0] s_ch,
  input  logic [SLOT_W-1:0]     s_slot,
  input  logic [TS_W-1:0]       s_ts,
  input  logic [CHID_W-1:0]     s_chid,
  output logic                  m_valid,
  input  logic                  m_ready,
  output logic [SAMPLE_W-1:0]   m_data,
  output logic                  m_first,
  output logic                  m_last,
  output phase_e                phase,
  output logic                  ev_spike,
  output logic                  ev_drop,
  output logic                  ev_overrun
);
  localparam int unsigned CW    = $clog2(CH);
  localparam int unsigned THR_W = NEO_W - 1 + WIN_LOG2;

  logic                 ib_rd_en;
  logic [CW-1:0]        ib_rd_ch;
  logic [SLOT_W-1:0]    ib_rd_slot;
  logic [SAMPLE_W-1:0]  ib_rd_data;
  logic                 st_rd_en, st_wr_en;
  logic [CW-1:0]        st_wr_ch;
  ch_status_t           st_rd_data, st_wr_data;
  logic                 thr_rd_en, thr_wr_en;
  logic [CW-1:0]        thr_wr_ch;
  logic [THR_W-1:0]     thr_rd_data;
  logic                 neo_in_valid, neo_out_valid;
  logic [SAMPLE_W-1:0]  neo_x_0, neo_x_p;
  logic signed [NEO_W-1:0] neo;
  logic                 tl_detect, tl_win_first, tl_win_last, tl_spike;
  logic [THR_W-1:0]     tl_thr_next;
  logic                 alloc_req, alloc_ok, block_free;
  logic [FIFO_AW-1:0]   alloc_base;
  logic                 fifo_wr_en, fifo_commit;
  logic [FIFO_AW-1:0]   fifo_wr_addr;
  logic [SAMPLE_W-1:0]  fifo_wr_data;
  logic [$clog2(FIFO_BLOCKS+1)-1:0] in_use;
  logic                 busy;

  input_bram #(.CH(CH)) u_input_bram (
    .clk, .wr_en(s_valid), .wr_ch(s_ch), .wr_slot(s_slot), .wr_data(s_data),
    .rd_en(ib_rd_en), .rd_ch(ib_rd_ch), .rd_slot(ib_rd_slot), .rd_data(ib_rd_data));

  channel_status_ram #(.CH(CH)) u_status (
    .clk, .wr_en(st_wr_en), .wr_ch(st_wr_ch), .wr_data(st_wr_data),
    .rd_en(st_rd_en), .rd_ch(s_ch), .rd_data(st_rd_data));

  threshold_ram #(.CH(CH), .THR_W(THR_W)) u_thr_ram (
    .clk, .wr_en(thr_wr_en), .wr_ch(thr_wr_ch), .wr_data(tl_thr_next),
    .rd_en(thr_rd_en), .rd_ch(s_ch), .rd_data(thr_rd_data));

  neo_preproc u_neo (
    .clk, .rst_n, .in_valid(neo_in_valid),
    .x_m(ib_rd_data), .x_0(neo_x_0), .x_p(neo_x_p),
    .out_valid(neo_out_valid), .neo(neo));

  threshold_logic #(.WIN_LOG2(WIN_LOG2), .THR_W(THR_W)) u_thr_logic (
    .neo, .thr_rd(thr_rd_data), .detect(tl_detect),
    .win_first(tl_win_first), .win_last(tl_win_last),
    .spike(tl_spike), .thr_next(tl_thr_next));

  spike_counter_rom #(.FIFO_BLOCKS(FIFO_BLOCKS)) u_spike_cnt (
    .clk, .rst_n, .alloc_req, .alloc_ok, .alloc_base, .free(block_free), .in_use);

  output_fifo #(.FIFO_BLOCKS(FIFO_BLOCKS)) u_out_fifo (
    .clk, .rst_n, .wr_en(fifo_wr_en), .wr_addr(fifo_wr_addr), .wr_data(fifo_wr_data),
    .commit(fifo_commit), .block_free,
    .m_valid, .m_ready, .m_data, .m_first, .m_last);

  bram_read_ctrl #(.CH(CH), .WIN_LOG2(WIN_LOG2)) u_ctrl (
    .clk, .rst_n,
    .s_valid, .s_data, .s_ch, .s_slot, .s_ts, .s_chid,
    .ib_rd_en, .ib_rd_ch, .ib_rd_slot, .ib_rd_data,
    .st_rd_en, .st_rd_data, .st_wr_en, .st_wr_ch, .st_wr_data,
    .thr_rd_en, .thr_wr_en, .thr_wr_ch,
    .neo_in_valid, .neo_x_0, .neo_x_p, .neo_out_valid,
    .tl_detect, .tl_win_first, .tl_win_last, .tl_spike,
    .alloc_req, .alloc_ok, .alloc_base,
    .fifo_wr_en, .fifo_wr_addr, .fifo_wr_data, .fifo_commit,
    .phase, .busy, .ev_spike, .ev_drop, .ev_overrun);
endmodule
