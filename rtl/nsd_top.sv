// nsd_top: neural spike detection platform for NUM_UNITS x 128 channels
// (20 x 128 = 2560 by default).
//
// One time-multiplexed 16-bit sample per clock enters from the multi-gigabit
// receiver (already deserialized and word-aligned by the transceiver, which is
// outside this RTL). The write address generator tags each sample with its
// unit, channel, history slot, time stamp and channel ID and hands it to the
// reduction unit it belongs to; so each unit sees one sample every NUM_UNITS
// clocks, enough for its longest procedure (the 16-sample AP copy). Each unit
// has its own output FIFO and brings out its AP records on its own valid/ready
// stream (index u of the ap_* arrays), to be drained by a spike sorter or by a
// PCI Express DMA engine, neither of which is part of this RTL.
//
// phase[u] tells whether unit u is still warming up, training its thresholds or
// detecting; the ev_* vectors carry each unit's event pulses.
module nsd_top
  import nsd_pkg::*;
#(
  parameter int unsigned NUM_UNITS   = nsd_pkg::NUM_UNITS,
  parameter int unsigned CH          = nsd_pkg::CH_PER_UNIT,
  parameter int unsigned WIN_LOG2    = nsd_pkg::MD_WIN_LOG2,
  parameter int unsigned FIFO_BLOCKS = nsd_pkg::FIFO_BLOCKS
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    rx_valid,
  input  logic [SAMPLE_W-1:0]     rx_data,
  output logic [NUM_UNITS-1:0]    ap_valid,
  input  logic [NUM_UNITS-1:0]    ap_ready,
  output logic [SAMPLE_W-1:0]     ap_data [NUM_UNITS],
  output logic [NUM_UNITS-1:0]    ap_first,
  output logic [NUM_UNITS-1:0]    ap_last,
  output phase_e                  phase [NUM_UNITS],
  output logic [NUM_UNITS-1:0]    ev_spike,
  output logic [NUM_UNITS-1:0]    ev_drop,
  output logic [NUM_UNITS-1:0]    ev_overrun
);
  localparam int unsigned UW = $clog2(NUM_UNITS);

  logic                  g_valid;
  logic [SAMPLE_W-1:0]   g_data;
  logic [UW-1:0]         g_unit_id;
  logic [$clog2(CH)-1:0] g_ch;
  logic [SLOT_W-1:0]     g_slot;
  logic [TS_W-1:0]       g_ts;
  logic [CHID_W-1:0]     g_chid;

  bram_write_addr_gen #(.NUM_UNITS(NUM_UNITS), .CH(CH)) u_addr_gen (
    .clk, .rst_n, .in_valid(rx_valid), .in_data(rx_data),
    .out_valid(g_valid), .out_data(g_data), .out_unit(g_unit_id), .out_ch(g_ch),
    .out_slot(g_slot), .out_ts(g_ts), .out_chid(g_chid));

  for (genvar u = 0; u < NUM_UNITS; u++) begin : g_units
    spike_reduction_unit #(.CH(CH), .WIN_LOG2(WIN_LOG2), .FIFO_BLOCKS(FIFO_BLOCKS)) u_unit (
      .clk, .rst_n,
      .s_valid(g_valid && g_unit_id == UW'(u)), .s_data(g_data), .s_ch(g_ch),
      .s_slot(g_slot), .s_ts(g_ts), .s_chid(g_chid),
      .m_valid(ap_valid[u]), .m_ready(ap_ready[u]), .m_data(ap_data[u]),
      .m_first(ap_first[u]), .m_last(ap_last[u]),
      .phase(phase[u]), .ev_spike(ev_spike[u]), .ev_drop(ev_drop[u]),
      .ev_overrun(ev_overrun[u]));
  end
endmodule
