// bram_write_addr_gen: write address generator at the ingress of the platform.
//
// The aligned 16-bit sample stream from the receiver carries one sample per
// clock (80 MHz for 2560 channels at 31.25 kS/s each), in time-division order:
// channel 0 of every unit, then channel 1 of every unit, and so on. Three
// cascaded counters tag each sample: (a) the unit / input BRAM ID, 0..NUM_UNITS-1,
// stepping every sample; (b) the channel within the unit, 0..127, stepping when
// (a) wraps; (c) the 4-bit sample slot, stepping when (b) wraps. {a, b, c} is the
// 16-bit input BRAM write address. The generator also gives the 16-bit time
// stamp (the count of complete rounds over all channels, whose low 4 bits are
// counter (c)) and the 12-bit channel ID (position in the round, b*NUM_UNITS+a).
//
// Timing: the tagged sample appears on the out_* ports one cycle after in_valid.
// The first sample after reset is taken as channel 0 of unit 0 (the stream's
// framing is this design's assumption). Gaps in in_valid are allowed.
module bram_write_addr_gen
  import nsd_pkg::*;
#(
  parameter int unsigned NUM_UNITS = nsd_pkg::NUM_UNITS,
  parameter int unsigned CH        = nsd_pkg::CH_PER_UNIT
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         in_valid,
  input  logic [SAMPLE_W-1:0]          in_data,
  output logic                         out_valid,
  output logic [SAMPLE_W-1:0]          out_data,
  output logic [$clog2(NUM_UNITS)-1:0] out_unit,   // counter (a)
  output logic [$clog2(CH)-1:0]        out_ch,     // counter (b)
  output logic [SLOT_W-1:0]            out_slot,   // counter (c)
  output logic [TS_W-1:0]              out_ts,
  output logic [CHID_W-1:0]            out_chid
);
  localparam int unsigned UW = $clog2(NUM_UNITS);
  localparam int unsigned CW = $clog2(CH);

  logic [UW-1:0]     a_q;
  logic [CW-1:0]     b_q;
  logic [TS_W-1:0]   ts_q;
  logic [CHID_W-1:0] id_q;
  logic              a_wrap, b_wrap;

  assign a_wrap = (a_q == UW'(NUM_UNITS - 1));
  assign b_wrap = (b_q == CW'(CH - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q       <= '0;
      b_q       <= '0;
      ts_q      <= '0;
      id_q      <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_unit  <= '0;
      out_ch    <= '0;
      out_slot  <= '0;
      out_ts    <= '0;
      out_chid  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_data <= in_data;
        out_unit <= a_q;
        out_ch   <= b_q;
        out_slot <= ts_q[SLOT_W-1:0];
        out_ts   <= ts_q;
        out_chid <= id_q;
        a_q      <= a_wrap ? '0 : a_q + 1'b1;
        if (a_wrap) begin
          b_q <= b_wrap ? '0 : b_q + 1'b1;
          if (b_wrap) ts_q <= ts_q + 1'b1;
        end
        id_q <= (a_wrap && b_wrap) ? '0 : id_q + 1'b1;
      end
    end
  end

  initial assert (NUM_UNITS * CH <= (1 << CHID_W))
    else $error("channel count exceeds the channel ID width");
endmodule
