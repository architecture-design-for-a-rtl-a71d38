// input_bram: per-unit input sample memory holding the 16 most recent samples of
// each of the unit's 128 channels (2048 x 16 bits, one block RAM).
//
// The word address is {channel, slot}, where the slot is the sample number modulo
// 16 supplied by the write address generator, so a channel's region is a ring of
// its last 16 samples: 10 pre-spike samples, the spike sample, the 4 "future"
// samples the NEO needs and one more for timing. One write port takes the
// incoming sample; one read port serves the NEO and the AP copy to the output
// FIFO. The read is synchronous: rd_data is valid the cycle after rd_en.
// A read of the word being written in the same cycle returns the old word
// (read-first); the controller never does this.
module input_bram #(
  parameter int unsigned CH     = nsd_pkg::CH_PER_UNIT,
  parameter int unsigned SLOT_W = nsd_pkg::SLOT_W,
  parameter int unsigned DATA_W = nsd_pkg::SAMPLE_W
) (
  input  logic                   clk,
  input  logic                   wr_en,
  input  logic [$clog2(CH)-1:0]  wr_ch,
  input  logic [SLOT_W-1:0]      wr_slot,
  input  logic [DATA_W-1:0]      wr_data,
  input  logic                   rd_en,
  input  logic [$clog2(CH)-1:0]  rd_ch,
  input  logic [SLOT_W-1:0]      rd_slot,
  output logic [DATA_W-1:0]      rd_data
);
  localparam int unsigned DEPTH = CH << SLOT_W;

  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[{wr_ch, wr_slot}] <= wr_data;
    if (rd_en) rd_data <= mem[{rd_ch, rd_slot}];
  end
endmodule
