// threshold_ram: per-channel threshold memory of a reduction unit (128 words).
//
// While a unit is training, each word accumulates the sum of |NEO| over the
// mean-deviation window for its channel; at the end of the window the same word
// is overwritten with the channel's threshold (16 x mean deviation). Reusing the
// word for the running sum is this design's choice; the description only says
// thresholds are saved on a threshold RAM. Simple dual-port memory with a
// synchronous read port (data valid the cycle after rd_en), not reset.
module threshold_ram #(
  parameter int unsigned CH    = nsd_pkg::CH_PER_UNIT,
  parameter int unsigned THR_W = 32 + nsd_pkg::MD_WIN_LOG2
) (
  input  logic                  clk,
  input  logic                  wr_en,
  input  logic [$clog2(CH)-1:0] wr_ch,
  input  logic [THR_W-1:0]      wr_data,
  input  logic                  rd_en,
  input  logic [$clog2(CH)-1:0] rd_ch,
  output logic [THR_W-1:0]      rd_data
);
  logic [THR_W-1:0] mem [CH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_ch] <= wr_data;
    if (rd_en) rd_data <= mem[rd_ch];
  end
endmodule
