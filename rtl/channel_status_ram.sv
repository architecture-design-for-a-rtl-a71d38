// channel_status_ram: one 15-bit status word per channel of a reduction unit
// (128 words). Each word holds the channel's two copy-state bits (no spike, copy
// first 16 samples, refractory part A, refractory part B) and the 13-bit output
// FIFO address of the next word to be written for that channel.
//
// Simple dual-port memory: write port and synchronous read port (data valid the
// cycle after rd_en). It is not reset; the controller writes every channel's
// word during the warm-up rounds that follow reset.
module channel_status_ram
  import nsd_pkg::*;
#(
  parameter int unsigned CH = nsd_pkg::CH_PER_UNIT
) (
  input  logic                  clk,
  input  logic                  wr_en,
  input  logic [$clog2(CH)-1:0] wr_ch,
  input  ch_status_t            wr_data,
  input  logic                  rd_en,
  input  logic [$clog2(CH)-1:0] rd_ch,
  output ch_status_t            rd_data
);
  ch_status_t mem [CH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_ch] <= wr_data;
    if (rd_en) rd_data <= mem[rd_ch];
  end
endmodule
