// spike_counter_rom: spike counter and base-address look-up ROM of one unit's
// output FIFO.
//
// The output FIFO is divided into FIFO_BLOCKS blocks of BLOCK_WORDS (48) words,
// one per AP waveform. The spike counter names the next free block; the ROM maps
// it to the block's first word address (block x 48, always a multiple of 16 so
// that the controller can step the low 4 address bits on their own). When a
// spike is detected the controller raises alloc_req; if a block is free the same
// cycle sees alloc_ok with alloc_base, and the counter advances. Blocks are
// handed out and emptied in order, so a count of blocks in use suffices to know
// whether one is free: it rises on an allocation and falls when the emptying
// process has read a block's last word (free). With no free block the spike is
// refused (alloc_ok low); refusing it is this design's choice, the description
// sizes the FIFO for all 128 channels firing at once and does not say more.
module spike_counter_rom #(
  parameter int unsigned FIFO_BLOCKS = nsd_pkg::FIFO_BLOCKS,
  parameter int unsigned BLOCK_WORDS = nsd_pkg::BLOCK_WORDS,
  parameter int unsigned AW          = nsd_pkg::FIFO_AW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          alloc_req,
  output logic          alloc_ok,
  output logic [AW-1:0] alloc_base,
  input  logic          free,
  output logic [$clog2(FIFO_BLOCKS+1)-1:0] in_use
);
  localparam int unsigned BW = (FIFO_BLOCKS > 1) ? $clog2(FIFO_BLOCKS) : 1;

  logic [BW-1:0] spike_cnt;
  logic [AW-1:0] base_rom [FIFO_BLOCKS];

  for (genvar b = 0; b < FIFO_BLOCKS; b++) begin : g_rom
    assign base_rom[b] = AW'(b * BLOCK_WORDS);
  end

  assign alloc_ok   = alloc_req && (in_use != FIFO_BLOCKS[$clog2(FIFO_BLOCKS+1)-1:0]);
  assign alloc_base = base_rom[spike_cnt];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      spike_cnt <= '0;
      in_use    <= '0;
    end else begin
      if (alloc_ok)
        spike_cnt <= (spike_cnt == BW'(FIFO_BLOCKS - 1)) ? '0 : spike_cnt + 1'b1;
      in_use <= in_use + alloc_ok - free;
    end
  end

  initial assert (FIFO_BLOCKS * BLOCK_WORDS <= (1 << AW))
    else $error("output FIFO does not fit the address width");
  assert property (@(posedge clk) disable iff (!rst_n) free |-> in_use != 0)
    else $error("block freed while none is in use");
endmodule
