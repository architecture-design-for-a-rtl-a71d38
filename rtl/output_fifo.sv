// output_fifo: output buffer of one reduction unit and its emptying process.
//
// Memory: FIFO_BLOCKS x BLOCK_WORDS words of 16 bits (128 x 48 = 6144 words,
// three 36 Kbit block RAMs). Each block holds one AP record: word 0 the time
// stamp, word 1 the channel ID, words 2..47 the 46 waveform samples. The
// controller writes words at any address of the blocks it owns (wr_en/wr_addr/
// wr_data) and pulses commit when a record is complete; records complete in the
// order their blocks were allocated, so commit raises the upper limit of the
// emptying process by one block.
//
// Emptying: the committed words are read in address order, wrapping after the
// last block, and offered on a valid/ready stream (m_first marks a record's
// time stamp word, m_last its last sample). The memory read is synchronous; a
// two-entry output buffer keeps one word per cycle flowing while m_ready is
// high. block_free pulses when the last word of a block has been read from
// memory, returning the block to the spike counter. The stream itself is this
// design's choice: the description leaves the reader (a spike sorter or the
// PCI Express DMA) outside the platform.
module output_fifo #(
  parameter int unsigned FIFO_BLOCKS = nsd_pkg::FIFO_BLOCKS,
  parameter int unsigned BLOCK_WORDS = nsd_pkg::BLOCK_WORDS,
  parameter int unsigned AW          = nsd_pkg::FIFO_AW,
  parameter int unsigned DATA_W      = nsd_pkg::SAMPLE_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wr_en,
  input  logic [AW-1:0]     wr_addr,
  input  logic [DATA_W-1:0] wr_data,
  input  logic              commit,
  output logic              block_free,
  output logic              m_valid,
  input  logic              m_ready,
  output logic [DATA_W-1:0] m_data,
  output logic              m_first,
  output logic              m_last
);
  localparam int unsigned WORDS = FIFO_BLOCKS * BLOCK_WORDS;
  localparam int unsigned CW    = $clog2(WORDS + 1);
  localparam int unsigned OW    = $clog2(BLOCK_WORDS);
  localparam int unsigned IW    = $clog2(WORDS);

  logic [DATA_W-1:0] mem [WORDS];

  logic [AW-1:0]     rd_ptr;       // next word to read
  logic [CW-1:0]     avail;        // committed words not yet read
  logic [OW-1:0]     rd_off;       // offset of rd_ptr within its block
  logic              issue, pop;
  logic              infl_q, infl_first_q, infl_last_q;
  logic [DATA_W-1:0] rd_q;

  // two-entry output buffer
  typedef struct packed {
    logic [DATA_W-1:0] data;
    logic              first;
    logic              last;
  } ent_t;
  ent_t       buf_q [2];
  logic       head_q;
  logic [1:0] cnt_q;

  assign m_valid = (cnt_q != 0);
  assign m_data  = buf_q[head_q].data;
  assign m_first = buf_q[head_q].first;
  assign m_last  = buf_q[head_q].last;
  assign pop     = m_valid && m_ready;
  // space is counted with the word in flight from memory
  assign issue   = (avail != 0) &&
                   ((32'(cnt_q) + 32'(infl_q) - 32'(pop)) < 2);
  assign block_free = issue && (rd_off == OW'(BLOCK_WORDS - 1));

  always_ff @(posedge clk) begin
    if (wr_en) mem[IW'(wr_addr)] <= wr_data;
    if (issue) rd_q <= mem[IW'(rd_ptr)];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr       <= '0;
      avail        <= '0;
      rd_off       <= '0;
      infl_q       <= 1'b0;
      infl_first_q <= 1'b0;
      infl_last_q  <= 1'b0;
      head_q       <= 1'b0;
      cnt_q        <= '0;
      buf_q[0]     <= '0;
      buf_q[1]     <= '0;
    end else begin
      avail <= avail + (commit ? CW'(BLOCK_WORDS) : '0) - CW'(issue);
      if (issue) begin
        rd_ptr <= (rd_ptr == AW'(WORDS - 1)) ? '0 : rd_ptr + 1'b1;
        rd_off <= (rd_off == OW'(BLOCK_WORDS - 1)) ? '0 : rd_off + 1'b1;
      end
      infl_q       <= issue;
      infl_first_q <= (rd_off == '0);
      infl_last_q  <= (rd_off == OW'(BLOCK_WORDS - 1));
      if (infl_q) buf_q[head_q ^ cnt_q[0]] <= '{data: rd_q, first: infl_first_q, last: infl_last_q};
      if (pop) head_q <= ~head_q;
      cnt_q <= cnt_q + 2'(infl_q) - 2'(pop);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) commit |-> 32'(avail) + BLOCK_WORDS <= WORDS)
    else $error("output FIFO committed beyond its size");
  assert property (@(posedge clk) disable iff (!rst_n) m_valid && !m_ready |=> m_valid && $stable(m_data))
    else $error("output stream dropped a word under back-pressure");
endmodule
