// tb_output_fifo: self-checking test of the output FIFO and its emptying
// process. Blocks of 48 random words are written (in scrambled word order, as
// the controller does for the refractory part) and committed in allocation
// order, wrapping around the 128 blocks several times. The stream must return
// exactly the committed words in order, with m_first on each block's first
// word and m_last on its last, hold steady under random back-pressure, pulse
// block_free once per block, and deliver one word per clock when m_ready stays
// high. Nothing may appear before a block is committed.
module tb_output_fifo;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic wr_en = 1'b0, commit = 1'b0, block_free, m_valid, m_ready = 1'b0, m_first, m_last;
  logic [12:0] wr_addr = '0;
  logic [15:0] wr_data = '0, m_data;
  logic [15:0] q[$];
  int checks = 0, failures = 0, got = 0, frees = 0, blk = 0, in_fifo = 0;
  int stream_cycles = 0, stream_words = 0;
  bit rnd_ready = 1'b1;

  output_fifo dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (block_free) begin frees++; in_fifo--; end
    if (m_valid && m_ready) begin
      check(q.size() > 0 && m_data == q[0], $sformatf("word %0d", got));
      check(m_first == (got % 48 == 0) && m_last == (got % 48 == 47), $sformatf("flags word %0d", got));
      if (q.size() > 0) void'(q.pop_front());
      got++;
    end
    m_ready <= rnd_ready ? ($urandom_range(3, 0) != 0) : 1'b1;
  end

  task automatic write_block(int nblocks);
    for (int n = 0; n < nblocks; n++) begin
      logic [15:0] w [48];
      int base;
      while (in_fifo >= 128) @(posedge clk);
      base = blk * 48;
      foreach (w[k]) w[k] = 16'($urandom);
      for (int k = 0; k < 48; k++) begin
        int kk;
        kk = (k < 16) ? k : 16 + ((k - 16) * 7) % 32;   // scrambled tail
        wr_en <= 1'b1; wr_addr <= 13'(base + kk); wr_data <= w[kk];
        @(posedge clk);
      end
      wr_en <= 1'b0;
      foreach (w[k]) q.push_back(w[k]);
      commit <= 1'b1;
      @(posedge clk);
      commit <= 1'b0;
      in_fifo++;
      blk = (blk + 1) % 128;
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    // nothing visible before commit
    wr_en <= 1'b1; wr_addr <= '0; wr_data <= 16'h1234;
    repeat (5) @(posedge clk);
    wr_en <= 1'b0;
    check(!m_valid, "no output before commit");
    write_block(300);
    for (int t = 0; t < 20000 && q.size() > 0; t++) @(posedge clk);
    repeat (5) @(posedge clk);
    check(got == 300 * 48 && q.size() == 0, $sformatf("words out %0d", got));
    check(frees == 300, $sformatf("blocks freed %0d", frees));
    // throughput: fill 10 blocks without reading, then stream with ready high
    rnd_ready = 1'b0;
    force m_ready = 1'b0;
    write_block(10);
    release m_ready;
    @(posedge clk);
    while (m_valid) begin
      stream_cycles++;
      if (m_ready) stream_words++;
      @(posedge clk);
    end
    check(stream_words == 480 && stream_cycles <= 482, $sformatf("480 words in %0d clocks", stream_cycles));
    check(q.size() == 0, "all words delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
