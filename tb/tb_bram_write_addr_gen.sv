// tb_bram_write_addr_gen: self-checking test of the write address generator at
// its platform size (20 units x 128 channels). Streams 40 full rounds of
// samples with random gaps and checks every output against counters kept here:
// unit = i mod 20, channel = (i / 20) mod 128, slot = round mod 16,
// time stamp = round, channel ID = i mod 2560, data passed through, all one
// clock after the input.
module tb_bram_write_addr_gen;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic in_valid = 1'b0, out_valid;
  logic [15:0] in_data = '0, out_data, out_ts;
  logic [4:0] out_unit;
  logic [6:0] out_ch;
  logic [3:0] out_slot;
  logic [11:0] out_chid;
  int checks = 0, failures = 0, n_out = 0;
  logic [15:0] dq[$];

  bram_write_addr_gen dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      int i, rnd;
      i = n_out;
      rnd = i / 2560;
      check(out_unit == 5'(i % 20) && out_ch == 7'((i / 20) % 128), $sformatf("sample %0d unit/channel", i));
      check(out_slot == 4'(rnd) && out_ts == 16'(rnd), $sformatf("sample %0d slot/time stamp", i));
      check(out_chid == 12'(i % 2560), $sformatf("sample %0d channel ID", i));
      check(dq.size() > 0 && out_data == dq[0], "data");
      if (dq.size() > 0) void'(dq.pop_front());
      n_out++;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    while (n_out + int'(in_valid) < 40 * 2560) begin
      logic v;
      v = ($urandom_range(7, 0) != 0);
      in_valid <= v;
      in_data <= 16'($urandom);
      @(posedge clk);
      if (in_valid) dq.push_back(in_data);
      #1 check(out_valid == in_valid, "output one clock after input");
    end
    in_valid <= 1'b0;
    repeat (3) @(posedge clk);
    check(n_out == 40 * 2560, "sample count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
