// tb_threshold_ram: self-checking test of the per-channel threshold memory.
// Writes random 39-bit words (running sums and thresholds) for all 128
// channels, overwrites some, and reads every word back one clock after rd_en.
module tb_threshold_ram;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic wr_en = 1'b0, rd_en = 1'b0;
  logic [6:0] wr_ch = '0, rd_ch = '0;
  logic [38:0] wr_data = '0, rd_data;
  logic [38:0] ref_mem [128];
  int checks = 0, failures = 0;

  threshold_ram dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    for (int pass = 0; pass < 2; pass++)
      for (int c = 0; c < 128; c++) begin
        if (pass == 1 && c % 3 != 0) continue;
        ref_mem[c] = {7'($urandom), 32'($urandom)};
        wr_en <= 1'b1; wr_ch <= 7'(c); wr_data <= ref_mem[c];
        @(posedge clk);
      end
    wr_en <= 1'b0;
    for (int c = 0; c < 128; c++) begin
      rd_en <= 1'b1; rd_ch <= 7'((c * 37) % 128);
      @(posedge clk);
      rd_en <= 1'b0;
      #1 check(rd_data == ref_mem[(c * 37) % 128], $sformatf("ch %0d", (c * 37) % 128));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
