// tb_channel_status_ram: self-checking test of the channel status memory.
// Writes a random state and 13-bit FIFO address for each of the 128 channels,
// rewrites half of them, and reads every word back one clock after rd_en,
// comparing state and address fields with a copy kept here.
module tb_channel_status_ram;
  import nsd_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic wr_en = 1'b0, rd_en = 1'b0;
  logic [6:0] wr_ch = '0, rd_ch = '0;
  ch_status_t wr_data = '0, rd_data;
  ch_status_t ref_mem [128];
  int checks = 0, failures = 0;

  channel_status_ram dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    for (int pass = 0; pass < 2; pass++)
      for (int c = 0; c < 128; c++) begin
        if (pass == 1 && c % 2 == 0) continue;
        ref_mem[c] = '{state: ch_state_e'($urandom_range(3, 0)), addr: FIFO_AW'($urandom)};
        wr_en <= 1'b1; wr_ch <= 7'(c); wr_data <= ref_mem[c];
        @(posedge clk);
      end
    wr_en <= 1'b0;
    for (int c = 127; c >= 0; c--) begin
      rd_en <= 1'b1; rd_ch <= 7'(c);
      @(posedge clk);
      rd_en <= 1'b0;
      #1;
      check(rd_data.state == ref_mem[c].state, $sformatf("state of ch %0d", c));
      check(rd_data.addr == ref_mem[c].addr, $sformatf("address of ch %0d", c));
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
