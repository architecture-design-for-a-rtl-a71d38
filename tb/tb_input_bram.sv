// tb_input_bram: self-checking test of the input sample memory. Fills all
// 128 x 16 words in random order with random samples, reads every word back and
// compares with a copy kept here, checks the one-clock read latency, that a
// read without rd_en holds its data, and read-first behaviour when a word is
// read and written in the same clock.
module tb_input_bram;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic wr_en = 1'b0, rd_en = 1'b0;
  logic [6:0] wr_ch = '0, rd_ch = '0;
  logic [3:0] wr_slot = '0, rd_slot = '0;
  logic [15:0] wr_data = '0, rd_data;
  logic [15:0] ref_mem [2048];
  int checks = 0, failures = 0;

  input_bram dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    for (int i = 0; i < 2048; i++) begin
      int a;
      a = (i * 1237) % 2048;
      ref_mem[a] = 16'($urandom);
      wr_en <= 1'b1; wr_ch <= 7'(a >> 4); wr_slot <= 4'(a); wr_data <= ref_mem[a];
      @(posedge clk);
    end
    wr_en <= 1'b0;
    for (int a = 0; a < 2048; a++) begin
      rd_en <= 1'b1; rd_ch <= 7'(a >> 4); rd_slot <= 4'(a);
      @(posedge clk);
      rd_en <= 1'b0;
      #1 check(rd_data == ref_mem[a], $sformatf("word %0d: %h vs %h", a, rd_data, ref_mem[a]));
    end
    // data held without rd_en
    rd_ch <= 7'd3; rd_slot <= 4'd9;
    repeat (3) @(posedge clk);
    #1 check(rd_data == ref_mem[2047], "read data held while rd_en is low");
    // read and write the same word in one clock: old data returned
    rd_en <= 1'b1; wr_en <= 1'b1; rd_ch <= 7'd5; rd_slot <= 4'd2;
    wr_ch <= 7'd5; wr_slot <= 4'd2; wr_data <= ~ref_mem[82];
    @(posedge clk);
    rd_en <= 1'b0; wr_en <= 1'b0;
    #1 check(rd_data == ref_mem[82], "read-first on a simultaneous write");
    rd_en <= 1'b1;
    @(posedge clk);
    #1 check(rd_data == ~ref_mem[82], "written word read back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
