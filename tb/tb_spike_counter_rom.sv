// tb_spike_counter_rom: self-checking test of the spike counter and base
// address ROM. Allocates all 128 blocks and checks each base address is
// block * 48 in allocation order; checks that a 129th request is refused; then
// runs random allocate/free traffic checking the base sequence wraps after
// block 127 and that the in-use count always matches a count kept here.
module tb_spike_counter_rom;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic alloc_req = 1'b0, alloc_ok, free = 1'b0;
  logic [12:0] alloc_base;
  logic [7:0] in_use;
  int checks = 0, failures = 0, next_blk = 0, used = 0, refused = 0;

  spike_counter_rom dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < 5000; i++) begin
      alloc_req <= (i < 130) ? 1'b1 : ($urandom_range(1, 0) == 1);
      free      <= (i < 130) ? 1'b0 : (used > 0 && $urandom_range(1, 0) == 1);
      #1;
      check(alloc_ok == (alloc_req && used < 128), $sformatf("alloc_ok with %0d in use", used));
      if (alloc_ok) check(alloc_base == 13'(next_blk * 48), $sformatf("base %0d for block %0d", alloc_base, next_blk));
      if (alloc_req && !alloc_ok) refused++;
      @(posedge clk);
      if (alloc_ok) begin
        next_blk = (next_blk + 1) % 128;
        used++;
      end
      if (free) used--;
      #1 check(int'(in_use) == used, "in-use count");
    end
    check(refused > 0, "a full FIFO refused a block");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
