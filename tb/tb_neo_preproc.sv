// tb_neo_preproc: self-checking test of the nonlinear energy operator. Feeds
// random and extreme sample triples, one per clock with random gaps, and
// compares each result, two clocks later, with x0*x0 - xm*xp computed here in
// 64-bit arithmetic; out_valid must follow in_valid by exactly two clocks.
module tb_neo_preproc;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic in_valid = 1'b0, out_valid;
  logic signed [15:0] x_m = '0, x_0 = '0, x_p = '0;
  logic signed [32:0] neo;
  longint exp_q[$];
  int checks = 0, failures = 0, n_in = 0, n_out = 0;
  bit v_d1 = 1'b0, v_d2 = 1'b0;

  neo_preproc dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    check(out_valid == v_d2, "out_valid two clocks after in_valid");
    v_d2 = v_d1;
    v_d1 = in_valid;
    if (out_valid) begin
      check(exp_q.size() > 0 && longint'(neo) == exp_q[0],
            $sformatf("neo %0d vs %0d", neo, (exp_q.size() > 0) ? exp_q[0] : 0));
      if (exp_q.size() > 0) void'(exp_q.pop_front());
      n_out++;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < 2000; i++) begin
      logic signed [15:0] a, b, c;
      if (i < 4) begin
        a = (i[0]) ? 16'sh8000 : 16'sh7fff;
        b = 16'sh8000;
        c = (i[1]) ? 16'sh8000 : 16'sh7fff;
      end else begin
        a = 16'($urandom); b = 16'($urandom); c = 16'($urandom);
      end
      in_valid <= ($urandom_range(3, 0) != 0) || i < 4;
      x_m <= a; x_0 <= b; x_p <= c;
      @(posedge clk);
      if (in_valid) begin
        exp_q.push_back(longint'(b) * longint'(b) - longint'(a) * longint'(c));
        n_in++;
      end
    end
    in_valid <= 1'b0;
    repeat (4) @(posedge clk);
    check(n_in == n_out && exp_q.size() == 0, "every input produced one output");
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
