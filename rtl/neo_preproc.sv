// neo_preproc: nonlinear energy operator, NEO[n] = x[n]^2 - x[n-d]*x[n+d].
//
// The three samples x[n-d], x[n] and x[n+d] of one channel arrive together with
// in_valid; d = 4 in this platform, so x[n+d] is the sample that has just come
// in and the other two are read from the channel's input BRAM history. Two
// signed 16x16 multipliers (one DSP slice each) work in parallel in the first
// stage and the difference is formed in the second, so neo is valid two cycles
// after in_valid, with out_valid. A new set of samples can enter every cycle.
// The result is kept at full precision: 2*SAMPLE_W+1 signed bits.
module neo_preproc #(
  parameter int unsigned SAMPLE_W = nsd_pkg::SAMPLE_W
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  input  logic signed [SAMPLE_W-1:0]    x_m,   // x[n-d]
  input  logic signed [SAMPLE_W-1:0]    x_0,   // x[n]
  input  logic signed [SAMPLE_W-1:0]    x_p,   // x[n+d]
  output logic                          out_valid,
  output logic signed [2*SAMPLE_W:0]    neo
);
  logic signed [2*SAMPLE_W-1:0] sq_q, pr_q;
  logic                         v1_q;

  always_ff @(posedge clk) begin
    sq_q <= x_0 * x_0;
    pr_q <= x_m * x_p;
    neo  <= (2*SAMPLE_W+1)'(sq_q) - (2*SAMPLE_W+1)'(pr_q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1_q      <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v1_q      <= in_valid;
      out_valid <= v1_q;
    end
  end
endmodule
