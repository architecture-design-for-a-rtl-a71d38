// threshold_logic: threshold comparator and mean-deviation threshold computation
// for one NEO value of one channel (combinational).
//
// In the detection phase the NEO output is compared with the channel's stored
// threshold; a spike is flagged when NEO is strictly greater. In the training
// phase that follows reset the stored word is a running sum of |NEO| for the
// channel: the first window sample starts the sum, later ones add to it, and the
// last one replaces the sum by the threshold, 16 x MD with
// MD = (1/N) * sum |NEO|, N = 2^WIN_LOG2, so the division is a right shift and
// the multiplication a left shift. thr_next is what the controller writes back
// to the threshold RAM in the training phase.
module threshold_logic #(
  parameter int unsigned NEO_W     = nsd_pkg::NEO_W,
  parameter int unsigned WIN_LOG2  = nsd_pkg::MD_WIN_LOG2,
  parameter int unsigned MULT_LOG2 = nsd_pkg::THR_MULT_LOG2,
  parameter int unsigned THR_W     = NEO_W - 1 + WIN_LOG2
) (
  input  logic signed [NEO_W-1:0] neo,
  input  logic [THR_W-1:0]        thr_rd,     // stored threshold or running sum
  input  logic                    detect,     // detection phase
  input  logic                    win_first,  // first sample of the training window
  input  logic                    win_last,   // last sample of the training window
  output logic                    spike,
  output logic [THR_W-1:0]        thr_next
);
  logic [NEO_W-2:0] abs_neo;
  logic [THR_W-1:0] sum;
  logic [THR_W-1:0] md;

  always_comb begin
    abs_neo  = neo[NEO_W-1] ? (NEO_W-1)'(-neo) : neo[NEO_W-2:0];
    sum      = (win_first ? '0 : thr_rd) + THR_W'(abs_neo);
    md       = sum >> WIN_LOG2;
    thr_next = win_last ? (md << MULT_LOG2) : sum;
    spike    = detect && !neo[NEO_W-1] && (THR_W'(neo[NEO_W-2:0]) > thr_rd);
  end
endmodule
