// Behavioural model of one threshold discriminator with zero-crossing
// timing (a comparator circuit on the real daughter board).
//
// While armed the comparator reference sits at the programmed threshold;
// when the leading, negative lobe of the bipolar pulse goes past it
// (shaped <= -threshold) the output goes high and the reference moves to
// ground. The output then falls when the pulse crosses zero (shaped >= 0),
// and the reference returns to the threshold. The trailing edge of disc
// therefore marks the zero crossing, independent of amplitude. This
// behaviour follows the document; the negative polarity follows its
// description of the shaped pulse, and threshold 0 disabling the channel is
// this design's choice. Timing: disc is registered, one cycle after shaped.
module zc_discriminator #(
  parameter int SAMPLE_W = 19,
  parameter int THR_W    = 12
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic signed [SAMPLE_W-1:0] shaped,
  input  logic [THR_W-1:0]           threshold,
  output logic                       disc
);

  logic signed [SAMPLE_W:0] neg_thr;
  assign neg_thr = -((SAMPLE_W+1)'($signed({1'b0, threshold})));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      disc <= 1'b0;
    else if (!disc)
      disc <= (threshold != '0) && ((SAMPLE_W+1)'(shaped) <= neg_thr);
    else
      disc <= !(shaped >= 0);
  end

endmodule
