// Behavioural model of the daughter-board summing amplifier and bipolar
// shaper.
//
// Analog circuitry on the real board, modelled here in discrete time at the
// trigger clock (one sample per 42 ns). The four gain-adjusted mixer-shaper
// signals are added, and the sum is shaped into a bipolar pulse by a
// delay-line differentiator, shaped[n] = sum[n] - sum[n-SHAPE_D]. With the
// negative nominal gains the leading lobe is negative, as in the document,
// and because the shaping is linear the zero crossing does not depend on
// the pulse amplitude, which is the property the trigger timing relies on.
// The differentiator itself (and SHAPE_D) is this design's choice; the real
// shaper's 700 ns / 1.4 us / 2 us lobes are not reproduced exactly.
// Timing: shaped is registered, one cycle after vin.
module db_sum_shaper #(
  parameter int SAMPLE_W = 16,
  parameter int SHAPE_D  = 24
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [3:0][SAMPLE_W-1:0]   vin,
  output logic signed [SAMPLE_W+2:0] shaped
);

  logic signed [SAMPLE_W+1:0] sum;
  logic signed [SAMPLE_W+1:0] dly [SHAPE_D];

  always_comb begin
    sum = '0;
    for (int i = 0; i < 4; i++)
      sum = sum + (SAMPLE_W+2)'($signed(vin[i]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < SHAPE_D; i++) dly[i] <= '0;
      shaped <= '0;
    end else begin
      dly[0] <= sum;
      for (int i = 1; i < SHAPE_D; i++) dly[i] <= dly[i-1];
      shaped <= (SAMPLE_W+3)'(sum) - (SAMPLE_W+3)'(dly[SHAPE_D-1]);
    end
  end

endmodule
