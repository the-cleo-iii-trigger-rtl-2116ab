// Behavioural model of an octal 8-bit TrimDAC used as a programmable-gain
// amplifier (the Analog Devices AD8842 on the daughter and TILE boards).
//
// Not synthesizable hardware in the real system: an analog vendor part,
// modelled here in discrete time on integer samples. Each channel
// multiplies its input by (code-128)/128, a gain between -1 and +1 as the
// document describes; code 26 gives the nominal daughter-board gain of
// about -0.8, where one code step changes the gain by about 1 %. The
// channel count is a parameter so that a board can use the gain channels
// and the test-amplitude channels of one chip as two separate slices.
// Combinational: vout follows vin and code in the same cycle. Outputs
// saturate at the sample range.
module trimdac_ad8842 #(
  parameter int SAMPLE_W = 16,
  parameter int NCH      = 8
) (
  input  logic [NCH-1:0][SAMPLE_W-1:0] vin,
  input  logic [NCH-1:0][7:0]          code,
  output logic [NCH-1:0][SAMPLE_W-1:0] vout
);

  localparam logic signed [SAMPLE_W+8:0] MAXV = (2**(SAMPLE_W-1)) - 1;
  localparam logic signed [SAMPLE_W+8:0] MINV = -(2**(SAMPLE_W-1));

  always_comb begin
    for (int i = 0; i < NCH; i++) begin
      logic signed [SAMPLE_W+8:0] prod;
      prod = ($signed(vin[i]) * $signed({1'b0, code[i]} - 9'sd128)) >>> 7;
      if (prod > MAXV)      vout[i] = MAXV[SAMPLE_W-1:0];
      else if (prod < MINV) vout[i] = MINV[SAMPLE_W-1:0];
      else                  vout[i] = prod[SAMPLE_W-1:0];
    end
  end

endmodule
