// Behavioural model of one daughter board: one overlapping calorimeter tile.
//
// A daughter board receives its own mixer-shaper signal and copies of the
// signals of three neighbouring mixer-shaper cards, so that its tile covers
// a 2 x 2 block of cards (64 crystals) and overlaps the tiles around it.
// Each of the four inputs can also receive a test pulse. The chain is:
//   test pulse amplitude (TrimDAC channels 4-7) added to each input,
//   gain adjustment (TrimDAC channels 0-3, nominal gain about -0.8),
//   four-way sum and bipolar shaping,
//   three discriminators (low, medium, high) with zero-crossing timing,
//   a programmable-width pulse on each zero crossing,
//   priority encoding of the largest threshold into a two-bit Gray code.
// The chain and its order follow the document. The analog parts are
// discrete-time models at the trigger clock (one sample per 42 ns); the use
// of channels 4-7 for the four test inputs and the saturating input adder
// are this design's choices.
//
// Interface: ms_in[0] own signal, ms_in[1..3] neighbour copies; test_in
// test pulse samples per input; cfg thresholds, width and TrimDAC codes.
// disc are the discriminator outputs (read back by the TILE board), gray
// the trigger word. Timing: when the shaper register takes the zero-crossing
// sample at clock edge k, disc falls at edge k+1 and the pulse, and so gray,
// rises at edge k+2 (shaper, discriminator and pulse registers).
module daughter_board
  import cc_pkg::*;
#(
  parameter int SHAPE_D = 24
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [3:0][SAMPLE_W-1:0] ms_in,
  input  logic [3:0][SAMPLE_W-1:0] test_in,
  input  db_cfg_t                  cfg,
  output logic [2:0]               disc,
  output logic [1:0]               gray
);

  logic [3:0][SAMPLE_W-1:0] test_scaled;
  logic [3:0][SAMPLE_W-1:0] mixed;
  logic [3:0][SAMPLE_W-1:0] gained;
  logic signed [SHAPE_W-1:0] shaped;
  logic [2:0]                pulse;

  // test-amplitude channels of the TrimDAC
  trimdac_ad8842 #(.SAMPLE_W(SAMPLE_W), .NCH(4)) u_trim_test (
    .vin(test_in), .code(cfg.trim[7:4]), .vout(test_scaled)
  );

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      logic signed [SAMPLE_W:0] s;
      s = (SAMPLE_W+1)'($signed(ms_in[i])) + (SAMPLE_W+1)'($signed(test_scaled[i]));
      if (s > (2**(SAMPLE_W-1)) - 1)   mixed[i] = {1'b0, {(SAMPLE_W-1){1'b1}}};
      else if (s < -(2**(SAMPLE_W-1))) mixed[i] = {1'b1, {(SAMPLE_W-1){1'b0}}};
      else                             mixed[i] = s[SAMPLE_W-1:0];
    end
  end

  // gain channels of the TrimDAC
  trimdac_ad8842 #(.SAMPLE_W(SAMPLE_W), .NCH(4)) u_trim_gain (
    .vin(mixed), .code(cfg.trim[3:0]), .vout(gained)
  );

  db_sum_shaper #(.SAMPLE_W(SAMPLE_W), .SHAPE_D(SHAPE_D)) u_shaper (
    .clk, .rst_n, .vin(gained), .shaped
  );

  for (genvar t = 0; t < 3; t++) begin : g_thr
    zc_discriminator #(.SAMPLE_W(SHAPE_W), .THR_W(THR_W)) u_disc (
      .clk, .rst_n, .shaped, .threshold(cfg.thr[t]), .disc(disc[t])
    );
    zc_pulse_gen #(.WIDTH_W(WID_W)) u_pulse (
      .clk, .rst_n, .disc(disc[t]), .width_code(cfg.width), .pulse(pulse[t])
    );
  end

  gray_encoder u_gray (.pulse, .gray);

endmodule
