// Zero-crossing output pulse generator.
//
// On the board this is a retriggerable monostable whose timing input is fed
// by a programmable current, so its width can be set per daughter board.
// Here it is a clocked equivalent: the trailing edge of the discriminator
// output (which marks the zero crossing of the shaped pulse) loads a down
// counter, and the output stays high while the counter is non-zero. The
// pulse lasts width_code+1 clock periods. A new trailing edge during a
// pulse restarts it, as a retriggerable monostable does. Triggering on the
// trailing edge follows the document; the clocked counter and the
// width_code+1 rule are this design's choices.
//
// Timing: the discriminator falls in cycle k (sampled at edge k), the pulse
// is high from edge k+1 for width_code+1 cycles.
module zc_pulse_gen #(
  parameter int WIDTH_W = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               disc,
  input  logic [WIDTH_W-1:0] width_code,
  output logic               pulse
);

  logic             disc_q;
  logic [WIDTH_W:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      disc_q <= 1'b0;
      cnt    <= '0;
    end else begin
      disc_q <= disc;
      if (disc_q && !disc)
        cnt <= {1'b0, width_code} + 1'b1;
      else if (cnt != '0)
        cnt <= cnt - 1'b1;
    end
  end

  assign pulse = (cnt != '0);

endmodule
