// Self-checking testbench for zc_discriminator: bipolar pulses of several
// amplitudes (negative lobe first) against thresholds above and below the
// lobe. Expected: the output rises one cycle after the first sample at or
// below -threshold and falls one cycle after the first sample at or above
// zero; pulses that stay above -threshold never fire.
module tb_zc_discriminator;
  logic clk = 0, rst_n = 0;
  logic signed [18:0] shaped = '0;
  logic [11:0] threshold = '0;
  logic disc;
  int checks = 0, failures = 0, fired = 0, quiet = 0;

  zc_discriminator #(.SAMPLE_W(19), .THR_W(12)) dut (.clk, .rst_n, .shaped, .threshold, .disc);

  always #21 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int bip(int t, int amp);
    // negative lobe over t=0..9 (peak at 5), positive lobe t=10..29
    if (t < 0) return 0;
    if (t < 10) return -amp * (5 - ((t > 5) ? t - 5 : 5 - t)) / 5;
    if (t < 30) return amp * (10 - ((t > 20) ? t - 20 : 20 - t)) / 20;
    return 0;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 60; n++) begin
      int amp, thr;
      bit state;
      amp = $urandom_range(100, 3000);
      thr = (n % 7 == 6) ? 0 : $urandom_range(50, 3000);
      threshold = 12'(thr);
      state = 0;
      for (int t = -3; t < 40; t++) begin
        int v;
        v = bip(t, amp);
        shaped = 19'(v);
        @(posedge clk); #1;
        // reference state after this edge
        if (!state) state = (thr != 0) && (v <= -thr);
        else        state = !(v >= 0);
        checks++;
        if (disc !== state) begin
          failures++;
          $display("FAIL amp=%0d thr=%0d t=%0d disc=%b expected %b", amp, thr, t, disc, state);
        end
        if (t == 5) begin
          if (state) fired++; else quiet++;
        end
        @(negedge clk);
      end
    end
    checks++;
    if (fired == 0 || quiet == 0) begin
      failures++;
      $display("FAIL fired=%0d quiet=%0d", fired, quiet);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
