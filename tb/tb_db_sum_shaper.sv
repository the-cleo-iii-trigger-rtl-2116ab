// Self-checking testbench for db_sum_shaper: random inputs; a history of
// the four-way sums kept by the testbench gives the expected shaped value
// sum[n-1] - sum[n-1-D] after each clock edge. Also checks that a pulse
// scaled in amplitude crosses zero in the same cycle.
module tb_db_sum_shaper;
  localparam int SW = 16, D = 8;
  logic clk = 0, rst_n = 0;
  logic [3:0][SW-1:0] vin = '0;
  logic signed [SW+2:0] shaped;
  int checks = 0, failures = 0;
  int hist[$];

  db_sum_shaper #(.SAMPLE_W(SW), .SHAPE_D(D)) dut (.clk, .rst_n, .vin, .shaped);

  always #21 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sum4(logic [3:0][SW-1:0] v);
    int s = 0;
    for (int i = 0; i < 4; i++) s += int'($signed(v[i]));
    return s;
  endfunction

  // pulse: rises over 6 samples, then decays linearly over 20
  function automatic int shape(int t, int amp);
    if (t < 0) return 0;
    if (t < 6) return amp * t / 6;
    if (t < 26) return amp * (26 - t) / 20;
    return 0;
  endfunction

  int zc [2];

  initial begin
    for (int i = 0; i < D + 1; i++) hist.push_back(0);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      for (int i = 0; i < 4; i++) vin[i] = SW'($urandom_range(0, 40000) - 20000);
      hist.push_back(sum4(vin));
      @(posedge clk); #1;
      checks++;
      if (int'(shaped) != hist[hist.size()-1] - hist[hist.size()-1-D]) begin
        failures++;
        $display("FAIL n=%0d shaped=%0d expected %0d", n, shaped,
                 hist[hist.size()-1] - hist[hist.size()-1-D]);
      end
      @(negedge clk);
    end
    // amplitude independence of the zero crossing (negative gain: -amp)
    for (int k = 0; k < 2; k++) begin
      int amp;
      bit neg_seen;
      amp = (k == 0) ? -400 : -4000;
      vin = '0;
      repeat (D + 4) @(negedge clk);
      zc[k] = -1;
      neg_seen = 0;
      for (int t = 0; t < 60; t++) begin
        for (int i = 0; i < 4; i++) vin[i] = SW'(shape(t, amp));
        @(posedge clk); #1;
        if (shaped < 0) neg_seen = 1;
        if (neg_seen && shaped >= 0 && zc[k] < 0) zc[k] = t;
        @(negedge clk);
      end
    end
    checks++;
    if (zc[0] != zc[1] || zc[0] < 0) begin
      failures++;
      $display("FAIL zero crossing %0d vs %0d", zc[0], zc[1]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
