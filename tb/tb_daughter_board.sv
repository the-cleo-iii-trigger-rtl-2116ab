// Self-checking testbench for the daughter_board model at its default
// shaping. Events: mixer-shaper pulses (2.5 us rise, slow decay, one
// sample per 42 ns) of several amplitudes on the four inputs, and one
// event driven only by a test pulse. A cycle-level reference written here
// (TrimDAC arithmetic, four-way sum, delay-line shaping, threshold and
// zero-crossing state, retriggerable width counter, priority Gray code)
// predicts disc and gray at every clock. The testbench also checks that
// every threshold level occurs and that the Gray code rises in the same
// cycle for events of different amplitude (timing from the zero crossing).
module tb_daughter_board;
  import cc_pkg::*;
  localparam int D = 24, T = 420;
  logic clk = 0, rst_n = 0;
  logic [3:0][SAMPLE_W-1:0] ms_in = '0, test_in = '0;
  db_cfg_t cfg;
  logic [2:0] disc;
  logic [1:0] gray;
  int checks = 0, failures = 0;
  int level_seen [4];
  int rise_cycle [$];

  daughter_board dut (.clk, .rst_n, .ms_in, .test_in, .cfg, .disc, .gray);

  always #21 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int clip16(int v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  function automatic int tdac(int x, int code);
    return clip16(int'($floor(real'(x) * real'(code - 128) / 128.0)));
  endfunction

  function automatic int pulse_shape(int t, int amp);
    if (t < 0) return 0;
    if (t < 60) return amp * t / 60;
    return int'(real'(amp) * $exp(-real'(t - 60) / 190.0));
  endfunction

  task automatic run_event(int amp0, int amp_nb, int tp_amp);
    int sum [T];
    int v [T];
    int d [T][3];
    int cnt [T][3];
    int sw, first_rise, maxlvl;
    first_rise = -1;
    maxlvl = 0;
    for (int n = 0; n < T; n++) begin
      int s = 0;
      for (int i = 0; i < 4; i++) begin
        int m, tp, x;
        m  = pulse_shape(n - 5, (i == 0) ? amp0 : amp_nb);
        tp = (i == 0) ? pulse_shape(n - 5, tp_amp) : 0;
        x  = clip16(m + tdac(tp, cfg.trim[4 + i]));
        s += tdac(x, cfg.trim[i]);
      end
      sum[n] = s;
      v[n] = s - ((n >= D) ? sum[n - D] : 0);
    end
    for (int n = 0; n < T; n++)
      for (int t = 0; t < 3; t++) begin
        int dp, vp;
        dp = (n > 0) ? d[n-1][t] : 0;
        vp = (n > 0) ? v[n-1] : 0;
        if (!dp) d[n][t] = (cfg.thr[t] != 0) && (vp <= -int'(cfg.thr[t]));
        else     d[n][t] = !(vp >= 0);
        if (n >= 2 && d[n-2][t] && !d[n-1][t]) cnt[n][t] = cfg.width + 1;
        else if (n > 0 && cnt[n-1][t] > 0)    cnt[n][t] = cnt[n-1][t] - 1;
        else                                  cnt[n][t] = 0;
      end
    // drive and compare
    for (int n = 0; n < T; n++) begin
      logic [1:0] eg;
      for (int i = 0; i < 4; i++) begin
        ms_in[i]   = SAMPLE_W'(pulse_shape(n - 5, (i == 0) ? amp0 : amp_nb));
        test_in[i] = (i == 0) ? SAMPLE_W'(pulse_shape(n - 5, tp_amp)) : '0;
      end
      @(posedge clk); #1;
      if (cnt[n][2] > 0)      eg = 2'b10;
      else if (cnt[n][1] > 0) eg = 2'b11;
      else if (cnt[n][0] > 0) eg = 2'b01;
      else                    eg = 2'b00;
      checks += 2;
      if (gray !== eg) begin
        failures++;
        $display("FAIL amp=%0d n=%0d gray=%b expected %b", amp0, n, gray, eg);
      end
      if (disc !== {1'(d[n][2]), 1'(d[n][1]), 1'(d[n][0])}) begin
        failures++;
        $display("FAIL amp=%0d n=%0d disc=%b", amp0, n, disc);
      end
      if (gray != 2'b00 && first_rise < 0) first_rise = n;
      case (gray)
        2'b01: if (maxlvl < 1) maxlvl = 1;
        2'b11: if (maxlvl < 2) maxlvl = 2;
        2'b10: maxlvl = 3;
        default: ;
      endcase
      @(negedge clk);
    end
    level_seen[maxlvl]++;
    if (first_rise >= 0) rise_cycle.push_back(first_rise);
    ms_in = '0;
    test_in = '0;
    repeat (D + 4) @(negedge clk);
  endtask

  initial begin
    cfg = '0;
    cfg.thr[0] = 12'd150;
    cfg.thr[1] = 12'd500;
    cfg.thr[2] = 12'd1500;
    cfg.width = 8'd6;
    for (int i = 0; i < 4; i++) cfg.trim[i] = 8'd26;     // gain about -0.8
    for (int i = 4; i < 8; i++) cfg.trim[i] = 8'd230;    // test amplitude about +0.8
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    run_event(200, 0, 0);        // below the low threshold
    run_event(700, 100, 0);      // low
    run_event(2000, 400, 0);     // medium
    run_event(9000, 2000, 0);    // high
    run_event(0, 0, 9000);       // test pulse only
    cfg.width = 8'd20;
    run_event(5000, 5000, 0);    // shared energy, wide pulse
    for (int l = 0; l < 4; l++) begin
      checks++;
      if (level_seen[l] == 0) begin
        failures++;
        $display("FAIL level %0d never produced", l);
      end
    end
    foreach (rise_cycle[i]) begin
      checks++;
      if (rise_cycle[i] != rise_cycle[0]) begin
        failures++;
        $display("FAIL gray rises at %0d, first event at %0d", rise_cycle[i], rise_cycle[0]);
      end
    end
    $display("levels none/low/med/high: %0d %0d %0d %0d, rise cycle %0d",
             level_seen[0], level_seen[1], level_seen[2], level_seen[3], rise_cycle[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
