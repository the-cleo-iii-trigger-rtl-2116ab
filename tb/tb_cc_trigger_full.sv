// Full-size end-to-end testbench: cc_trigger_top with every parameter at
// its default (384 barrel and 120 endcap daughter boards on 24 TILE boards,
// six TPRO boards, two SURF boards, shaper delay 24 samples). It runs the
// same test as tb_cc_trigger_top, which is the quick reduced-size version.
//
// All daughter boards are configured over the shared VME bus. Then
// events are played in: each shower puts a pulse (2.5 us rise, slow decay,
// one sample per 42 ns) on one mixer-shaper card and a smaller one on a
// neighbouring card. An independent reference computes every tile's level
// from the card amplitudes (TrimDAC arithmetic, 2 x 2 card sums, delay-line
// shaping, thresholds), filters each ring and forms the SURF projections.
// Checked per event:
//   - every firing tile's Gray code rises in the same cycle (timing from
//     the zero crossing, independent of amplitude);
//   - the SURF outputs first change exactly 4 clocks after that (latency);
//   - theta bins, phi bins and cluster counts of both SURFs equal the
//     reference while the tile words are up.
// Directed events cover a 2 x 2 block, a cluster across a TPRO boundary and
// one across the phi seam; random events follow. Finally a test pulse is
// fired on one board and its readback latches are read over VME. Each
// mechanism (removal by a higher neighbour, tie-break removal, cluster across TILE
// boards (and so across processor FPGAs), phi wrap, each level, endcaps, readback) is counted and must
// occur at least once.
module tb_cc_trigger_full;
  import cc_pkg::*;
  import cc_ref_pkg::*;

  localparam int NBT = BAR_TPRO, NER = END_RINGS;        // barrel TPRO boards, endcap rings
  localparam int D = 24, T = 200, WIDTH = 10, LAT = 4;
  localparam int TBC = NBT * FPGA_PER_TPRO * BAR_TILE_COLS;  // barrel columns
  localparam int NBB = NBT * FPGA_PER_TPRO;                  // barrel TILE boards
  localparam int NB = NBB + NER * FPGA_PER_TPRO;

  logic clk = 0, rst_n = 0;
  logic vme_ds = 0, vme_write = 0, vme_dtack;
  logic [VME_AW-1:0] vme_addr = '0;
  logic [VME_DW-1:0] vme_wdata = '0, vme_rdata;
  logic [BAR_ROWS-1:0][TBC-1:0][SAMPLE_W-1:0] ms_bar = '0;
  logic [NER-1:0][END_ROWS-1:0][END_RING_COLS-1:0][SAMPLE_W-1:0] ms_end = '0;
  logic [NB-1:0][SAMPLE_W-1:0] tp_ms = '0, tp_inter = '0;
  logic [NB-1:0][7:0][7:0] tp_trim;
  logic [NB-1:0] test_fire;
  bin_t [BAR_ROWS-1:0] bar_theta;
  bin_t [NBB-1:0] bar_phi;
  tot_t bar_tot;
  bin_t [END_ROWS-1:0] end_theta;
  bin_t [NER*4-1:0] end_phi;
  tot_t end_tot;

  cc_trigger_top dut (.*);

  always #21 clk = ~clk;

  int checks = 0, failures = 0;
  int m_higher = 0, m_tie = 0, m_boundary = 0, m_wrap = 0, m_endcap = 0, m_readback = 0;
  int m_level [3] = '{0, 0, 0};

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  // ---------------- VME ----------------
  task automatic vwrite(int board, int ra, int d);
    vme_addr = VME_AW'((board << 12) | ra);
    vme_wdata = VME_DW'(d);
    vme_write = 1;
    #5 vme_ds = 1;
    #5 vme_ds = 0;
    #2;
  endtask

  task automatic vread(int board, int ra, output int d);
    vme_addr = VME_AW'((board << 12) | ra);
    vme_write = 0;
    #5 vme_ds = 1;
    #3 d = int'(vme_rdata);
    #2 vme_ds = 0;
    #2;
  endtask

  // ---------------- reference arithmetic ----------------
  localparam int THR [3] = '{150, 500, 1500};

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

  // card amplitudes of the rings: 0 barrel, then the endcaps
  int amp [1 + NER][16][48];
  function automatic int rows_of(int k); return (k == 0) ? BAR_ROWS : END_ROWS; endfunction
  function automatic int cols_of(int k); return (k == 0) ? TBC : END_RING_COLS; endfunction

  function automatic int tile_level(int k, int r, int c);
    int a [4];
    int sum [T];
    int minv = 0, lvl = 0;
    int R, C;
    R = rows_of(k);
    C = cols_of(k);
    a[0] = amp[k][r][c];
    a[1] = (r + 1 < R) ? amp[k][r+1][c] : 0;
    a[2] = amp[k][r][(c + 1) % C];
    a[3] = (r + 1 < R) ? amp[k][r+1][(c + 1) % C] : 0;
    if (a[0] == 0 && a[1] == 0 && a[2] == 0 && a[3] == 0) return 0;
    for (int n = 0; n < T; n++) begin
      int s = 0, v;
      for (int i = 0; i < 4; i++) s += tdac(clip16(pulse_shape(n, a[i])), 26);
      sum[n] = s;
      v = s - ((n >= D) ? sum[n - D] : 0);
      if (v < minv) minv = v;
    end
    for (int t = 0; t < 3; t++) if (minv <= -THR[t]) lvl = t + 1;
    return lvl;
  endfunction

  // ---------------- one event ----------------
  // tile levels and filtered levels of each ring, for the current event
  grid_t lv [1 + NER], f [1 + NER];

  // number of level-l tiles of ring k's filtered map in a row/column window
  function automatic int cnt(int k, int l, int r0, int r1, int c0, int c1);
    int n = 0;
    for (int r = r0; r <= r1; r++)
      for (int c = c0; c <= c1; c++)
        if (f[k][r][c] == l) n++;
    return n;
  endfunction

  int last_rise = 0;   // sample at which the last event's tiles came up

  task automatic run_event(string name);
    int e_bt [BAR_ROWS][3], e_bp [NBB][3], e_bs [3];
    int e_et [END_ROWS][3], e_ep [NER*4][3], e_es [3];
    int rise, surf_first, n_fire;
    // reference
    for (int k = 0; k < 1 + NER; k++) begin
      for (int r = 0; r < 16; r++) for (int c = 0; c < 48; c++) lv[k][r][c] = 0;
      for (int r = 0; r < rows_of(k); r++)
        for (int c = 0; c < cols_of(k); c++) lv[k][r][c] = tile_level(k, r, c);
      ring_filter(rows_of(k), cols_of(k), lv[k], f[k]);
    end
    for (int l = 0; l < 3; l++) begin
      e_bs[l] = cnt(0, l + 1, 0, BAR_ROWS - 1, 0, TBC - 1);
      for (int r = 0; r < BAR_ROWS; r++) e_bt[r][l] = cnt(0, l + 1, r, r, 0, TBC - 1);
      for (int p = 0; p < NBB; p++) e_bp[p][l] = cnt(0, l + 1, 0, BAR_ROWS - 1, 2 * p, 2 * p + 1);
      e_es[l] = 0;
      for (int r = 0; r < END_ROWS; r++) e_et[r][l] = 0;
      for (int e = 0; e < NER; e++) begin
        e_es[l] += cnt(1 + e, l + 1, 0, END_ROWS - 1, 0, END_RING_COLS - 1);
        for (int r = 0; r < END_ROWS; r++)
          e_et[r][l] += cnt(1 + e, l + 1, r, r, 0, END_RING_COLS - 1);
        for (int q = 0; q < 4; q++)
          e_ep[e * 4 + q][l] = cnt(1 + e, l + 1, 0, END_ROWS - 1, 3 * q, 3 * q + 2);
      end
      if (e_bs[l] > 0) m_level[l]++;
    end
    // mechanism bookkeeping from the reference
    for (int k = 0; k < 1 + NER; k++)
      for (int r = 0; r < rows_of(k); r++)
        for (int c = 0; c < cols_of(k); c++) begin
          if (lv[k][r][c] != 0 && f[k][r][c] == 0) begin
            bit hi = 0;
            for (int dr = -1; dr <= 1; dr++)
              for (int dc = -1; dc <= 1; dc++)
                if (r + dr >= 0 && r + dr < rows_of(k) &&
                    lv[k][r+dr][(c + dc + cols_of(k)) % cols_of(k)] > lv[k][r][c]) hi = 1;
            if (hi) m_higher++; else m_tie++;
          end
          if (k > 0 && lv[k][r][c] != 0) m_endcap++;
        end
    for (int r = 0; r < BAR_ROWS; r++)
      for (int dr = -1; dr <= 1; dr++)
        if (r + dr >= 0 && r + dr < BAR_ROWS) begin
          if (lv[0][r][TBC-1] != 0 && lv[0][r+dr][0] != 0) m_wrap++;
          for (int t = 1; t < NBB; t++)
            if (lv[0][r][2 * t - 1] != 0 && lv[0][r+dr][2 * t] != 0) m_boundary++;
        end
    // play the event
    rise = -1;
    surf_first = -1;
    for (int n = 0; n < T + LAT + 2; n++) begin
      for (int r = 0; r < BAR_ROWS; r++)
        for (int c = 0; c < TBC; c++)
          ms_bar[r][c] = (n < T) ? SAMPLE_W'(clip16(pulse_shape(n, amp[0][r][c]))) : '0;
      for (int e = 0; e < NER; e++)
        for (int r = 0; r < END_ROWS; r++)
          for (int c = 0; c < END_RING_COLS; c++)
            ms_end[e][r][c] = (n < T) ? SAMPLE_W'(clip16(pulse_shape(n, amp[1 + e][r][c]))) : '0;
      @(posedge clk); #1;
      if (surf_first < 0 && (bar_tot != '0 || end_tot != '0)) surf_first = n;
      if (rise < 0 && (dut.gray_bar != '0 || dut.gray_end != '0)) begin
        rise = n;
        n_fire = 0;
        // every tile with a level must be up now, with its level
        for (int r = 0; r < BAR_ROWS; r++)
          for (int c = 0; c < TBC; c++) begin
            checks++;
            if (dut.gray_bar[r][c] != to_gray(lv[0][r][c]))
              fail($sformatf("%s: barrel tile (%0d,%0d) gray %b, level %0d", name, r, c,
                             dut.gray_bar[r][c], lv[0][r][c]));
          end
        for (int e = 0; e < NER; e++)
          for (int r = 0; r < END_ROWS; r++)
            for (int c = 0; c < END_RING_COLS; c++) begin
              checks++;
              if (dut.gray_end[e][r][c] != to_gray(lv[1 + e][r][c]))
                fail($sformatf("%s: endcap %0d tile (%0d,%0d) gray %b, level %0d", name, e, r, c,
                               dut.gray_end[e][r][c], lv[1 + e][r][c]));
            end
      end
      if (rise >= 0 && n == rise + LAT + 2) begin
        // SURF results, mid-way through the tile pulses
        for (int l = 0; l < 3; l++) begin
          checks += 2;
          if (int'(bar_tot[l]) != e_bs[l]) fail($sformatf("%s: barrel count[%0d] %0d, expected %0d", name, l, bar_tot[l], e_bs[l]));
          if (int'(end_tot[l]) != e_es[l]) fail($sformatf("%s: endcap count[%0d] %0d, expected %0d", name, l, end_tot[l], e_es[l]));
          for (int r = 0; r < BAR_ROWS; r++) begin
            checks++;
            if (int'(bar_theta[r][l]) != e_bt[r][l]) fail($sformatf("%s: barrel theta[%0d][%0d]", name, r, l));
          end
          for (int p = 0; p < NBB; p++) begin
            checks++;
            if (int'(bar_phi[p][l]) != e_bp[p][l]) fail($sformatf("%s: barrel phi[%0d][%0d]", name, p, l));
          end
          for (int r = 0; r < END_ROWS; r++) begin
            checks++;
            if (int'(end_theta[r][l]) != e_et[r][l]) fail($sformatf("%s: endcap theta[%0d][%0d]", name, r, l));
          end
          for (int p = 0; p < NER * 4; p++) begin
            checks++;
            if (int'(end_phi[p][l]) != e_ep[p][l]) fail($sformatf("%s: endcap phi[%0d][%0d]", name, p, l));
          end
        end
      end
      @(negedge clk);
    end
    checks += 2;
    if (rise < 0) fail($sformatf("%s: no tile fired", name));
    if (surf_first != rise + LAT) fail($sformatf("%s: SURF output at %0d, tiles at %0d", name, surf_first, rise));
    $display("%s: tiles up at sample %0d, SURF %0d later; barrel H/M/L %0d/%0d/%0d endcap %0d/%0d/%0d",
             name, rise, surf_first - rise, e_bs[2], e_bs[1], e_bs[0], e_es[2], e_es[1], e_es[0]);
    last_rise = rise;
    ms_bar = '0;
    ms_end = '0;
    repeat (D + WIDTH + 10) @(negedge clk);
  endtask

  task automatic clear_amp();
    for (int k = 0; k < 1 + NER; k++) for (int r = 0; r < 16; r++) for (int c = 0; c < 48; c++) amp[k][r][c] = 0;
  endtask

  task automatic shower(int k, int r, int c, int a);
    int C;
    C = cols_of(k);
    amp[k][r][c] += a;
    amp[k][r][(c + 1) % C] += a / 5;  // spill into the phi neighbour
  endtask

  initial begin
    int d;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // configure every daughter board
    for (int b = 0; b < NB; b++) begin
      int ndb;
      ndb = (b < NBB) ? BAR_DB : END_DB;
      for (int i = 0; i < ndb; i++) begin
        for (int t = 0; t < 3; t++) vwrite(b, i * 16 + t, THR[t]);
        vwrite(b, i * 16 + 3, WIDTH);
        for (int k = 0; k < 4; k++) vwrite(b, i * 16 + 4 + k, 26);
        for (int k = 4; k < 8; k++) vwrite(b, i * 16 + 4 + k, 128);
      end
    end
    vread(7, 3 * 16 + 2, d);
    checks++;
    if (d != THR[2]) fail("VME readback of a threshold");
    repeat (D + 4) @(negedge clk);

    clear_amp();
    shower(0, 5, 2, 9000);          // 2 x 2 high block across TILE boards 0 and 1
    shower(0, 9, 6, 2200);          // medium
    shower(1, 2, 4, 900);           // endcap low
    run_event("directed-1");

    clear_amp();
    shower(0, 3, TBC - 1, 6000);         // across the phi seam
    shower(0, 0, 5, 700);           // low, at the theta edge, TILE board boundary
    shower(1, 4, 11, 9000);         // endcap ring across its seam
    run_event("directed-2");

    for (int ev = 0; ev < 4; ev++) begin
      clear_amp();
      for (int s = 0; s < 6; s++) begin
        int lvls [3] = '{700, 2200, 9000};
        shower(0, $urandom_range(0, BAR_ROWS - 1), $urandom_range(0, TBC - 1),
               lvls[$urandom_range(0, 2)]);
      end
      shower($urandom_range(1, NER), $urandom_range(0, END_ROWS - 1),
             $urandom_range(0, END_RING_COLS - 1), 2200);
      run_event($sformatf("random-%0d", ev));
    end

    // test pulse and readback on barrel board 2: high amplitude on all inputs,
    // latch delay set to land in the middle of the tile pulses (the test
    // pulse has the same shape as the events', so the same rise time)
    for (int i = 0; i < BAR_DB; i++) for (int k = 8; k < 12; k++) vwrite(2, i * 16 + k, 250);
    vwrite(2, 12'h410, last_rise + WIDTH / 2 - 2);
    fork
      begin
        @(posedge clk iff test_fire[2]);
        for (int t = 0; t < 300; t++) begin
          @(negedge clk);
          tp_ms[2] = SAMPLE_W'(pulse_shape(t, 9000));
          tp_inter[2] = tp_ms[2];
        end
        tp_ms[2] = '0;
        tp_inter[2] = '0;
      end
      vwrite(2, 12'h411, 1);
    join
    repeat (60) @(negedge clk);
    for (int i = 0; i < BAR_DB; i++) begin
      vread(2, 12'h500 + i, d);
      checks++;
      if (d[4:3] != 2'b10) fail($sformatf("readback of board 2 tile %0d: %b", i, d[4:0]));
      else m_readback++;
    end

    $display("mechanisms: higher-neighbour removals %0d, tie-break removals %0d, board-boundary pairs %0d, phi-seam pairs %0d, endcap tiles %0d, events with H/M/L %0d/%0d/%0d, readback %0d",
             m_higher, m_tie, m_boundary, m_wrap, m_endcap, m_level[2], m_level[1], m_level[0], m_readback);
    checks += 9;
    if (m_higher == 0) fail("no removal by a higher neighbour");
    if (m_tie == 0) fail("no tie-break removal");
    if (m_boundary == 0) fail("no cluster across a TILE board boundary");
    if (m_wrap == 0) fail("no cluster across the phi seam");
    if (m_endcap == 0) fail("no endcap tile");
    if (m_readback == 0) fail("no readback");
    for (int l = 0; l < 3; l++) if (m_level[l] == 0) fail($sformatf("level %0d never reached the SURF", l + 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
