// Self-checking testbench for tpro_filter. Two filters are closed into
// small rings by feeding each its own columns as halo (SEAM_EAST set), so
// the result must equal the reference ring filter; a third works on a
// window with SEAM_EAST clear and is checked against the reference on the
// ring it was cut from. Directed patterns (a 2 x 2 block, a chain of
// levels, a full row round the ring) and random maps are used, and the
// testbench checks that no cluster loses its highest level.
module tb_tpro_filter;
  import cc_ref_pkg::*;
  localparam int R = 6, C = 4, CB = 8;
  logic [R-1:0][C+3:0][1:0]  in_a;
  logic [R-1:0][C-1:0][1:0]  out_a;
  logic [R-1:0][CB+3:0][1:0] in_b;
  logic [R-1:0][CB-1:0][1:0] out_b;
  logic [R-1:0][C+3:0][1:0]  in_c;
  logic [R-1:0][C-1:0][1:0]  out_c;
  int checks = 0, failures = 0;
  int removed_higher = 0, removed_tie = 0;

  tpro_filter #(.ROWS(R), .COLS(C),  .SEAM_EAST(1'b1)) dut_a (.lvl_in(in_a), .lvl_out(out_a));
  tpro_filter #(.ROWS(R), .COLS(CB), .SEAM_EAST(1'b1)) dut_b (.lvl_in(in_b), .lvl_out(out_b));
  // window of columns 2..5 of the 8-column ring, not at the seam
  tpro_filter #(.ROWS(R), .COLS(C),  .SEAM_EAST(1'b0)) dut_c (.lvl_in(in_c), .lvl_out(out_c));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_ring(int cols, grid_t g);
    grid_t f;
    ring_filter(R, cols, g, f);
    for (int r = 0; r < R; r++)
      for (int k = 0; k < cols + 4; k++) begin
        if (cols == C) in_a[r][k] = 2'(g[r][(k - 2 + cols) % cols]);
        else           in_b[r][k] = 2'(g[r][(k - 2 + cols) % cols]);
      end
    if (cols == CB)
      for (int r = 0; r < R; r++)
        for (int k = 0; k < C + 4; k++) in_c[r][k] = 2'(g[r][k]);  // ring cols 0..7 -> own 2..5
    #1;
    for (int r = 0; r < R; r++)
      for (int c = 0; c < cols; c++) begin
        int got;
        got = (cols == C) ? int'(out_a[r][c]) : int'(out_b[r][c]);
        checks++;
        if (got != f[r][c]) begin
          failures++;
          $display("FAIL cols=%0d r=%0d c=%0d got %0d expected %0d", cols, r, c, got, f[r][c]);
        end
        if (g[r][c] != 0 && f[r][c] == 0) begin
          bit hi = 0;
          for (int dr = -1; dr <= 1; dr++)
            for (int dc = -1; dc <= 1; dc++)
              if (r + dr >= 0 && r + dr < R && g[r+dr][(c + dc + cols) % cols] > g[r][c]) hi = 1;
          if (hi) removed_higher++; else removed_tie++;
        end
      end
    if (cols == CB)
      for (int r = 0; r < R; r++)
        for (int c = 0; c < C; c++) begin
          checks++;
          if (int'(out_c[r][c]) != f[r][c + 2]) begin
            failures++;
            $display("FAIL window r=%0d c=%0d got %0d expected %0d", r, c, out_c[r][c], f[r][c+2]);
          end
        end
    checks++;
    if (lost_clusters(R, cols, g, f) != 0) begin
      failures++;
      $display("FAIL reference lost a cluster");
    end
  endtask

  initial begin
    grid_t g;
    // 2 x 2 block of high tiles, with a medium and low tile next to a high
    for (int r = 0; r < 16; r++) for (int c = 0; c < 48; c++) g[r][c] = 0;
    g[1][1] = 3; g[1][2] = 3; g[2][1] = 3; g[2][2] = 3;
    g[3][5] = 3; g[2][6] = 2; g[1][6] = 1;
    run_ring(CB, g);
    // chain: medium, low, medium
    for (int r = 0; r < 16; r++) for (int c = 0; c < 48; c++) g[r][c] = 0;
    g[4][0] = 2; g[4][1] = 1; g[3][1] = 2;
    run_ring(C, g);
    // full row of equal tiles round the ring
    for (int r = 0; r < 16; r++) for (int c = 0; c < 48; c++) g[r][c] = 0;
    for (int c = 0; c < C; c++) g[2][c] = 2;
    run_ring(C, g);
    for (int n = 0; n < 300; n++) begin
      random_map(R, C, 2, g);
      run_ring(C, g);
      random_map(R, CB, 4, g);
      run_ring(CB, g);
    end
    checks++;
    if (removed_higher == 0 || removed_tie == 0) begin
      failures++;
      $display("FAIL sweeps not both exercised: %0d %0d", removed_higher, removed_tie);
    end
    $display("removed by higher neighbour %0d, by tie-break %0d", removed_higher, removed_tie);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
