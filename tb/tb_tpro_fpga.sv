// Self-checking testbench for tpro_fpga. A new random tile map (as Gray
// codes) is applied every clock, closed into a 12 x 4 ring through the halo
// columns. Two clock edges after the edge that samples a map the filtered map, the theta projection,
// the phi bin and the cluster counts must match the reference filter and
// counts: this checks the three-register latency and one result per clock.
module tb_tpro_fpga;
  import cc_pkg::*;
  import cc_ref_pkg::*;
  localparam int R = 12, C = 4, LAT = 2;
  logic clk = 0, rst_n = 0;
  logic [R-1:0][C+3:0][1:0] gray_in = '0;
  logic [R-1:0][C-1:0][1:0] filt;
  bin_t [R-1:0] theta;
  bin_t phi;
  tot_t tot;
  int checks = 0, failures = 0;
  grid_t hist [4];  // last inputs, indexed by n % 4
  int nonzero_bins = 0;

  tpro_fpga #(.ROWS(R), .COLS(C), .SEAM_EAST(1'b1)) dut (
    .clk, .rst_n, .gray_in, .filt, .theta, .phi, .tot);

  always #21 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    grid_t z;
    for (int r = 0; r < 16; r++) for (int c = 0; c < 48; c++) z[r][c] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 400 + LAT; n++) begin
      grid_t g;
      if (n < 400) random_map(R, C, 3, g); else g = z;
      for (int r = 0; r < R; r++)
        for (int k = 0; k < C + 4; k++) gray_in[r][k] = to_gray(g[r][(k - 2 + C) % C]);
      hist[n % 4] = g;
      @(posedge clk); #1;
      if (n >= LAT) begin
        grid_t f, ff, h0, h1;
        h1 = hist[(n - 1) % 4];  // the stage-1 output is one input newer
        h0 = hist[(n - LAT) % 4];
        ring_filter(R, C, h1, ff);
        ring_filter(R, C, h0, f);
        for (int r = 0; r < R; r++)
          for (int c = 0; c < C; c++) begin
            checks++;
            if (int'(filt[r][c]) != ff[r][c]) begin
              failures++;
              $display("FAIL n=%0d filt[%0d][%0d]=%0d expected %0d", n, r, c, filt[r][c], ff[r][c]);
            end
          end
        for (int l = 0; l < 3; l++) begin
          int all;
          all = count_lvl(f, l + 1, 0, R - 1, 0, C - 1);
          for (int r = 0; r < R; r++) begin
            checks++;
            if (int'(theta[r][l]) != count_lvl(f, l + 1, r, r, 0, C - 1)) begin
              failures++;
              $display("FAIL n=%0d theta[%0d][%0d]=%0d expected %0d", n, r, l, theta[r][l], count_lvl(f, l + 1, r, r, 0, C - 1));
            end
            if (theta[r][l] != 0) nonzero_bins++;
          end
          checks += 2;
          if (int'(phi[l]) != all || int'(tot[l]) != all) begin
            failures++;
            $display("FAIL n=%0d level %0d phi=%0d tot=%0d expected %0d", n, l, phi[l], tot[l], all);
          end
        end
      end
      @(negedge clk);
    end
    checks++;
    if (nonzero_bins == 0) begin
      failures++;
      $display("FAIL no projection bins filled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
