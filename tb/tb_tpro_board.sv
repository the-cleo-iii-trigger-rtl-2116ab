// Self-checking testbench for tpro_board at its default size (four FPGAs
// of 12 x 2 tiles). The board is closed into a 12 x 8 ring through its halo
// columns, so clusters cross the boundaries between its FPGAs. Random maps
// are applied every clock; two edges after the edge that samples a map the filtered map, the summed
// theta projection, the four phi bins and the counts are checked against
// the reference. Clusters that straddle an FPGA boundary are counted.
module tb_tpro_board;
  import cc_pkg::*;
  import cc_ref_pkg::*;
  localparam int R = 12, CF = 2, NF = 4, C = NF * CF, LAT = 2;
  logic clk = 0, rst_n = 0;
  logic [R-1:0][C+3:0][1:0] gray_in = '0;
  logic [R-1:0][C-1:0][1:0] filt;
  bin_t [R-1:0]  theta;
  bin_t [NF-1:0] phi;
  tot_t tot;
  int checks = 0, failures = 0, straddle = 0;
  grid_t hist [4];  // last inputs, indexed by n % 4

  tpro_board #(.SEAM_EAST(1'b1)) dut (.clk, .rst_n, .gray_in, .filt, .theta, .phi, .tot);

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
    for (int n = 0; n < 300 + LAT; n++) begin
      grid_t g;
      if (n < 300) random_map(R, C, 5, g); else g = z;
      for (int r = 0; r < R; r++)
        for (int k = 0; k < C + 4; k++) gray_in[r][k] = to_gray(g[r][(k - 2 + C) % C]);
      for (int r = 0; r < R; r++)
        for (int c = 1; c < C; c += CF)
          if (g[r][c] != 0 && g[r][(c + 1) % C] != 0) straddle++;
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
          for (int r = 0; r < R; r++) begin
            checks++;
            if (int'(theta[r][l]) != count_lvl(f, l + 1, r, r, 0, C - 1)) begin
              failures++;
              $display("FAIL n=%0d theta[%0d][%0d]=%0d", n, r, l, theta[r][l]);
            end
          end
          for (int p = 0; p < NF; p++) begin
            checks++;
            if (int'(phi[p][l]) != count_lvl(f, l + 1, 0, R - 1, p * CF, p * CF + CF - 1)) begin
              failures++;
              $display("FAIL n=%0d phi[%0d][%0d]=%0d", n, p, l, phi[p][l]);
            end
          end
          checks++;
          if (int'(tot[l]) != count_lvl(f, l + 1, 0, R - 1, 0, C - 1)) begin
            failures++;
            $display("FAIL n=%0d tot[%0d]=%0d", n, l, tot[l]);
          end
        end
      end
      @(negedge clk);
    end
    checks++;
    if (straddle == 0) begin
      failures++;
      $display("FAIL no cluster across an FPGA boundary");
    end
    $display("boundary-straddling tile pairs: %0d", straddle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
