// Self-checking testbench for surf: random board results every clock; one
// clock later theta bins and counts must be the sums over the boards and
// the phi bins the boards' bins side by side.
module tb_surf;
  import cc_pkg::*;
  localparam int NB = 4, R = 12, NP = 4;
  logic clk = 0, rst_n = 0;
  bin_t [NB-1:0][R-1:0]  b_theta = '0;
  bin_t [NB-1:0][NP-1:0] b_phi = '0;
  tot_t [NB-1:0]         b_tot = '0;
  bin_t [R-1:0]          theta;
  bin_t [NB*NP-1:0]      phi;
  tot_t                  tot;
  int checks = 0, failures = 0;

  surf dut (.clk, .rst_n, .b_theta, .b_phi, .b_tot, .theta, .phi, .tot);

  always #21 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      int et [R][3];
      int ep [NB*NP][3];
      int es [3];
      for (int l = 0; l < 3; l++) begin
        es[l] = 0;
        for (int r = 0; r < R; r++) et[r][l] = 0;
      end
      for (int b = 0; b < NB; b++)
        for (int l = 0; l < 3; l++) begin
          for (int r = 0; r < R; r++) begin
            b_theta[b][r][l] = BIN_W'($urandom_range(0, 8));
            et[r][l] += b_theta[b][r][l];
          end
          for (int p = 0; p < NP; p++) begin
            b_phi[b][p][l] = BIN_W'($urandom_range(0, 24));
            ep[b * NP + p][l] = b_phi[b][p][l];
          end
          b_tot[b][l] = TOT_W'($urandom_range(0, 96));
          es[l] += b_tot[b][l];
        end
      @(posedge clk); #1;
      for (int l = 0; l < 3; l++) begin
        for (int r = 0; r < R; r++) begin
          checks++;
          if (int'(theta[r][l]) != et[r][l]) begin
            failures++;
            $display("FAIL theta[%0d][%0d]=%0d expected %0d", r, l, theta[r][l], et[r][l]);
          end
        end
        for (int p = 0; p < NB * NP; p++) begin
          checks++;
          if (int'(phi[p][l]) != ep[p][l]) begin
            failures++;
            $display("FAIL phi[%0d][%0d]=%0d expected %0d", p, l, phi[p][l], ep[p][l]);
          end
        end
        checks++;
        if (int'(tot[l]) != es[l]) begin
          failures++;
          $display("FAIL tot[%0d]=%0d expected %0d", l, tot[l], es[l]);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
