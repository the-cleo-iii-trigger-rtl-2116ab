// SURF board: merges the results of the tile processor boards of one
// calorimeter region (four barrel boards, or the two endcap boards) and
// hands them to the Level 1 decision.
//
// Theta projections and cluster counts are summed over the boards, the phi
// bins are put side by side (board 0 first), and the result is registered:
// one clock of latency. That the SURF combines the projections and counts
// follows the document; the merge rules and the register are this design's
// choices.
module surf
  import cc_pkg::*;
#(
  parameter int N_BOARDS = 4,
  parameter int ROWS     = 12,
  parameter int NPHI     = 4   // phi bins per board
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  bin_t [N_BOARDS-1:0][ROWS-1:0]      b_theta,
  input  bin_t [N_BOARDS-1:0][NPHI-1:0]      b_phi,
  input  tot_t [N_BOARDS-1:0]                b_tot,
  output bin_t [ROWS-1:0]                    theta,
  output bin_t [N_BOARDS*NPHI-1:0]           phi,
  output tot_t                               tot
);

  bin_t [ROWS-1:0] theta_d;
  tot_t            tot_d;

  always_comb begin
    theta_d = '0;
    tot_d   = '0;
    for (int b = 0; b < N_BOARDS; b++)
      for (int l = 0; l < 3; l++) begin
        for (int r = 0; r < ROWS; r++)
          theta_d[r][l] = theta_d[r][l] + b_theta[b][r][l];
        tot_d[l] = tot_d[l] + b_tot[b][l];
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      theta <= '0;
      phi   <= '0;
      tot   <= '0;
    end else begin
      theta <= theta_d;
      phi   <= b_phi;
      tot   <= tot_d;
    end
  end

endmodule
