// Tile processor (TPRO) board: four FPGAs working in parallel, each on the
// tiles of one TILE board.
//
// The board receives the Gray-coded tile words of its N_FPGA*COLS phi
// columns plus two halo columns from each neighbouring board, so that
// clusters spanning board boundaries are filtered correctly. Each FPGA gets
// its own columns and two columns on each side. The board result is the sum
// of the FPGAs' theta projections and cluster counts, and the list of their
// phi bins (one per FPGA). Four FPGAs per board follows the document; the
// halo exchange and the combinational board sum are this design's choices.
//
// Timing: the outputs follow the FPGAs' last registers: gray_in sampled at
// clock edge k is in the outputs after edge k+2. SEAM_EAST marks the board that ends the
// phi ring.
module tpro_board
  import cc_pkg::*;
#(
  parameter int N_FPGA    = 4,
  parameter int ROWS      = 12,
  parameter int COLS      = 2,
  parameter bit SEAM_EAST = 1'b0
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic [ROWS-1:0][N_FPGA*COLS+3:0][1:0] gray_in,
  output logic [ROWS-1:0][N_FPGA*COLS-1:0][1:0] filt,
  output bin_t [ROWS-1:0]                      theta,
  output bin_t [N_FPGA-1:0]                    phi,
  output tot_t                                 tot
);

  bin_t [N_FPGA-1:0][ROWS-1:0] f_theta;
  tot_t [N_FPGA-1:0]           f_tot;

  for (genvar f = 0; f < N_FPGA; f++) begin : g_fpga
    logic [ROWS-1:0][COLS+3:0][1:0] slice;
    logic [ROWS-1:0][COLS-1:0][1:0] f_filt;

    always_comb begin
      for (int r = 0; r < ROWS; r++) begin
        slice[r] = gray_in[r][f*COLS +: COLS+4];
        filt[r][f*COLS +: COLS] = f_filt[r];
      end
    end

    tpro_fpga #(
      .ROWS(ROWS), .COLS(COLS),
      .SEAM_EAST(SEAM_EAST && (f == N_FPGA-1))
    ) u_fpga (
      .clk, .rst_n, .gray_in(slice), .filt(f_filt),
      .theta(f_theta[f]), .phi(phi[f]), .tot(f_tot[f])
    );
  end

  always_comb begin
    theta = '0;
    tot   = '0;
    for (int f = 0; f < N_FPGA; f++)
      for (int l = 0; l < 3; l++) begin
        for (int r = 0; r < ROWS; r++)
          theta[r][l] = theta[r][l] + f_theta[f][r][l];
        tot[l] = tot[l] + f_tot[f][l];
      end
  end

endmodule
