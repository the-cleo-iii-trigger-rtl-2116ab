// One tile-processor FPGA: the processing for the tiles of one TILE board.
//
// Pipeline, one 42 ns clock per stage:
//   stage 0  register the Gray-coded tile words (own and halo columns) and
//            decode them to levels;
//   stage 1  cluster filter (tpro_filter), registered;
//   stage 2  projections of the surviving tiles, registered: for every
//            theta row and for the whole phi slice (the adjacent phi
//            columns of this board merged into one bin), the number of
//            tiles at each of the three thresholds, plus the cluster count
//            of each threshold.
// A tile counts only towards its own threshold. The two processing stages,
// the projections and the merging of adjacent phi columns follow the
// document; the input register stage and the counting formats are this
// design's choices.
//
// Interface: gray_in[row][col] with own columns at 2..COLS+1 and two halo
// columns on each side. Three register stages: gray_in sampled at clock
// edge k is in the outputs after edge k+2 (filt, the stage-1 result shown
// for inspection, after edge k+1).
module tpro_fpga
  import cc_pkg::*;
#(
  parameter int ROWS      = 12,
  parameter int COLS      = 2,
  parameter bit SEAM_EAST = 1'b0
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [ROWS-1:0][COLS+3:0][1:0] gray_in,
  output logic [ROWS-1:0][COLS-1:0][1:0] filt,
  output bin_t [ROWS-1:0]               theta,
  output bin_t                          phi,
  output tot_t                          tot
);

  logic [ROWS-1:0][COLS+3:0][1:0] gray_q;
  logic [ROWS-1:0][COLS+3:0][1:0] lvl;
  logic [ROWS-1:0][COLS-1:0][1:0] filt_d;
  bin_t [ROWS-1:0]                theta_d;
  bin_t                           phi_d;

  always_comb begin
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS+4; c++)
        lvl[r][c] = gray_to_level(gray_q[r][c]);
  end

  tpro_filter #(.ROWS(ROWS), .COLS(COLS), .SEAM_EAST(SEAM_EAST)) u_filter (
    .lvl_in(lvl), .lvl_out(filt_d)
  );

  always_comb begin
    theta_d = '0;
    phi_d   = '0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        for (int l = 0; l < 3; l++)
          if (filt[r][c] == 2'(l + 1)) begin
            theta_d[r][l] = theta_d[r][l] + 1'b1;
            phi_d[l]      = phi_d[l] + 1'b1;
          end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gray_q <= '0;
      filt   <= '0;
      theta  <= '0;
      phi    <= '0;
      tot    <= '0;
    end else begin
      gray_q <= gray_in;
      filt   <= filt_d;
      theta  <= theta_d;
      phi    <= phi_d;
      for (int l = 0; l < 3; l++) tot[l] <= TOT_W'(phi_d[l]);
    end
  end

endmodule
