// Tile processor stage 1: cluster filter.
//
// Reduces every group of contiguous (overlapping or adjacent) tiles that
// carry energy to its highest-threshold tile, in two sweeps that each read
// only the result of the one before, so no result depends on evaluation
// order:
//   sweep 1: a tile is removed when one of its eight neighbours has a
//            strictly higher level;
//   sweep 2: a sweep-1 survivor is removed when one of its neighbours to
//            the east, north-east, north or north-west (larger row, or same
//            row and larger column) survived sweep 1 at the same level.
// In every group of equal survivors the one with the largest (row, column)
// position therefore remains, so a shower can at worst be reported twice,
// never lost. The document gives the goal and the two sweeps; the exact
// rules are this design's choice.
//
// Geometry: rows run along theta, columns along phi. lvl_in holds this
// processor's COLS columns in positions 2..COLS+1 with two halo columns from
// the neighbouring processors on each side (phi wraps round the detector).
// Rows beyond the theta edges have no neighbours. SEAM_EAST marks the
// processor whose last column is the last one of the ring: its east
// neighbour across the phi seam is not used by sweep 2, which keeps the
// ordering well defined round the ring. Purely combinational.
module tpro_filter #(
  parameter int ROWS      = 12,
  parameter int COLS      = 2,
  parameter bit SEAM_EAST = 1'b0
) (
  input  logic [ROWS-1:0][COLS+3:0][1:0] lvl_in,
  output logic [ROWS-1:0][COLS-1:0][1:0] lvl_out
);

  localparam int W = COLS + 4;

  logic [ROWS-1:0][W-1:0][1:0] s1;

  // sweep 1 on the own columns and one halo column on each side
  always_comb begin
    s1 = '0;
    for (int r = 0; r < ROWS; r++) begin
      for (int c = 1; c < W-1; c++) begin
        logic higher;
        higher = 1'b0;
        for (int dr = -1; dr <= 1; dr++)
          for (int dc = -1; dc <= 1; dc++)
            if ((dr != 0 || dc != 0) && (r + dr >= 0) && (r + dr < ROWS))
              if (lvl_in[r+dr][c+dc] > lvl_in[r][c]) higher = 1'b1;
        s1[r][c] = higher ? 2'd0 : lvl_in[r][c];
      end
    end
  end

  // sweep 2 on the own columns
  always_comb begin
    for (int r = 0; r < ROWS; r++) begin
      for (int c = 0; c < COLS; c++) begin
        logic tie;
        logic [1:0] v;
        v   = s1[r][c+2];
        tie = 1'b0;
        if (v != 2'd0) begin
          if (!(SEAM_EAST && c == COLS-1) && s1[r][c+3] == v) tie = 1'b1;
          if (r + 1 < ROWS) begin
            if (s1[r+1][c+1] == v) tie = 1'b1;
            if (s1[r+1][c+2] == v) tie = 1'b1;
            if (s1[r+1][c+3] == v) tie = 1'b1;
          end
        end
        lvl_out[r][c] = tie ? 2'd0 : v;
      end
    end
  end

endmodule
