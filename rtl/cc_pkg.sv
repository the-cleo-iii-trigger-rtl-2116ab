// Calorimeter trigger shared package.
//
// Types and constants used by the daughter-board models, the TILE board
// interface, the tile processors (TPRO) and the SURF merge boards.
//
// Threshold levels: every tile reports the largest of three thresholds its
// shaped pulse exceeded. On the cables the level travels as a two-bit Gray
// code. The Gray assignment (none 00, low 01, medium 11, high 10) is this
// design's choice: the reflected sequence makes each step up by one
// threshold a single-bit change.
//
// Geometry: the barrel is 12 theta rows by 32 phi columns of overlapping
// tiles (384 tiles). Each barrel TILE board carries a 12 x 2 slice, so the
// 16 boards cover the ring; a tile processor FPGA serves one TILE board and
// a TPRO board holds four FPGAs. The two phi columns of one FPGA are merged
// into one phi bin, giving the 12 theta and 16 phi bins of the projections.
// The endcap tile layout is this design's own assumption: each endcap is a
// ring of 5 rows by 12 phi columns (60 tiles), served by one TPRO board,
// each of its TILE boards carrying a 5 x 3 slice (15 daughter boards).
package cc_pkg;

  // ---------------- threshold levels and their Gray code ----------------
  typedef enum logic [1:0] {
    LVL_NONE = 2'd0,
    LVL_LOW  = 2'd1,
    LVL_MED  = 2'd2,
    LVL_HIGH = 2'd3
  } level_t;

  localparam logic [1:0] GRAY_NONE = 2'b00;
  localparam logic [1:0] GRAY_LOW  = 2'b01;
  localparam logic [1:0] GRAY_MED  = 2'b11;
  localparam logic [1:0] GRAY_HIGH = 2'b10;

  function automatic logic [1:0] level_to_gray(input logic [1:0] lvl);
    case (lvl)
      2'd1:    return GRAY_LOW;
      2'd2:    return GRAY_MED;
      2'd3:    return GRAY_HIGH;
      default: return GRAY_NONE;
    endcase
  endfunction

  function automatic logic [1:0] gray_to_level(input logic [1:0] g);
    case (g)
      GRAY_LOW:  return 2'd1;
      GRAY_MED:  return 2'd2;
      GRAY_HIGH: return 2'd3;
      default:   return 2'd0;
    endcase
  endfunction

  // ---------------- analog model sample formats ----------------
  localparam int SAMPLE_W = 16;  // mixer-shaper sample, signed
  localparam int THR_W    = 12;  // threshold DAC code
  localparam int WID_W    = 8;   // pulse-width DAC code
  localparam int SHAPE_W  = SAMPLE_W + 3; // shaped bipolar sample

  // Settings of one daughter board, as loaded over VME.
  typedef struct packed {
    logic [2:0][THR_W-1:0] thr;   // [0] low, [1] medium, [2] high
    logic [WID_W-1:0]      width; // output pulse width code
    logic [7:0][7:0]       trim;  // TrimDAC codes: 0-3 gains, 4-7 test amplitudes
  } db_cfg_t;

  // ---------------- projection formats ----------------
  localparam int BIN_W = 6;  // count of one threshold in one bin
  localparam int TOT_W = 9;  // cluster count of one threshold (up to 384)

  typedef logic [2:0][BIN_W-1:0] bin_t;  // [0] low, [1] medium, [2] high
  typedef logic [2:0][TOT_W-1:0] tot_t;

  // ---------------- geometry ----------------
  localparam int BAR_ROWS      = 12;
  localparam int BAR_COLS      = 32;
  localparam int BAR_TILE_COLS = 2;   // phi columns per barrel TILE board
  localparam int BAR_BOARDS    = 16;  // barrel TILE boards
  localparam int BAR_DB        = BAR_ROWS * BAR_TILE_COLS; // 24
  localparam int BAR_TPRO      = 4;
  localparam int FPGA_PER_TPRO = 4;

  localparam int END_RINGS     = 2;
  localparam int END_ROWS      = 5;
  localparam int END_TILE_COLS = 3;
  localparam int END_RING_COLS = FPGA_PER_TPRO * END_TILE_COLS; // 12
  localparam int END_BOARDS    = END_RINGS * FPGA_PER_TPRO;     // 8
  localparam int END_DB        = END_ROWS * END_TILE_COLS;      // 15

  // ---------------- VME ----------------
  localparam int VME_AW = 20;  // word address: [19:12] board, [11:0] register
  localparam int VME_DW = 16;

endpackage
