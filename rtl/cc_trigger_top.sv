// Calorimeter trigger: from mixer-shaper signals to Level 1 primitives.
//
// Barrel: 384 overlapping tiles on a 12 (theta) x 32 (phi) grid. The tile
// at (r, c) sums the mixer-shaper cards (r, c), (r+1, c), (r, c+1) and
// (r+1, c+1), so each card feeds four tiles and one tile holds a whole
// shower; phi wraps round the barrel, and past the last theta row there is
// no card. 16 TILE boards carry 24 daughter boards each (two phi columns).
// Four TPRO boards, each with four processor FPGAs, filter and project the
// tile words; one SURF board merges them into 12 theta bins, 16 phi bins
// and three cluster counts (low, medium, high threshold).
// Endcaps: 120 tiles on 8 TILE boards of 15 daughter boards, two TPRO
// boards and a second SURF. The endcap layout (two rings of 5 x 12 tiles,
// one TPRO board per ring, 5 theta and 8 phi bins at the SURF) is this
// design's assumption; the document gives only the board counts.
//
// All TILE boards share one VME bus; vme_addr[19:12] selects the board
// (barrel boards 0-15, endcap boards 16-23; see tile_vme_regs for the
// registers). The analog test pulse generators are outside this model:
// their TrimDAC codes and fire strobes are outputs, their pulses inputs.
//
// Size: N_BAR_TPRO and N_END_RINGS default to the full detector (4 and 2);
// smaller values give a narrower barrel ring (8 phi columns per TPRO
// board) and fewer endcap rings, which is useful for quick simulation.
//
// Timing, one clock per 42 ns: a zero crossing in a tile's shaped pulse
// reaches its Gray code 2 clock edges after the shaper register takes it
// (daughter board), and a Gray code sampled by the TPRO input register at
// edge k is at the SURF outputs after edge k+3 (TPRO input, filter,
// projection and SURF registers). The pipeline is free running, so the time at which a
// result appears carries the event timing.
module cc_trigger_top
  import cc_pkg::*;
#(
  parameter int N_BAR_TPRO  = BAR_TPRO,   // barrel TPRO boards (4 TILE boards each)
  parameter int N_END_RINGS = END_RINGS,  // endcap rings (one TPRO board each)
  parameter int SHAPE_D     = 24,         // shaper delay in samples
  // derived sizes, not meant to be overridden
  localparam int NBAR_BOARDS = N_BAR_TPRO * FPGA_PER_TPRO,
  localparam int NBAR_COLS   = NBAR_BOARDS * BAR_TILE_COLS,
  localparam int NEND_BOARDS = N_END_RINGS * FPGA_PER_TPRO,
  localparam int NB          = NBAR_BOARDS + NEND_BOARDS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // VME bus (from the quiet VME interface)
  input  logic                 vme_ds,
  input  logic                 vme_write,
  input  logic [VME_AW-1:0]    vme_addr,
  input  logic [VME_DW-1:0]    vme_wdata,
  output logic [VME_DW-1:0]    vme_rdata,
  output logic                 vme_dtack,
  // mixer-shaper controller outputs, one sample per clock
  input  logic [BAR_ROWS-1:0][NBAR_COLS-1:0][SAMPLE_W-1:0]              ms_bar,
  input  logic [N_END_RINGS-1:0][END_ROWS-1:0][END_RING_COLS-1:0][SAMPLE_W-1:0] ms_end,
  // test pulse generators of the 24 TILE boards
  input  logic [NB-1:0][SAMPLE_W-1:0] tp_ms,
  input  logic [NB-1:0][SAMPLE_W-1:0] tp_inter,
  output logic [NB-1:0][7:0][7:0]     tp_trim,
  output logic [NB-1:0]               test_fire,
  // to Level 1: barrel SURF
  output bin_t [BAR_ROWS-1:0]               bar_theta,
  output bin_t [NBAR_BOARDS-1:0] bar_phi,
  output tot_t                              bar_tot,
  // to Level 1: endcap SURF
  output bin_t [END_ROWS-1:0]               end_theta,
  output bin_t [NEND_BOARDS-1:0] end_phi,
  output tot_t                              end_tot
);

  logic [NB-1:0][VME_DW-1:0] b_rdata;
  logic [NB-1:0]             b_dtack;

  logic [BAR_ROWS-1:0][NBAR_COLS-1:0][1:0]                   gray_bar;
  logic [N_END_RINGS-1:0][END_ROWS-1:0][END_RING_COLS-1:0][1:0] gray_end;

  // ---------------- barrel TILE boards ----------------
  for (genvar b = 0; b < NBAR_BOARDS; b++) begin : g_bar_tile
    logic [BAR_DB-1:0][3:0][SAMPLE_W-1:0] ms_in;
    logic [BAR_DB-1:0][1:0]               gray;

    for (genvar i = 0; i < BAR_DB; i++) begin : g_db
      localparam int R  = i % BAR_ROWS;
      localparam int C  = b * BAR_TILE_COLS + i / BAR_ROWS;
      localparam int CN = (C + 1) % NBAR_COLS;
      assign ms_in[i][0] = ms_bar[R][C];
      assign ms_in[i][2] = ms_bar[R][CN];
      if (R + 1 < BAR_ROWS) begin : g_up
        assign ms_in[i][1] = ms_bar[R+1][C];
        assign ms_in[i][3] = ms_bar[R+1][CN];
      end else begin : g_edge
        assign ms_in[i][1] = '0;
        assign ms_in[i][3] = '0;
      end
      assign gray_bar[R][C] = gray[i];
    end

    tile_board #(.N_DB(BAR_DB), .BOARD_ID(b), .SHAPE_D(SHAPE_D)) u_tile (
      .clk, .rst_n, .vme_ds, .vme_write, .vme_addr, .vme_wdata,
      .vme_rdata(b_rdata[b]), .vme_dtack(b_dtack[b]),
      .ms_in, .tp_ms(tp_ms[b]), .tp_inter(tp_inter[b]),
      .gray, .tp_trim(tp_trim[b]), .test_fire(test_fire[b])
    );
  end

  // ---------------- endcap TILE boards ----------------
  for (genvar b = 0; b < NEND_BOARDS; b++) begin : g_end_tile
    localparam int E = b / FPGA_PER_TPRO;
    logic [END_DB-1:0][3:0][SAMPLE_W-1:0] ms_in;
    logic [END_DB-1:0][1:0]               gray;

    for (genvar i = 0; i < END_DB; i++) begin : g_db
      localparam int R  = i % END_ROWS;
      localparam int C  = (b % FPGA_PER_TPRO) * END_TILE_COLS + i / END_ROWS;
      localparam int CN = (C + 1) % END_RING_COLS;
      assign ms_in[i][0] = ms_end[E][R][C];
      assign ms_in[i][2] = ms_end[E][R][CN];
      if (R + 1 < END_ROWS) begin : g_up
        assign ms_in[i][1] = ms_end[E][R+1][C];
        assign ms_in[i][3] = ms_end[E][R+1][CN];
      end else begin : g_edge
        assign ms_in[i][1] = '0;
        assign ms_in[i][3] = '0;
      end
      assign gray_end[E][R][C] = gray[i];
    end

    tile_board #(.N_DB(END_DB), .BOARD_ID(NBAR_BOARDS + b), .SHAPE_D(SHAPE_D)) u_tile (
      .clk, .rst_n, .vme_ds, .vme_write, .vme_addr, .vme_wdata,
      .vme_rdata(b_rdata[NBAR_BOARDS+b]), .vme_dtack(b_dtack[NBAR_BOARDS+b]),
      .ms_in, .tp_ms(tp_ms[NBAR_BOARDS+b]), .tp_inter(tp_inter[NBAR_BOARDS+b]),
      .gray, .tp_trim(tp_trim[NBAR_BOARDS+b]), .test_fire(test_fire[NBAR_BOARDS+b])
    );
  end

  always_comb begin
    vme_rdata = '0;
    vme_dtack = 1'b0;
    for (int b = 0; b < NB; b++) begin
      vme_rdata = vme_rdata | b_rdata[b];
      vme_dtack = vme_dtack | b_dtack[b];
    end
  end

  // ---------------- barrel tile processors ----------------
  localparam int BCOLS = FPGA_PER_TPRO * BAR_TILE_COLS;  // 8 columns per TPRO

  bin_t [N_BAR_TPRO-1:0][BAR_ROWS-1:0]      bt_theta;
  bin_t [N_BAR_TPRO-1:0][FPGA_PER_TPRO-1:0] bt_phi;
  tot_t [N_BAR_TPRO-1:0]                    bt_tot;

  for (genvar t = 0; t < N_BAR_TPRO; t++) begin : g_bar_tpro
    logic [BAR_ROWS-1:0][BCOLS+3:0][1:0] gin;
    logic [BAR_ROWS-1:0][BCOLS-1:0][1:0] filt;
    for (genvar r = 0; r < BAR_ROWS; r++) begin : g_r
      for (genvar k = 0; k < BCOLS + 4; k++) begin : g_k
        assign gin[r][k] = gray_bar[r][(t * BCOLS + k - 2 + NBAR_COLS) % NBAR_COLS];
      end
    end
    tpro_board #(
      .N_FPGA(FPGA_PER_TPRO), .ROWS(BAR_ROWS), .COLS(BAR_TILE_COLS),
      .SEAM_EAST(t == N_BAR_TPRO - 1)
    ) u_tpro (
      .clk, .rst_n, .gray_in(gin), .filt,
      .theta(bt_theta[t]), .phi(bt_phi[t]), .tot(bt_tot[t])
    );
  end

  surf #(.N_BOARDS(N_BAR_TPRO), .ROWS(BAR_ROWS), .NPHI(FPGA_PER_TPRO)) u_surf_bar (
    .clk, .rst_n, .b_theta(bt_theta), .b_phi(bt_phi), .b_tot(bt_tot),
    .theta(bar_theta), .phi(bar_phi), .tot(bar_tot)
  );

  // ---------------- endcap tile processors (one per ring) ----------------
  bin_t [N_END_RINGS-1:0][END_ROWS-1:0]      et_theta;
  bin_t [N_END_RINGS-1:0][FPGA_PER_TPRO-1:0] et_phi;
  tot_t [N_END_RINGS-1:0]                    et_tot;

  for (genvar e = 0; e < N_END_RINGS; e++) begin : g_end_tpro
    logic [END_ROWS-1:0][END_RING_COLS+3:0][1:0] gin;
    logic [END_ROWS-1:0][END_RING_COLS-1:0][1:0] filt;
    for (genvar r = 0; r < END_ROWS; r++) begin : g_r
      for (genvar k = 0; k < END_RING_COLS + 4; k++) begin : g_k
        assign gin[r][k] = gray_end[e][r][(k - 2 + END_RING_COLS) % END_RING_COLS];
      end
    end
    tpro_board #(
      .N_FPGA(FPGA_PER_TPRO), .ROWS(END_ROWS), .COLS(END_TILE_COLS),
      .SEAM_EAST(1'b1)
    ) u_tpro (
      .clk, .rst_n, .gray_in(gin), .filt,
      .theta(et_theta[e]), .phi(et_phi[e]), .tot(et_tot[e])
    );
  end

  surf #(.N_BOARDS(N_END_RINGS), .ROWS(END_ROWS), .NPHI(FPGA_PER_TPRO)) u_surf_end (
    .clk, .rst_n, .b_theta(et_theta), .b_phi(et_phi), .b_tot(et_tot),
    .theta(end_theta), .phi(end_phi), .tot(end_tot)
  );

endmodule
