// TILE VME board with its daughter boards.
//
// A TILE board carries up to 24 daughter boards (one per tile), supplies
// their thresholds, pulse widths and gains through its clock-less VME
// interface, routes test pulses to them and latches their digital outputs
// for readback a programmable time after a test pulse. The Gray-coded tile
// words leave the board towards the tile processors. Power, analog routing
// and the LVDS line drivers carry no logic and are not modelled.
//
// Interface: ms_in[i] are the four mixer-shaper samples daughter board i
// sums (its own and three neighbours' copies, routed by the parent);
// tp_ms / tp_inter are the board's test pulse samples on the mixer-shaper
// and intertile paths, fed to input 0 and inputs 1-3 of every daughter
// board; tp_trim and test_fire go to the (analog) test pulse generator.
// The daughter boards are behavioural models, so this board model is one
// as well. N_DB=24 follows the document (15 on endcap boards).
module tile_board
  import cc_pkg::*;
#(
  parameter int N_DB     = 24,
  parameter int BOARD_ID = 0,
  parameter int SHAPE_D  = 24
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               vme_ds,
  input  logic                               vme_write,
  input  logic [VME_AW-1:0]                  vme_addr,
  input  logic [VME_DW-1:0]                  vme_wdata,
  output logic [VME_DW-1:0]                  vme_rdata,
  output logic                               vme_dtack,
  input  logic [N_DB-1:0][3:0][SAMPLE_W-1:0] ms_in,
  input  logic [SAMPLE_W-1:0]                tp_ms,
  input  logic [SAMPLE_W-1:0]                tp_inter,
  output logic [N_DB-1:0][1:0]               gray,
  output logic [7:0][7:0]                    tp_trim,
  output logic                               test_fire
);

  db_cfg_t [N_DB-1:0]     db_cfg;
  logic [7:0]             latch_delay;
  logic                   fire_tgl;
  logic [N_DB-1:0][4:0]   db_sig;
  logic [N_DB-1:0][4:0]   latch;

  tile_vme_regs #(.N_DB(N_DB), .BOARD_ID(BOARD_ID)) u_vme (
    .rst_n, .vme_ds, .vme_write, .vme_addr, .vme_wdata, .vme_rdata, .vme_dtack,
    .db_cfg, .tp_trim, .latch_delay, .fire_tgl, .latch_data(latch)
  );

  for (genvar i = 0; i < N_DB; i++) begin : g_db
    logic [2:0] disc;
    daughter_board #(.SHAPE_D(SHAPE_D)) u_db (
      .clk, .rst_n,
      .ms_in(ms_in[i]),
      .test_in({tp_inter, tp_inter, tp_inter, tp_ms}),
      .cfg(db_cfg[i]),
      .disc(disc),
      .gray(gray[i])
    );
    assign db_sig[i] = {gray[i], disc};
  end

  tile_readback #(.N_DB(N_DB)) u_rb (
    .clk, .rst_n, .fire_tgl, .delay(latch_delay), .db_sig, .test_fire, .latch
  );

endmodule
