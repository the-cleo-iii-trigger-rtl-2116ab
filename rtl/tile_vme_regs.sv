// VME configuration interface of one TILE board.
//
// The board must stay quiet while the experiment takes data, so this
// interface has no oscillator: writes are captured on the rising edge of
// the VME data strobe, reads are combinational. It holds, per daughter
// board, the three threshold DAC codes, the output pulse width code and the
// eight TrimDAC codes; for the board, the eight TrimDAC codes of its
// test-pulse generator (one per bank of six daughter boards and per path)
// and the delay between firing a test pulse and clocking the readback
// latches. Writing the fire register requests a test pulse (fire_tgl
// toggles). The readback latches are readable here. What the interface
// loads follows the document; the register map, 16-bit data and the strobe
// protocol are this design's choices.
//
// Word address map (vme_addr[19:12] selects the board, BOARD_ID):
//   0x000 + 16*i + k   daughter board i: k=0..2 low/medium/high threshold,
//                      k=3 pulse width, k=4..11 TrimDAC channel k-4
//   0x400 + j          test-pulse TrimDAC j (0..7)
//   0x410              readback latch delay (clock periods)
//   0x411              write: fire a test pulse
//   0x500 + i          readback latch of daughter board i (read only):
//                      bits [2:0] discriminators, [4:3] Gray code
// vme_dtack answers any strobe addressed to this board.
module tile_vme_regs
  import cc_pkg::*;
#(
  parameter int N_DB     = 24,
  parameter int BOARD_ID = 0
) (
  input  logic                   rst_n,
  input  logic                   vme_ds,
  input  logic                   vme_write,
  input  logic [VME_AW-1:0]      vme_addr,
  input  logic [VME_DW-1:0]      vme_wdata,
  output logic [VME_DW-1:0]      vme_rdata,
  output logic                   vme_dtack,
  output db_cfg_t [N_DB-1:0]     db_cfg,
  output logic [7:0][7:0]        tp_trim,
  output logic [7:0]             latch_delay,
  output logic                   fire_tgl,
  input  logic [N_DB-1:0][4:0]   latch_data
);

  logic        sel;
  logic [11:0] ra;
  logic [5:0]  db_i;
  logic [3:0]  db_k;

  assign sel  = (vme_addr[19:12] == 8'(BOARD_ID));
  assign ra   = vme_addr[11:0];
  assign db_i = ra[9:4];
  assign db_k = ra[3:0];
  assign vme_dtack = vme_ds && sel;

  always_ff @(posedge vme_ds or negedge rst_n) begin
    if (!rst_n) begin
      db_cfg      <= '0;
      tp_trim     <= '0;
      latch_delay <= '0;
      fire_tgl    <= 1'b0;
    end else if (sel && vme_write) begin
      if (ra[11:10] == 2'b00 && int'(db_i) < N_DB) begin
        case (db_k)
          4'd0, 4'd1, 4'd2: db_cfg[db_i].thr[db_k[1:0]] <= vme_wdata[THR_W-1:0];
          4'd3:             db_cfg[db_i].width <= vme_wdata[WID_W-1:0];
          4'd4, 4'd5, 4'd6, 4'd7, 4'd8, 4'd9, 4'd10, 4'd11:
                            db_cfg[db_i].trim[3'(db_k - 4'd4)] <= vme_wdata[7:0];
          default: ;
        endcase
      end else if (ra[11:3] == 9'h080) begin
        tp_trim[ra[2:0]] <= vme_wdata[7:0];
      end else if (ra == 12'h410) begin
        latch_delay <= vme_wdata[7:0];
      end else if (ra == 12'h411) begin
        fire_tgl <= !fire_tgl;
      end
    end
  end

  always_comb begin
    vme_rdata = '0;
    if (sel && !vme_write) begin
      if (ra[11:10] == 2'b00 && int'(db_i) < N_DB) begin
        case (db_k)
          4'd0, 4'd1, 4'd2: vme_rdata = VME_DW'(db_cfg[db_i].thr[db_k[1:0]]);
          4'd3:             vme_rdata = VME_DW'(db_cfg[db_i].width);
          4'd4, 4'd5, 4'd6, 4'd7, 4'd8, 4'd9, 4'd10, 4'd11:
                            vme_rdata = VME_DW'(db_cfg[db_i].trim[3'(db_k - 4'd4)]);
          default: ;
        endcase
      end else if (ra[11:3] == 9'h080) begin
        vme_rdata = VME_DW'(tp_trim[ra[2:0]]);
      end else if (ra == 12'h410) begin
        vme_rdata = VME_DW'(latch_delay);
      end else if (ra[11:8] == 4'h5 && int'(ra[7:0]) < N_DB) begin
        vme_rdata = VME_DW'(latch_data[ra[7:0]]);
      end
    end
  end

endmodule
