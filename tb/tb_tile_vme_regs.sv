// Self-checking testbench for tile_vme_regs: strobed writes to every
// daughter-board register, the test-pulse TrimDACs and the delay, with
// random data; read-back over the bus and the configuration outputs are
// compared with a shadow copy kept by the testbench. Writes addressed to
// another board must be ignored, the fire register must toggle fire_tgl,
// and the readback latches must be readable.
module tb_tile_vme_regs;
  import cc_pkg::*;
  localparam int N = 24, ID = 5;
  logic rst_n = 0, vme_ds = 0, vme_write = 0, vme_dtack;
  logic [VME_AW-1:0] vme_addr = '0;
  logic [VME_DW-1:0] vme_wdata = '0, vme_rdata;
  db_cfg_t [N-1:0] db_cfg;
  logic [7:0][7:0] tp_trim;
  logic [7:0] latch_delay;
  logic fire_tgl;
  logic [N-1:0][4:0] latch_data;
  int checks = 0, failures = 0;
  int shadow [N][12];
  int tps [8];

  tile_vme_regs #(.N_DB(N), .BOARD_ID(ID)) dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic vwrite(int board, int ra, int d);
    vme_addr = VME_AW'((board << 12) | ra);
    vme_wdata = VME_DW'(d);
    vme_write = 1;
    #10 vme_ds = 1;
    #10 vme_ds = 0;
    #10;
  endtask

  task automatic vread(int board, int ra, output int d, output bit ack);
    vme_addr = VME_AW'((board << 12) | ra);
    vme_write = 0;
    #10 vme_ds = 1;
    #5 d = int'(vme_rdata); ack = vme_dtack;
    #5 vme_ds = 0;
    #10;
  endtask

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int d;
    bit ack;
    bit f0;
    for (int i = 0; i < N; i++) latch_data[i] = 5'($urandom);
    #20 rst_n = 1;
    #20;
    for (int i = 0; i < N; i++)
      for (int k = 0; k < 12; k++) begin
        shadow[i][k] = (k < 3) ? $urandom_range(0, 4095) : $urandom_range(0, 255);
        vwrite(ID, i * 16 + k, shadow[i][k]);
        vwrite(ID + 1, i * 16 + k, 12'h5a5);   // another board: ignored
      end
    for (int j = 0; j < 8; j++) begin
      tps[j] = $urandom_range(0, 255);
      vwrite(ID, 12'h400 + j, tps[j]);
    end
    vwrite(ID, 12'h410, 77);
    for (int i = 0; i < N; i++)
      for (int k = 0; k < 12; k++) begin
        vread(ID, i * 16 + k, d, ack);
        expect_eq("readback", d, shadow[i][k]);
        expect_eq("dtack", ack, 1);
        if (k < 3) expect_eq("thr out", db_cfg[i].thr[k], shadow[i][k]);
        else if (k == 3) expect_eq("width out", db_cfg[i].width, shadow[i][k]);
        else expect_eq("trim out", db_cfg[i].trim[k-4], shadow[i][k]);
      end
    for (int j = 0; j < 8; j++) expect_eq("tp_trim", tp_trim[j], tps[j]);
    expect_eq("delay", latch_delay, 77);
    vread(ID + 1, 0, d, ack);
    expect_eq("no dtack for other board", ack, 0);
    f0 = fire_tgl;
    vwrite(ID, 12'h411, 0);
    expect_eq("fire toggles", fire_tgl, !f0);
    vwrite(ID, 12'h411, 0);
    expect_eq("fire toggles back", fire_tgl, f0);
    for (int i = 0; i < N; i++) begin
      vread(ID, 12'h500 + i, d, ack);
      expect_eq("latch read", d, latch_data[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
