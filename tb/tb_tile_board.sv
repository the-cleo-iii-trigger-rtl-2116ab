// Self-checking testbench for tile_board: the calibration flow of one TILE
// board. Every daughter board is configured over VME (thresholds, width,
// gains, and a test amplitude that depends on the board so that the four
// levels occur), a test pulse is fired through the VME fire register, the
// testbench answers the test_fire strobe by driving the board's test
// pulse (standing in for the analog generator), and the readback latches,
// clocked a programmed delay later, are read over VME. Each latched Gray
// code must be the level that the board's test amplitude implies, and
// must agree with the live Gray output at the moment of capture.
module tb_tile_board;
  import cc_pkg::*;
  localparam int N = 24, DLY = 95;
  logic clk = 0, rst_n = 0;
  logic vme_ds = 0, vme_write = 0, vme_dtack;
  logic [VME_AW-1:0] vme_addr = '0;
  logic [VME_DW-1:0] vme_wdata = '0, vme_rdata;
  logic [N-1:0][3:0][SAMPLE_W-1:0] ms_in = '0;
  logic [SAMPLE_W-1:0] tp_ms = '0, tp_inter = '0;
  logic [N-1:0][1:0] gray;
  logic [7:0][7:0] tp_trim;
  logic test_fire;
  int checks = 0, failures = 0, fires = 0;
  localparam int TCODE [4] = '{128, 145, 170, 250};   // none, low, medium, high
  localparam logic [1:0] EXPG [4] = '{2'b00, 2'b01, 2'b11, 2'b10};

  tile_board #(.N_DB(N), .BOARD_ID(3)) dut (.*);

  always #21 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic vwrite(int ra, int d);
    vme_addr = VME_AW'((3 << 12) | ra);
    vme_wdata = VME_DW'(d);
    vme_write = 1;
    #10 vme_ds = 1;
    #10 vme_ds = 0;
    #10;
  endtask

  task automatic vread(int ra, output int d);
    vme_addr = VME_AW'((3 << 12) | ra);
    vme_write = 0;
    #10 vme_ds = 1;
    #5 d = int'(vme_rdata);
    #5 vme_ds = 0;
    #10;
  endtask

  function automatic int pulse_shape(int t, int amp);
    if (t < 0) return 0;
    if (t < 60) return amp * t / 60;
    return int'(real'(amp) * $exp(-real'(t - 60) / 190.0));
  endfunction

  // stand-in for the analog test pulse generator
  initial begin
    forever begin
      @(posedge clk);
      if (test_fire) begin
        fires++;
        for (int t = 0; t < 400; t++) begin
          @(negedge clk);
          tp_ms = SAMPLE_W'(pulse_shape(t, 9000));
        end
        tp_ms = '0;
      end
    end
  end

  logic [N-1:0][1:0] gray_at_capture;
  // the latch takes db_sig at the clock edge DLY+2 edges after the one that
  // raised test_fire; keep the live Gray codes of that same edge
  int cap_k = 0;
  always @(posedge clk) begin
    if (cap_k == 1) gray_at_capture <= gray;
    if (test_fire) cap_k <= DLY + 1;
    else if (cap_k > 0) cap_k <= cap_k - 1;
  end

  initial begin
    int d;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) begin
      vwrite(i * 16 + 0, 150);
      vwrite(i * 16 + 1, 500);
      vwrite(i * 16 + 2, 1500);
      vwrite(i * 16 + 3, 30);
      for (int k = 0; k < 4; k++) vwrite(i * 16 + 4 + k, 26);
      vwrite(i * 16 + 8, TCODE[i % 4]);
      for (int k = 1; k < 4; k++) vwrite(i * 16 + 8 + k, 128);
    end
    vwrite(12'h400, 77);
    vwrite(12'h410, DLY);
    checks++;
    if (tp_trim[0] != 8'd77) begin
      failures++;
      $display("FAIL test-pulse TrimDAC not loaded");
    end
    vread(5 * 16 + 2, d);
    checks++;
    if (d != 1500) begin
      failures++;
      $display("FAIL threshold readback %0d", d);
    end
    repeat (30) @(negedge clk);
    vwrite(12'h411, 1);
    repeat (DLY + 300) @(negedge clk);
    checks++;
    if (fires != 1) begin
      failures++;
      $display("FAIL %0d test pulses fired", fires);
    end
    for (int i = 0; i < N; i++) begin
      vread(12'h500 + i, d);
      checks += 3;
      if (d[4:3] != EXPG[i % 4]) begin
        failures++;
        $display("FAIL db %0d latched gray %b expected %b", i, d[4:3], EXPG[i % 4]);
      end
      if (d[4:3] != gray_at_capture[i]) begin
        failures++;
        $display("FAIL db %0d latched %b but live gray was %b", i, d[4:3], gray_at_capture[i]);
      end
      if (d[2:0] != 3'b000) begin
        failures++;
        $display("FAIL db %0d discriminators still high after the zero crossing", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
