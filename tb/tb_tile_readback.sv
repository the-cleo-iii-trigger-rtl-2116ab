// Self-checking testbench for tile_readback. The daughter-board signals
// carry a running cycle count, so the latched value tells the cycle of
// capture. After each change of fire_tgl the test_fire strobe must come
// two edges later (synchroniser) and the capture delay+2 edges after
// the edge that raised the strobe, for several delays.
module tb_tile_readback;
  localparam int N = 24;
  logic clk = 0, rst_n = 0, fire_tgl = 0, test_fire;
  logic [7:0] delay = '0;
  logic [N-1:0][4:0] db_sig;
  logic [N-1:0][4:0] latch;
  int checks = 0, failures = 0, cyc = 0;
  int fire_cyc;

  tile_readback #(.N_DB(N)) dut (.clk, .rst_n, .fire_tgl, .delay, .db_sig, .test_fire, .latch);

  always #21 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  always_comb for (int i = 0; i < N; i++) db_sig[i] = 5'(cyc + i);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d [5] = '{0, 1, 5, 17, 200};
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (d[n]) begin
      int t0, tf;
      delay = 8'(d[n]);
      @(negedge clk);
      fire_tgl = !fire_tgl;
      t0 = cyc;
      tf = -1;
      while (tf < 0) begin
        @(posedge clk); #1;
        if (test_fire) tf = cyc;
        if (cyc - t0 > 10) break;
      end
      checks++;
      if (tf - t0 != 2) begin
        failures++;
        $display("FAIL test_fire after %0d cycles", tf - t0);
      end
      // capture at the edge delay+2 edges after the one that raised the
      // strobe; latch then holds the count of the cycle before that edge
      repeat (d[n] + 2) @(posedge clk);
      #1;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (latch[i] !== 5'(tf + 1 + d[n] + i)) begin
          failures++;
          $display("FAIL delay=%0d latch[%0d]=%0d expected %0d", d[n], i, latch[i], 5'(tf + 1 + d[n] + i));
        end
      end
      repeat (3) @(negedge clk);
      checks++;
      if (latch[0] !== 5'(tf + 1 + d[n])) begin
        failures++;
        $display("FAIL latch did not hold");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
