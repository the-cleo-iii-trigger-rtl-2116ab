// Self-checking testbench for zc_pulse_gen: falling edges of the
// discriminator input with several width codes, including a retrigger
// during a pulse. A cycle-level reference counts the expected output:
// a pulse of width_code+1 cycles starting one cycle after the edge.
module tb_zc_pulse_gen;
  logic clk = 0, rst_n = 0, disc = 0, pulse;
  logic [7:0] width_code = 0;
  int checks = 0, failures = 0, cyc = 0;
  int ref_cnt = 0;
  logic disc_d = 0;
  int pulses_seen = 0, retriggers = 0;

  zc_pulse_gen #(.WIDTH_W(8)) dut (.clk, .rst_n, .disc, .width_code, .pulse);

  always #21 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: after each edge, compare then update
  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (pulse !== (ref_cnt > 0)) begin
        failures++;
        $display("FAIL cyc=%0d pulse=%b expected %b", cyc, pulse, ref_cnt > 0);
      end
    end
  end

  always @(posedge clk) begin
    #1;
    cyc++;
    // a falling edge seen at this edge starts a pulse visible after the next
    if (rst_n && disc_d && !disc) begin
      if (ref_cnt > 1) retriggers++;
      ref_cnt = width_code + 2;
      pulses_seen++;
    end
    if (ref_cnt > 0) ref_cnt--;
    disc_d = disc;
  end

  task automatic fire(input int high_cycles, input int low_cycles);
    disc = 1;
    repeat (high_cycles) @(negedge clk);
    disc = 0;
    repeat (low_cycles) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    width_code = 0;  fire(5, 10);
    width_code = 3;  fire(2, 10);
    width_code = 20; fire(7, 30);
    width_code = 15; fire(3, 6); fire(3, 30);   // retrigger
    for (int i = 0; i < 40; i++) begin
      width_code = 8'($urandom_range(0, 40));
      fire($urandom_range(1, 10), $urandom_range(1, 50));
    end
    repeat (60) @(negedge clk);
    checks++;
    if (retriggers == 0) begin
      failures++;
      $display("FAIL no retrigger exercised");
    end
    $display("pulses=%0d retriggers=%0d", pulses_seen, retriggers);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
