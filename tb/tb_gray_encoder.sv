// Self-checking testbench for gray_encoder: all eight combinations of the
// three threshold pulses against a hand-written table of the largest
// threshold's Gray code (none 00, low 01, medium 11, high 10).
module tb_gray_encoder;
  logic [2:0] pulse;
  logic [1:0] gray;
  int checks = 0, failures = 0;

  gray_encoder dut (.pulse, .gray);

  // expected code indexed by {high, medium, low}
  localparam logic [1:0] EXP [8] = '{2'b00, 2'b01, 2'b11, 2'b11,
                                     2'b10, 2'b10, 2'b10, 2'b10};

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      pulse = 3'(v);
      #1;
      checks++;
      if (gray !== EXP[v]) begin
        failures++;
        $display("FAIL pulse=%b gray=%b expected %b", pulse, gray, EXP[v]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
