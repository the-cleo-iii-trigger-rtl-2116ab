// Self-checking testbench for the TrimDAC gain model: random samples and
// codes, plus the corner codes, against floor(vin*(code-128)/128) computed
// in real arithmetic and clipped to the sample range.
module tb_trimdac_ad8842;
  localparam int SW = 16;
  logic [7:0][SW-1:0] vin, vout;
  logic [7:0][7:0]    code;
  int checks = 0, failures = 0;

  trimdac_ad8842 #(.SAMPLE_W(SW), .NCH(8)) dut (.vin, .code, .vout);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expect_out(int x, int c);
    real g;
    int e;
    g = real'(x) * real'(c - 128) / 128.0;
    e = int'($floor(g));
    if (e > 32767) e = 32767;
    if (e < -32768) e = -32768;
    return e;
  endfunction

  initial begin
    for (int n = 0; n < 400; n++) begin
      for (int i = 0; i < 8; i++) begin
        vin[i]  = SW'($urandom);
        code[i] = 8'($urandom);
      end
      if (n == 0) begin
        code[0] = 8'd0; code[1] = 8'd128; code[2] = 8'd255; code[3] = 8'd26;
        vin[0] = 16'h8000;
        vin[3] = 16'd1000;
      end
      #1;
      for (int i = 0; i < 8; i++) begin
        int e;
        e = expect_out(int'($signed(vin[i])), int'(code[i]));
        checks++;
        if (int'($signed(vout[i])) != e) begin
          failures++;
          $display("FAIL vin=%0d code=%0d vout=%0d expected %0d",
                   $signed(vin[i]), code[i], $signed(vout[i]), e);
        end
      end
      if (n == 0) begin
        // nominal gain: code 26 gives about -0.8
        checks++;
        if ($signed(vout[3]) > -790 || $signed(vout[3]) < -805) begin
          failures++;
          $display("FAIL nominal gain gives %0d for 1000", $signed(vout[3]));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
