// TILE board readback latches.
//
// When a test pulse is fired, the board waits a programmable interval and
// then latches the five digital signals of each daughter board (the three
// discriminator outputs and the two-bit Gray code) so that software can
// read them over VME. Sweeping the interval, the thresholds and the test
// amplitudes maps out the behaviour of every channel. On the real board an
// analog programmable delay generator sets the interval; here it is a down
// counter of the trigger clock (this design's choice, 42 ns steps).
//
// fire_tgl comes from the clock-less VME interface: every change requests
// one test pulse. It is synchronised with two flip-flops; the change
// produces a one-cycle test_fire strobe (to the test pulse generator) and
// starts the counter with delay. When the counter has run down, latch
// captures db_sig: test_fire rises two clock edges after fire_tgl changes,
// and the capture happens delay+2 edges after the edge that raised it.
module tile_readback #(
  parameter int N_DB = 24
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 fire_tgl,
  input  logic [7:0]           delay,
  input  logic [N_DB-1:0][4:0] db_sig,
  output logic                 test_fire,
  output logic [N_DB-1:0][4:0] latch
);

  logic [2:0] sync;
  logic [7:0] cnt;
  logic       busy;

  assign test_fire = sync[2] ^ sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync  <= '0;
      cnt   <= '0;
      busy  <= 1'b0;
      latch <= '0;
    end else begin
      sync <= {sync[1:0], fire_tgl};
      if (test_fire) begin
        busy <= 1'b1;
        cnt  <= delay;
      end else if (busy) begin
        if (cnt == '0) begin
          busy  <= 1'b0;
          latch <= db_sig;
        end else begin
          cnt <= cnt - 1'b1;
        end
      end
    end
  end

endmodule
