// Daughter-board priority encoder and Gray coder.
//
// The three threshold channels of a daughter board each deliver an output
// pulse. This block picks the largest threshold whose pulse is present and
// emits it as the two-bit Gray code that is sent to the tile processor
// (none 00, low 01, medium 11, high 10). The priority encoding and the Gray
// code follow the daughter-board description; the code assignment is this
// design's choice. Purely combinational, as on the clock-less daughter
// board.
//
// pulse[0] low, pulse[1] medium, pulse[2] high; gray is the trigger word.
module gray_encoder
  import cc_pkg::*;
(
  input  logic [2:0] pulse,
  output logic [1:0] gray
);

  always_comb begin
    if (pulse[2])      gray = GRAY_HIGH;
    else if (pulse[1]) gray = GRAY_MED;
    else if (pulse[0]) gray = GRAY_LOW;
    else               gray = GRAY_NONE;
  end

endmodule
