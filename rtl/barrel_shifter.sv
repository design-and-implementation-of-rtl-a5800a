// barrel_shifter: left shift of the LUT output by s = s1s0 (0..3) bits.
//
// Two cascaded stages of 2:1 multiplexers: the first shifts by two when
// s1 = 1, the second by one when s0 = 1. The output is three bits wider
// than the input, so no bit is lost. Combinational; structure follows the
// source design, the output width is this design's choice.
module barrel_shifter #(
  parameter int unsigned IW = 12         // input width (W+4)
)(
  input  logic [IW-1:0]   din,
  input  logic [1:0]      s,             // s1s0
  output logic [IW+2:0]   dout
);
  logic [IW+2:0] im;

  always_comb begin
    im   = s[1] ? ({3'b000, din} << 2) : {3'b000, din};
    dout = s[0] ? (im << 1) : im;
  end
endmodule
