// addr_gen: OMS address generator.
//
// Takes the 4-bit APC address X' = 2^s * (2i+1) and produces the LUT address
// d3d2d1d0 of the odd multiple P_i: the address is normalised by a right
// shift of s bits (s from the control circuit), the resulting odd number y
// has y0 = 1 and d2d1d0 = y3y2y1 = i. d3 = ~y0 is 1 only for X' = 0000 and
// then selects the extra word (2A) at LUT address 1000.
// The normaliser is a two-stage shifter like the output barrel shifter.
// Combinational. The odd-part addressing and the use of d3 follow the
// source design; feeding it with the mapped address X' (instead of folding
// the sign into XOR gates on the normalised bits) is this design's choice.
module addr_gen
  import apc_oms_pkg::*;
(
  input  apc_addr_t xp,        // APC address X'
  input  shift_t    s,         // trailing-zero count of X'
  output lut_addr_t d          // LUT address d3..d0
);
  apc_addr_t im, y;

  always_comb begin
    im = s[1] ? (xp >> 2) : xp;
    y  = s[0] ? (im >> 1) : im;
    d  = {~y[0], y[3:1]};
  end
endmodule
