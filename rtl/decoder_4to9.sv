// decoder_4to9: 4-to-9-line address decoder of the APC-OMS LUT.
//
// A 3-to-8 decoder on d2d1d0 gives w0..w7; d3 turns it into a 4-to-9
// decoder: w8 = d3 & (d2d1d0 == 000), and w0..w7 are enabled only when
// d3 = 0, so exactly one word select is high for every legal address
// (0000..0111, 1000). Addresses 1001..1111 never occur and select nothing.
// An immediate assertion checks that at most one select is high.
// Combinational. Making w0..w7 depend on ~d3 (so that w0 and w8 are never
// both high) is this design's choice.
module decoder_4to9
  import apc_oms_pkg::*;
(
  input  lut_addr_t d,         // LUT address d3..d0
  output wsel_t     w          // one-hot word selects w8..w0
);
  always_comb begin
    w = '0;
    if (d[3]) w[W8_ADDR]       = (d[2:0] == 3'b000);
    else      w[int'(d[2:0])]  = 1'b1;
    assert ((w & (w - 1'b1)) == '0) else $error("more than one word select");
  end
endmodule
