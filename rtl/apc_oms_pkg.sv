// apc_oms_pkg: constants and types shared by the APC-OMS LUT multiplier.
//
// The multiplier works on a 5-bit input operand X (L = 5). Its four low bits
// are folded by antisymmetric product coding (APC) into a 4-bit LUT address,
// and odd-multiple storage (OMS) keeps only the odd multiples of A, so the
// LUT holds nine words: P_i = (2i+1)A for i = 0..7 and 2A for X = 00000.
package apc_oms_pkg;
  localparam int unsigned L       = 5;   // input operand width
  localparam int unsigned AW      = 4;   // APC address width (L-1)
  localparam int unsigned NWORDS  = 9;   // LUT words: 8 odd multiples + 2A
  localparam int unsigned W8_ADDR = 8;   // LUT word that holds 2A

  typedef logic [AW-1:0]     apc_addr_t;  // APC address X' = x'3..x'0
  typedef logic [AW-1:0]     lut_addr_t;  // LUT address d3..d0
  typedef logic [1:0]        shift_t;     // barrel-shifter control s1s0
  typedef logic [NWORDS-1:0] wsel_t;      // word selects w8..w0
endpackage
