// apc_oms_mult: memory-based multiplier of a W-bit coefficient A by a 5-bit
// input X, using the combined APC-OMS lookup table.
//
// Datapath (combinational from x to p):
//   xin_gen      X -> APC address X' (two's complement of X[3:0] if x4 = 0)
//   oms_control  X -> shift s1s0 (trailing zeros) and RESET (X = 10000)
//   addr_gen     X', s -> LUT address d3..d0 of the odd part of X'
//   decoder_4to9 d -> word selects w8..w0
//   lut_mem      nine words (2i+1)A and 2A, output cleared by RESET
//   barrel_shifter  word << s  = X'A (16A for X = 00000)
//   add_sub      p = 16A + X'A if x4 = 1, 16A - X'A if x4 = 0, 0 if clr
// This gives p = A*X for every X in 0..31 while storing 9 words instead of
// the 32 of a plain product LUT.
// Loading: pulse `load` with the coefficient on `a`; lut_loader writes the
// nine words in 9 cycles and raises `ready`. p is valid only while ready.
// The block structure and word contents follow the source design; the
// loading interface is this design's choice. Immediate assertions check
// that the shifted word fits in W+5 bits and that ready and busy exclude
// each other.
module apc_oms_mult
  import apc_oms_pkg::*;
#(
  parameter int unsigned W = 8           // width of the coefficient A
)(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           load,           // load a new coefficient
  input  logic [W-1:0]   a,              // coefficient A (sampled on load)
  output logic           ready,          // LUT holds a complete coefficient
  input  logic           clr,            // forces the product to 0
  input  logic [L-1:0]   x,              // 5-bit input operand X
  output logic [W+4:0]   p               // product A*X
);
  logic [W-1:0]  a_q;
  logic          we, busy;
  lut_addr_t     waddr, d;
  logic [W+3:0]  wdata, lut_q;
  apc_addr_t     xp;
  shift_t        s;
  logic          lut_reset;
  wsel_t         w;
  logic [W+6:0]  shifted;

  lut_loader #(.W(W)) u_loader (
    .clk, .rst_n, .load, .a, .a_q, .we, .waddr, .wdata, .busy, .ready
  );

  xin_gen      u_xin  (.x, .xp);
  oms_control  u_ctrl (.x, .s, .reset(lut_reset));
  addr_gen     u_addr (.xp, .s, .d);
  decoder_4to9 u_dec  (.d, .w);

  lut_mem #(.W(W)) u_lut (
    .clk, .rst_n, .we, .waddr, .wdata, .w, .reset(lut_reset), .q(lut_q)
  );

  barrel_shifter #(.IW(W + 4)) u_bs (.din(lut_q), .s, .dout(shifted));

  // The shifted word is at most 16A, which fits in W+5 bits; the two top
  // bits of the shifter output are always zero.
  add_sub #(.W(W)) u_as (
    .a(a_q), .word(shifted[W+4:0]), .add(x[4]), .clr, .p
  );

  // The shifted word never exceeds 16A, and the loader never reports a
  // complete table while it is still writing.
  always_comb begin
    if (ready)
      assert (shifted[W+6:W+5] == 2'b00)
        else $error("barrel shifter output exceeds W+5 bits");
    assert (!(busy && ready))
      else $error("LUT reported ready while loading");
  end
endmodule
