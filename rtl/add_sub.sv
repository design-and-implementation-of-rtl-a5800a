// add_sub: sign-determination adder/subtractor of the APC multiplier.
//
// Forms the product word 16A + APC word when x4 = 1 and 16A - APC word when
// x4 = 0. It is a ripple-carry adder-subtractor: the APC word is XORed with
// the subtract control and the control is also the carry-in, so
// subtraction is done as addition of the two's complement. All results lie
// in 0..31A, so W+5 bits hold them exactly. clr forces the output to 0.
// Combinational. The 16A offset, the sign rule and the clear follow the
// source design.
module add_sub #(
  parameter int unsigned W = 8           // width of the coefficient A
)(
  input  logic [W-1:0]   a,              // coefficient A
  input  logic [W+4:0]   word,           // shifted LUT output (APC word)
  input  logic           add,            // 1: add (x4 = 1), 0: subtract
  input  logic           clr,            // forces the product to 0
  output logic [W+4:0]   p               // product value AX
);
  logic [W+4:0] base, opnd, sum;
  logic [W+5:0] c;
  logic         sub;

  assign sub  = ~add;
  assign base = {1'b0, a, 4'b0000};      // 16A
  assign opnd = word ^ {(W+5){sub}};
  assign c[0] = sub;

  // one full adder per bit, carries rippling upwards; the carry out of
  // the top bit is dropped, as every result fits in W+5 bits
  for (genvar k = 0; k < W + 5; k++) begin : g_fa
    assign sum[k]   = base[k] ^ opnd[k] ^ c[k];
    assign c[k+1]   = (base[k] & opnd[k]) | (c[k] & (base[k] ^ opnd[k]));
  end

  assign p = clr ? '0 : sum;
endmodule
