// xin_gen: APC address mapping (input-operand mapping) of the 5-bit input X.
//
// Products of X and 32-X sum to 32A, so a product can be written as
// 16A +/- X'A with a 4-bit address X'. The mapping is
//   X' = X[3:0]              when x4 = 1
//   X' = two's complement of X[3:0] (mod 16) when x4 = 0.
// It is built as the usual gate chain for a conditional two's complement:
// bit k is inverted when x4 = 0 and any lower bit is 1 (AND/OR/XOR chain).
// x'0 is x0 itself: a two's complement never changes the lowest bit.
// Purely combinational. The mapping rule and its gate structure follow the
// source design; nothing here is a local choice.
module xin_gen
  import apc_oms_pkg::*;
(
  input  logic [L-1:0] x,      // input operand X = x4..x0
  output apc_addr_t    xp      // APC address X' = x'3..x'0
);
  logic       neg;             // 1: take the two's complement
  logic [2:0] any_low;         // any_low[k] = x0 | .. | xk

  always_comb begin
    neg        = ~x[4];
    any_low[0] = x[0];
    any_low[1] = any_low[0] | x[1];
    any_low[2] = any_low[1] | x[2];
    xp[0]      = x[0];
    xp[1]      = x[1] ^ (neg & any_low[0]);
    xp[2]      = x[2] ^ (neg & any_low[1]);
    xp[3]      = x[3] ^ (neg & any_low[2]);
  end
endmodule
