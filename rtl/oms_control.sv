// oms_control: control circuit of the APC-OMS multiplier.
//
// Every non-zero 4-bit address is 2^s times an odd number; s (0..3) is the
// number of trailing zeros and is the left shift the barrel shifter must
// apply to the stored odd multiple. A two's complement keeps the trailing
// zeros, so s is computed from the raw low bits of X:
//   s1 = ~x0 & ~x1
//   s0 = ~x0 & (x1 | ~x2)
// For X[3:0] = 0000 this gives s = 3 (the 2A word shifted to 16A).
// RESET is raised for X = 10000, whose product 16A needs an APC word of 0:
// it clears the LUT output. Combinational; the Boolean forms are derived
// here from the required shift counts.
module oms_control
  import apc_oms_pkg::*;
(
  input  logic [L-1:0] x,      // input operand X
  output shift_t       s,      // barrel-shifter control s1s0
  output logic         reset   // clears the LUT output (X = 10000)
);
  always_comb begin
    s[1]  = ~x[0] & ~x[1];
    s[0]  = ~x[0] & (x[1] | ~x[2]);
    reset = x[4] & (x[3:0] == 4'b0000);
  end
endmodule
