// decomp_mult: high-precision multiplication by input-operand decomposition.
//
// An XW-bit input X is cut into ND = ceil(XW/5) digits of 5 bits,
// X = sum_k X_k * 32^k. Each digit is multiplied by the same coefficient A
// in its own APC-OMS LUT multiplier and the partial products are summed
// with their weights: P = sum_k (A*X_k) << 5k. All digit multipliers load A
// together (9 cycles), and `ready` follows them. Combinational from x to p.
// Decomposing into 5-bit digits follows the source design; the adder tree
// (a plain sum) and one LUT per digit are this design's choices.
module decomp_mult
  import apc_oms_pkg::*;
#(
  parameter int unsigned W  = 8,         // width of the coefficient A
  parameter int unsigned XW = 8          // width of the input operand X
)(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            load,
  input  logic [W-1:0]    a,
  output logic            ready,
  input  logic            clr,
  input  logic [XW-1:0]   x,
  output logic [W+XW-1:0] p
);
  localparam int unsigned ND = (XW + L - 1) / L;   // number of 5-bit digits

  logic [ND*L-1:0] xpad;
  logic [W+4:0]    pp  [ND];
  logic [ND-1:0]   rdy;

  assign xpad = (ND*L)'(x);

  for (genvar k = 0; k < ND; k++) begin : g_digit
    apc_oms_mult #(.W(W)) u_mult (
      .clk, .rst_n, .load, .a, .ready(rdy[k]), .clr,
      .x(xpad[k*L +: L]), .p(pp[k])
    );
  end

  always_comb begin
    logic [W+ND*L-1:0] sum;
    sum = '0;
    for (int k = 0; k < ND; k++)
      sum = sum + ((W+ND*L)'(pp[k]) << (k*L));
    p     = sum[W+XW-1:0];
    ready = &rdy;
  end
endmodule
