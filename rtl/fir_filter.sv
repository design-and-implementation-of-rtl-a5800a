// fir_filter: transposed-form FIR filter built from APC-OMS LUT multipliers.
//
//   y(n) = sum_{k=0}^{N-1} h(k) x(n-k)
//
// Each tap k has a memory-based multiplier (M) that holds |h(k)| in its
// LUT and forms |h(k)|*x(n); an add/subtract cell (AS) adds the product to
// the partial sum coming from tap k+1 when h(k) is positive and subtracts
// it when h(k) is negative. A register (D) sits between neighbouring AS
// cells, so the partial sums move one tap towards the output per sample:
//   r(N-1) <= +/-|h(N-1)| x(n)
//   r(k)   <= r(k+1) +/- |h(k)| x(n)      k = N-2 .. 1
//   y(n)    = r(1)   +/- |h(0)| x(n)      (no register at the output)
// Samples x(n) are unsigned XW-bit values; each multiplier splits them into
// 5-bit digits (decomp_mult). The coefficients are loaded by a pulse on
// `load` with |h(k)| on h_mag[k]; all taps load in parallel in 9 cycles and
// `ready` rises when they are done. h_pos[k] = 1 marks a positive h(k); it
// is read every cycle. A sample is taken in each cycle with x_valid = 1,
// and y is valid in that same cycle. clr empties the delay line and forces
// the products, and so y, to 0.
// The tap structure and sign rule follow the source design; the widths,
// tap count, sample enable and clear are this design's choices.
module fir_filter
  import apc_oms_pkg::*;
#(
  parameter int unsigned N  = 8,         // number of taps
  parameter int unsigned W  = 8,         // coefficient magnitude width
  parameter int unsigned XW = 8,         // sample width
  localparam int unsigned YW = W + XW + $clog2(N) + 1   // signed output width
)(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 load,           // load h_mag into the LUTs
  input  logic [W-1:0]         h_mag [N],      // |h(k)|
  input  logic [N-1:0]         h_pos,          // 1: h(k) >= 0
  output logic                 ready,          // coefficients loaded
  input  logic                 clr,            // clear the delay line
  input  logic                 x_valid,        // sample x is present
  input  logic [XW-1:0]        x,              // sample x(n)
  output logic signed [YW-1:0] y               // output y(n)
);
  logic [W+XW-1:0]        prod [N];
  logic [N-1:0]           rdy;
  logic signed [YW-1:0]   term [N];            // +/- |h(k)| x(n)
  logic signed [YW-1:0]   r    [N];            // r[0] unused

  for (genvar k = 0; k < N; k++) begin : g_tap
    decomp_mult #(.W(W), .XW(XW)) u_m (
      .clk, .rst_n, .load, .a(h_mag[k]), .ready(rdy[k]), .clr,
      .x, .p(prod[k])
    );
    assign term[k] = h_pos[k] ?  $signed({1'b0, (YW-1)'(prod[k])})
                              : -$signed({1'b0, (YW-1)'(prod[k])});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) r[k] <= '0;
    end else if (clr) begin
      for (int k = 0; k < N; k++) r[k] <= '0;
    end else if (x_valid) begin
      r[0] <= '0;
      for (int k = 1; k < N; k++)
        r[k] <= (k == N - 1) ? term[k] : r[(k+1) % N] + term[k];
    end
  end

  always_comb begin
    ready = &rdy;
    y     = (N > 1) ? r[1 % N] + term[0] : term[0];
  end
endmodule
