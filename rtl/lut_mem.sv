// lut_mem: the 9 x (W+4) word LUT of the APC-OMS multiplier.
//
// Words 0..7 hold the odd multiples P_i = (2i+1)A and word 8 holds 2A. The
// read side is asynchronous and selected by the one-hot word selects
// w8..w0 (an AND-OR of the selected word); RESET forces the output to 0.
// The write side is a synchronous single-word port (we, waddr, wdata) used
// to fill in the precomputed words. Contents are cleared by rst_n.
// Word count, width and read-out by word select follow the source design;
// the write port and reset are this design's choice.
module lut_mem
  import apc_oms_pkg::*;
#(
  parameter int unsigned W = 8           // width of the coefficient A
)(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,           // write enable
  input  lut_addr_t        waddr,        // word to write (0..8)
  input  logic [W+3:0]     wdata,        // word value
  input  wsel_t            w,            // one-hot read word selects
  input  logic             reset,        // clears the read output
  output logic [W+3:0]     q             // selected word
);
  logic [W+3:0] mem [NWORDS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NWORDS; i++) mem[i] <= '0;
    end else if (we && waddr < lut_addr_t'(NWORDS)) begin
      mem[waddr] <= wdata;
    end
  end

  always_comb begin
    q = '0;
    for (int i = 0; i < NWORDS; i++)
      if (w[i]) q = q | mem[i];
    if (reset) q = '0;
  end
endmodule
