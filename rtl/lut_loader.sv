// lut_loader: fills the APC-OMS LUT with the precomputed words of A.
//
// A one-cycle pulse on `load` captures the coefficient A and starts a
// 9-cycle write sequence: words 0..7 receive A, 3A, 5A, .., 15A (a running
// sum that adds 2A each cycle, one adder) and word 8 receives 2A. `busy` is
// high during the sequence and `ready` is high once a complete set of words
// has been written; a new `load` while busy is ignored. The captured A is
// also output for the 16A term of the adder/subtractor.
// Timing: load in cycle 0, writes in cycles 1..9, ready from cycle 10.
// The stored values follow the source design; how and when they are written
// is this design's choice, as the source only says they are precomputed.
// An assertion checks that every write address lies inside the table.
module lut_loader
  import apc_oms_pkg::*;
#(
  parameter int unsigned W = 8           // width of the coefficient A
)(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           load,           // start loading coefficient a
  input  logic [W-1:0]   a,              // coefficient A
  output logic [W-1:0]   a_q,            // captured coefficient
  output logic           we,             // LUT write enable
  output lut_addr_t      waddr,          // LUT word address
  output logic [W+3:0]   wdata,          // LUT word value
  output logic           busy,
  output logic           ready
);
  logic [W+3:0] acc;                     // running odd multiple (2i+1)A
  lut_addr_t    cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q   <= '0;
      acc   <= '0;
      cnt   <= '0;
      busy  <= 1'b0;
      ready <= 1'b0;
    end else if (!busy) begin
      if (load) begin
        a_q   <= a;
        acc   <= {4'b0000, a};
        cnt   <= '0;
        busy  <= 1'b1;
        ready <= 1'b0;
      end
    end else begin
      acc <= acc + {3'b000, a_q, 1'b0};
      cnt <= cnt + 1'b1;
      if (cnt == lut_addr_t'(NWORDS - 1)) begin
        busy  <= 1'b0;
        ready <= 1'b1;
      end
    end
  end

  // every write must fall inside the nine-word table
  a_waddr_range: assert property (@(posedge clk) disable iff (!rst_n)
    we |-> waddr < lut_addr_t'(NWORDS));

  always_comb begin
    we    = busy;
    waddr = cnt;
    wdata = (cnt == lut_addr_t'(W8_ADDR)) ? {3'b000, a_q, 1'b0} : acc;
  end
endmodule
