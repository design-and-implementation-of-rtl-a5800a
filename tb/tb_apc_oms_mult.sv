// tb_apc_oms_mult: loads coefficients (0, all ones, random) and multiplies
// each by all 32 inputs X, comparing with A*X; checks the 9-cycle load
// latency, clr, and reloading a new coefficient. Also counts how often the
// RESET path (X = 10000), the 2A word (X = 00000), addition (x4 = 1) and
// subtraction (x4 = 0) were used.
module tb_apc_oms_mult;
  import apc_oms_pkg::*;
  localparam int W = 8;
  logic clk = 0, rst_n = 0, load = 0, clr = 0, ready;
  logic [W-1:0] a = '0;
  logic [4:0]   x = '0;
  logic [W+4:0] p;
  int checks = 0, failures = 0;
  int n_reset = 0, n_w8 = 0, n_add = 0, n_sub = 0;

  apc_oms_mult #(.W(W)) dut (.clk, .rst_n, .load, .a, .ready, .clr, .x, .p);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 40; n++) begin
      logic [W-1:0] av;
      int cyc;
      av = (n == 0) ? '0 : (n == 1) ? '1 : W'($urandom);
      @(negedge clk);
      a = av; load = 1;
      @(negedge clk);
      load = 0; a = W'($urandom);
      cyc = 0;
      while (!ready && cyc < 30) begin
        @(negedge clk);
        cyc++;
      end
      chk(cyc == 9, $sformatf("load took %0d cycles", cyc));
      for (int v = 0; v < 32; v++) begin
        x = 5'(v);
        clr = 0;
        #1;
        chk(p == (W+5)'(av * v), $sformatf("A=%0d X=%0d p=%0d", av, v, p));
        if (dut.lut_reset) n_reset++;
        if (dut.w[8]) n_w8++;
        if (x[4]) n_add++; else n_sub++;
        clr = 1;
        #1;
        chk(p == 0, $sformatf("clr A=%0d X=%0d p=%0d", av, v, p));
        clr = 0;
      end
    end
    chk(n_reset > 0 && n_w8 > 0 && n_add > 0 && n_sub > 0, "all paths used");
    $display("paths: reset=%0d w8=%0d add=%0d sub=%0d", n_reset, n_w8, n_add, n_sub);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
