// tb_lut_loader: for random coefficients, records every write of the loader
// and checks the nine words (A,3A,..,15A at 0..7, 2A at 8), that each is
// written once, the 9-cycle write window, ready one cycle after it, and
// that a load pulse during loading is ignored.
module tb_lut_loader;
  import apc_oms_pkg::*;
  localparam int W = 8;
  logic clk = 0, rst_n = 0, load = 0;
  logic [W-1:0] a = '0, a_q;
  logic         we, busy, ready;
  logic [3:0]   waddr;
  logic [W+3:0] wdata;
  int checks = 0, failures = 0;

  lut_loader #(.W(W)) dut (.clk, .rst_n, .load, .a, .a_q, .we, .waddr,
                           .wdata, .busy, .ready);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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
    @(negedge clk);
    chk(!ready && !busy && !we, "idle after reset");
    for (int n = 0; n < 50; n++) begin
      logic [W-1:0] av;
      int written [9];
      int wcycles, cyc;
      av = (n == 0) ? '1 : (n == 1) ? '0 : W'($urandom);
      for (int i = 0; i < 9; i++) written[i] = 0;
      a = av; load = 1;
      @(negedge clk);
      load = 0; a = ~av;
      wcycles = 0; cyc = 0;
      while (!ready && cyc < 30) begin
        if (cyc == 3) load = 1;           // ignored while busy
        if (we) begin
          int exp;
          wcycles++;
          exp = (waddr == 4'd8) ? 2 * av : (2 * waddr + 1) * av;
          chk(waddr < 9, $sformatf("waddr %0d in range", waddr));
          if (waddr < 9) written[waddr]++;
          chk(wdata == (W+4)'(exp),
              $sformatf("A=%0d word %0d = %0d exp %0d", av, waddr, wdata, exp));
        end
        @(negedge clk);
        load = 0;
        cyc++;
      end
      chk(wcycles == 9, $sformatf("write cycles %0d", wcycles));
      chk(cyc == 9, $sformatf("ready after %0d cycles", cyc));
      chk(a_q == av, "captured A");
      chk(!busy && !we, "idle after load");
      for (int i = 0; i < 9; i++)
        chk(written[i] == 1, $sformatf("word %0d written %0d times", i, written[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
