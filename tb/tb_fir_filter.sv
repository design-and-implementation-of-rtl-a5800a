// tb_fir_filter: end-to-end test of the FIR filter at its default size
// (8 taps, 8-bit coefficient magnitudes, 8-bit samples).
// Loads signed coefficients, streams random and corner-case samples with
// gaps (x_valid low), clears the delay line, reloads new coefficients, and
// compares every output with a direct-form reference sum over the sample
// history. It counts each mechanism the filter has and fails if one never
// happened: positive-tap addition, negative-tap subtraction, the LUT RESET
// path (digit 10000), the 2A word (digit 00000), a stalled cycle, a clear
// and a coefficient reload.
module tb_fir_filter;
  import apc_oms_pkg::*;
  localparam int N = 8, W = 8, XW = 8;
  localparam int YW = W + XW + $clog2(N) + 1;
  logic clk = 0, rst_n = 0, load = 0, clr = 0, x_valid = 0, ready;
  logic [W-1:0]  h_mag [N];
  logic [N-1:0]  h_pos = '0;
  logic [XW-1:0] x = '0;
  logic signed [YW-1:0] y;
  longint hist [N];
  int checks = 0, failures = 0;
  int n_pos = 0, n_neg = 0, n_reset = 0, n_w8 = 0, n_stall = 0, n_clr = 0,
      n_reload = 0, n_samples = 0;

  fir_filter dut (.clk, .rst_n, .load, .h_mag, .h_pos, .ready, .clr,
                  .x_valid, .x, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  function automatic longint coef(int k);
    return h_pos[k] ? longint'(h_mag[k]) : -longint'(h_mag[k]);
  endfunction

  task automatic load_coefs(input int set);
    int cyc;
    for (int k = 0; k < N; k++) begin
      h_mag[k] = (set == 0) ? W'(k * 37 + 5) : W'($urandom);
      if (set == 1 && k == 2) h_mag[k] = '1;
    end
    h_pos = (set == 0) ? N'('b10110101) : N'($urandom);
    if (h_pos == '0) h_pos[0] = 1'b1;
    if (h_pos == '1) h_pos[1] = 1'b0;
    @(negedge clk);
    load = 1;
    @(negedge clk);
    load = 0;
    cyc = 0;
    while (!ready && cyc < 30) begin
      @(negedge clk);
      cyc++;
    end
    chk(cyc == 9, $sformatf("coefficient load took %0d cycles", cyc));
    n_reload++;
    // partial sums still in the delay line were formed with the old
    // coefficients: start the new filter from an empty line
    clr = 1;
    @(negedge clk);
    clr = 0;
    for (int k = 0; k < N; k++) hist[k] = 0;
    n_clr++;
  endtask

  task automatic sample(input logic [XW-1:0] xv, input bit valid);
    longint exp;
    x = xv; x_valid = valid;
    #1;
    if (valid) begin
      for (int k = N - 1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = longint'(xv);
      exp = 0;
      for (int k = 0; k < N; k++) exp += coef(k) * hist[k];
      chk(longint'(y) == exp, $sformatf("sample %0d y=%0d exp=%0d", n_samples, y, exp));
      n_samples++;
      for (int k = 0; k < N; k++)
        if (h_mag[k] != 0 && xv != 0) begin
          if (h_pos[k]) n_pos++; else n_neg++;
        end
      if (dut.g_tap[0].u_m.g_digit[0].u_mult.lut_reset) n_reset++;
      if (dut.g_tap[0].u_m.g_digit[0].u_mult.w[8]) n_w8++;
    end else begin
      n_stall++;
    end
    @(negedge clk);
  endtask

  initial begin
    for (int k = 0; k < N; k++) begin
      hist[k] = 0;
      h_mag[k] = '0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    load_coefs(0);
    // impulse: the output must replay the coefficients
    sample(8'd1, 1);
    for (int k = 1; k < N + 2; k++) sample(8'd0, 1);
    for (int set = 0; set < 4; set++) begin
      if (set > 0) load_coefs(set);
      for (int n = 0; n < 300; n++) begin
        logic [XW-1:0] xv;
        case (n % 7)
          0: xv = 8'h10;                 // low digit 10000
          1: xv = 8'h00;
          2: xv = 8'hFF;
          default: xv = XW'($urandom);
        endcase
        sample(xv, ($urandom_range(0, 4) != 0));
        if (n == 150) begin
          clr = 1;
          @(negedge clk);
          clr = 0;
          for (int k = 0; k < N; k++) hist[k] = 0;
          n_clr++;
        end
      end
    end
    $display("mechanisms: pos=%0d neg=%0d reset=%0d w8=%0d stall=%0d clr=%0d reload=%0d samples=%0d",
             n_pos, n_neg, n_reset, n_w8, n_stall, n_clr, n_reload, n_samples);
    chk(n_pos > 0, "positive tap addition happened");
    chk(n_neg > 0, "negative tap subtraction happened");
    chk(n_reset > 0, "LUT RESET path happened");
    chk(n_w8 > 0, "2A word used");
    chk(n_stall > 0, "stall happened");
    chk(n_clr > 0, "clear happened");
    chk(n_reload > 1, "coefficient reload happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
