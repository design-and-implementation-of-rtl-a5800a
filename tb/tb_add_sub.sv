// tb_add_sub: random coefficients and APC words 0..16A; the output must be
// 16A + word when adding, 16A - word when subtracting, 0 under clr.
module tb_add_sub;
  localparam int W = 8;
  logic [W-1:0] a;
  logic [W+4:0] word, p;
  logic         add, clr;
  int checks = 0, failures = 0;

  add_sub #(.W(W)) dut (.a, .word, .add, .clr, .p);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int unsigned m, exp;
      a    = W'($urandom);
      m    = $urandom_range(0, 16);
      word = (W+5)'(m * a);
      add  = 1'($urandom);
      clr  = ($urandom_range(0, 9) == 0);
      #1;
      exp = clr ? 0 : (add ? 16 * a + m * a : 16 * a - m * a);
      checks++;
      if (p !== (W+5)'(exp)) begin
        failures++;
        $display("FAIL a=%0d word=%0d add=%0b clr=%0b p=%0d exp=%0d",
                 a, word, add, clr, p, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
