// tb_addr_gen: exhaustive check of the OMS address generator.
// For every APC address X' with its trailing-zero count s, the LUT address
// must be {0, i} where X' = 2^s (2i+1), and 1000 for X' = 0000.
module tb_addr_gen;
  import apc_oms_pkg::*;
  logic [3:0] xp, d;
  logic [1:0] s;
  int checks = 0, failures = 0;

  addr_gen dut (.xp, .s, .d);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int tz, odd;
      logic [3:0] exp;
      tz = 0;
      while (tz < 3 && ((v >> tz) & 1) == 0) tz++;
      odd = v >> tz;
      exp = (v == 0) ? 4'b1000 : 4'((odd - 1) / 2);
      xp = 4'(v);
      s  = 2'(tz);
      #1;
      checks++;
      if (d !== exp) begin
        failures++;
        $display("FAIL xp=%h d=%h exp=%h", xp, d, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
