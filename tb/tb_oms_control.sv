// tb_oms_control: exhaustive check of the shift control word and RESET.
// s must equal the number of trailing zeros of X[3:0] (3 for 0000) and
// RESET must be high for X = 10000 only.
module tb_oms_control;
  import apc_oms_pkg::*;
  logic [4:0] x;
  logic [1:0] s;
  logic       reset;
  int checks = 0, failures = 0;

  oms_control dut (.x, .s, .reset);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      int tz;
      x  = 5'(v);
      #1;
      tz = 0;
      while (tz < 3 && ((v >> tz) & 1) == 0) tz++;
      checks += 2;
      if (s !== 2'(tz)) begin
        failures++;
        $display("FAIL x=%02h s=%0d exp=%0d", x, s, tz);
      end
      if (reset !== (v == 16)) begin
        failures++;
        $display("FAIL x=%02h reset=%0b", x, reset);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
