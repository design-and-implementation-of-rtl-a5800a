// tb_xin_gen: exhaustive check of the APC address mapping.
// For all 32 inputs X the address must be X[3:0] when x4 = 1 and
// (16 - X[3:0]) mod 16 when x4 = 0. Includes the values of the published
// waveform (00->00, 02->0E, 06->0A, 07->09).
module tb_xin_gen;
  import apc_oms_pkg::*;
  logic [4:0] x;
  logic [3:0] xp;
  int checks = 0, failures = 0;

  xin_gen dut (.x, .xp);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      logic [3:0] exp;
      x = 5'(v);
      #1;
      exp = v[4] ? 4'(v) : 4'((16 - (v % 16)) % 16);
      checks++;
      if (xp !== exp) begin
        failures++;
        $display("FAIL x=%02h xp=%h exp=%h", x, xp, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
