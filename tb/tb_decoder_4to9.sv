// tb_decoder_4to9: exhaustive check of the 4-to-9-line decoder.
// Addresses 0..8 must raise exactly word select w[d]; 9..15 select nothing.
module tb_decoder_4to9;
  import apc_oms_pkg::*;
  logic [3:0] d;
  logic [8:0] w;
  int checks = 0, failures = 0;

  decoder_4to9 dut (.d, .w);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic [8:0] exp;
      d = 4'(v);
      #1;
      exp = (v < 9) ? 9'(1 << v) : 9'd0;
      checks++;
      if (w !== exp) begin
        failures++;
        $display("FAIL d=%h w=%b exp=%b", d, w, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
