// tb_barrel_shifter: random words shifted by every control value must equal
// din * 2^s with no bit lost.
module tb_barrel_shifter;
  localparam int IW = 12;
  logic [IW-1:0] din;
  logic [1:0]    s;
  logic [IW+2:0] dout;
  int checks = 0, failures = 0;

  barrel_shifter #(.IW(IW)) dut (.din, .s, .dout);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      din = IW'($urandom);
      if (n == 0) din = '1;
      for (int v = 0; v < 4; v++) begin
        longint exp;
        s = 2'(v);
        #1;
        exp = longint'(din) * (longint'(1) << v);
        checks++;
        if (longint'(dout) != exp) begin
          failures++;
          $display("FAIL din=%h s=%0d dout=%h exp=%h", din, s, dout, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
