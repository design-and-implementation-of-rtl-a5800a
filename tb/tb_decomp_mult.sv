// tb_decomp_mult: operand decomposition at the word sizes 8, 16 and 32
// (coefficient and input of equal width). Each instance loads random
// coefficients and multiplies them by random and corner-case inputs; the
// result must equal A*X exactly.
module tb_decomp_mult;
  logic clk = 0, rst_n = 0, load = 0, clr = 0;
  logic [7:0]  a8 = '0,  x8 = '0;
  logic [15:0] a16 = '0, x16 = '0;
  logic [31:0] a32 = '0, x32 = '0;
  logic [15:0] p8;
  logic [31:0] p16;
  logic [63:0] p32;
  logic        r8, r16, r32;
  int checks = 0, failures = 0;

  decomp_mult #(.W(8),  .XW(8))  u8  (.clk, .rst_n, .load, .a(a8),  .ready(r8),  .clr, .x(x8),  .p(p8));
  decomp_mult #(.W(16), .XW(16)) u16 (.clk, .rst_n, .load, .a(a16), .ready(r16), .clr, .x(x16), .p(p16));
  decomp_mult #(.W(32), .XW(32)) u32 (.clk, .rst_n, .load, .a(a32), .ready(r32), .clr, .x(x32), .p(p32));

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
    for (int n = 0; n < 30; n++) begin
      int cyc;
      @(negedge clk);
      a8  = (n == 0) ? '1 : 8'($urandom);
      a16 = (n == 0) ? '1 : 16'($urandom);
      a32 = (n == 0) ? '1 : $urandom;
      load = 1;
      @(negedge clk);
      load = 0;
      cyc = 0;
      while (!(r8 && r16 && r32) && cyc < 30) begin
        @(negedge clk);
        cyc++;
      end
      chk(cyc == 9, $sformatf("load took %0d cycles", cyc));
      for (int k = 0; k < 100; k++) begin
        x8  = (k == 0) ? '1 : (k == 1) ? '0 : 8'($urandom);
        x16 = (k == 0) ? '1 : (k == 1) ? '0 : 16'($urandom);
        x32 = (k == 0) ? '1 : (k == 1) ? '0 : $urandom;
        #1;
        chk(p8  == 16'(a8) * 16'(x8), $sformatf("8-bit %0d*%0d=%0d", a8, x8, p8));
        chk(p16 == 32'(a16) * 32'(x16), $sformatf("16-bit %0d*%0d=%0d", a16, x16, p16));
        chk(p32 == 64'(a32) * 64'(x32), $sformatf("32-bit %0d*%0d=%0d", a32, x32, p32));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
