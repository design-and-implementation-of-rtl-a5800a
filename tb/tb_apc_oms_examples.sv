// tb_apc_oms_examples: replays the example values known from the reference
// simulation of the multiplier's parts, with the coefficient A = 1, and
// checks the internal signals of apc_oms_mult:
//   address mapping  X = 00, 02, 06, 07  ->  X' = 0, E, A, 9
//   word selects     w6, w7, w3          ->  LUT words 13, 15, 7
//   control          X = 10  -> RESET = 1, s = 3
//                    X = 14  -> RESET = 0, s = 2, d = 0
// and that the final products equal X.
module tb_apc_oms_examples;
  import apc_oms_pkg::*;
  logic clk = 0, rst_n = 0, load = 0, clr = 0, ready;
  logic [7:0]  a = 8'd1;
  logic [4:0]  x = '0;
  logic [12:0] p;
  int checks = 0, failures = 0;

  apc_oms_mult dut (.clk, .rst_n, .load, .a, .ready, .clr, .x, .p);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
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
    load = 1;
    @(negedge clk);
    load = 0;
    wait (ready);
    @(negedge clk);

    x = 5'h00; #1; chk(dut.xp == 4'h0, "X=00 -> X'=0");
    x = 5'h02; #1; chk(dut.xp == 4'hE, "X=02 -> X'=E");
    x = 5'h06; #1; chk(dut.xp == 4'hA, "X=06 -> X'=A");
    x = 5'h07; #1; chk(dut.xp == 4'h9, "X=07 -> X'=9");

    x = 5'b11101; #1;
    chk(dut.w == 9'b001000000 && dut.lut_q == 12'd13, "w6 -> 13");
    x = 5'b11111; #1;
    chk(dut.w == 9'b010000000 && dut.lut_q == 12'd15, "w7 -> 15");
    x = 5'b10111; #1;
    chk(dut.w == 9'b000001000 && dut.lut_q == 12'd7, "w3 -> 7");

    x = 5'h10; #1;
    chk(dut.lut_reset == 1'b1 && dut.s == 2'd3, "X=10 -> RESET, s=3");
    x = 5'h14; #1;
    chk(dut.lut_reset == 1'b0 && dut.s == 2'd2 && dut.d == 4'h0,
        "X=14 -> s=2, d=0");

    for (int v = 0; v < 32; v++) begin
      x = 5'(v); #1;
      chk(p == 13'(v), $sformatf("1*%0d = %0d", v, p));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
