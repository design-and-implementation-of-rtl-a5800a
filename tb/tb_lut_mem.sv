// tb_lut_mem: writes random words through the write port, reads every word
// back with its one-hot select, and checks that RESET and an all-zero
// select give 0 and that reset clears the contents.
module tb_lut_mem;
  import apc_oms_pkg::*;
  localparam int W = 8;
  logic clk = 0, rst_n = 0, we = 0, reset = 0;
  logic [3:0]   waddr = '0;
  logic [W+3:0] wdata = '0, q;
  logic [8:0]   w = '0;
  logic [W+3:0] model [9];
  int checks = 0, failures = 0;

  lut_mem #(.W(W)) dut (.clk, .rst_n, .we, .waddr, .wdata, .w, .reset, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int i = 0; i < 9; i++) begin
      w = 9'(1 << i);
      reset = 1'b0;
      #1;
      checks++;
      if (q !== model[i]) begin
        failures++;
        $display("FAIL word %0d q=%h exp=%h", i, q, model[i]);
      end
      reset = 1'b1;
      #1;
      checks++;
      if (q !== '0) begin
        failures++;
        $display("FAIL word %0d not cleared by RESET", i);
      end
    end
    reset = 1'b0;
    w = '0;
    #1;
    checks++;
    if (q !== '0) begin
      failures++;
      $display("FAIL no select q=%h", q);
    end
  endtask

  initial begin
    for (int i = 0; i < 9; i++) model[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check_all();
    for (int round = 0; round < 4; round++) begin
      for (int i = 0; i < 9; i++) begin
        @(negedge clk);
        we = 1; waddr = 4'(i); wdata = (W+4)'($urandom);
        model[i] = wdata;
      end
      @(negedge clk);
      we = 0;
      // a write to an address outside the LUT must change nothing
      we = 1; waddr = 4'd12; wdata = '1;
      @(negedge clk);
      we = 0;
      check_all();
    end
    rst_n = 0;
    #1;
    for (int i = 0; i < 9; i++) model[i] = '0;
    rst_n = 1;
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
