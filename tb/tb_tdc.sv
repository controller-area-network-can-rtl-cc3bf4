// tb_tdc: checks the 25-stage TDC.
// A reference clock rises every 25 cycles; one data edge is placed at a random delay of
// 0..24 TQ after a rising edge and the reading must equal that delay, one cycle later.
// Fig.-6-style sweep: every delay 0..24 is also visited in order.
`timescale 1ns / 1ps
module tb_tdc;
  logic clk = 0, rst_n = 0;
  logic ref_rise = 0, data_edge = 0;
  logic [4:0] code;
  logic valid;
  int checks = 0, failures = 0;

  tdc dut (.clk, .rst_n, .ref_rise, .data_edge, .code, .valid);

  always #20 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one_period(input int d);
    int got;
    bit seen;
    seen = 0;
    for (int c = 0; c < 25; c++) begin
      @(negedge clk);
      ref_rise  = (c == 0);
      data_edge = (c == d);
      @(posedge clk);
      #1;
      if (valid) begin
        seen = 1;
        got  = int'(code);
      end
    end
    @(negedge clk);
    ref_rise = 0; data_edge = 0;
    checks++;
    if (!seen || got != d) begin
      failures++;
      $display("delay %0d read %0d (seen %0b)", d, got, seen);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int d = 0; d < 25; d++) one_period(d);
    for (int i = 0; i < 200; i++) one_period($urandom_range(0, 24));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
