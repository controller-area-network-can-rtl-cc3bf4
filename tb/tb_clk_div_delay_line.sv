// tb_clk_div_delay_line: checks the 25x divider and the 1 TQ delay line.
// A counter kept by the testbench gives the expected level of every tap,
// ((count - k) mod 25) < 13, and the expected rising strobe, count == k, for 500 cycles;
// it also checks that CLK0 has a period of 25 cycles and tap 3 (CLK0_D) lags it by 3.
`timescale 1ns / 1ps
module tb_clk_div_delay_line;
  localparam int N = 25;
  logic clk = 0, rst_n = 0;
  logic [4:0] tq_cnt;
  logic [N-1:0] phase_clk, phase_rise;
  int checks = 0, failures = 0;
  int cnt, last_rise0, last_rise3;

  clk_div_delay_line dut (.clk, .rst_n, .tq_cnt, .phase_clk, .phase_rise);

  always #20 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    cnt = 0;
    last_rise0 = -1;
    last_rise3 = -1;
    for (int t = 0; t < 500; t++) begin
      #1;
      for (int k = 0; k < N; k++) begin
        checks++;
        if (phase_clk[k] !== ((((cnt - k) % N + N) % N) < 13)) begin
          failures++;
          $display("t=%0d tap %0d level %b", t, k, phase_clk[k]);
        end
        checks++;
        if (phase_rise[k] !== (cnt == k)) begin
          failures++;
          $display("t=%0d tap %0d rise %b", t, k, phase_rise[k]);
        end
      end
      if (phase_rise[0]) begin
        if (last_rise0 >= 0) begin
          checks++;
          if (t - last_rise0 != N) failures++;
        end
        last_rise0 = t;
      end
      if (phase_rise[3]) begin
        checks++;
        if (t - last_rise0 != 3) failures++;
      end
      cnt = (cnt + 1) % N;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
