// tb_clk_sel: checks the 25:1 clock selector against a model of the 25 phase clocks.
// Loads random selections and checks for 1000 cycles that the output clock and its rising
// strobe equal the chosen tap, and that a load takes effect in the following cycle.
`timescale 1ns / 1ps
module tb_clk_sel;
  localparam int N = 25;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] phase_clk, phase_rise;
  logic load;
  logic [4:0] sel_in, sel;
  logic clk_out, clk_rise;
  int checks = 0, failures = 0;
  int cnt, exp_sel;

  clk_sel dut (.clk, .rst_n, .phase_clk, .phase_rise, .load, .sel_in, .sel, .clk_out, .clk_rise);

  always #20 clk = ~clk;

  always_comb
    for (int k = 0; k < N; k++) begin
      phase_clk[k]  = ((((cnt - k) % N + N) % N) < 13);
      phase_rise[k] = (cnt == k);
    end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cnt = 0; load = 0; sel_in = 0; exp_sel = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      checks++;
      if (sel !== 5'(exp_sel) || clk_out !== phase_clk[exp_sel] || clk_rise !== (cnt == exp_sel)) begin
        failures++;
        $display("t=%0d sel=%0d exp=%0d", t, sel, exp_sel);
      end
      load   = ($urandom_range(0, 9) == 0);
      sel_in = 5'($urandom_range(0, N - 1));
      @(posedge clk);
      #1;
      if (load) exp_sel = int'(sel_in);
      cnt = (cnt + 1) % N;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
