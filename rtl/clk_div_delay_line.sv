// clk_div_delay_line: 25x clock divider followed by a tapped delay line of 1 TQ cells.
//
// The local 25 MHz clock (one TQ per cycle) drives a modulo-N counter whose output is the
// 1 MHz clock CLK0 (high for HIGH_TQ cycles, low for the rest). CLK0 then runs through a chain
// of N-1 one-TQ delay cells, so tap k is CLK0 delayed by k TQ: 25 clocks at 1 MHz spaced 40 ns
// apart, as the document asks for in both the transmitter (CLK0 and its 3 TQ delayed copy
// CLK0_D) and the receiver (the clock source of CLK_SEL1 and CLK_SEL2). The delay cells are
// flip-flops clocked by the local clock; their reset values put the line in the state it has
// when the counter is 0, so from reset on tap k rises exactly in the cycle where tq_cnt == k.
//
// phase_rise[k] is a one-cycle strobe in the cycle where tap k has just risen. Using the
// strobes as clock enables keeps the whole transceiver on the single local clock, which is
// this design's choice; the document does not say how the taps are built.
`timescale 1ns / 1ps
module clk_div_delay_line
  import can_auth_pkg::*;
#(
  parameter int unsigned N_TQ    = TQ_PER_BIT,
  parameter int unsigned HIGH_TQ = CLK_HIGH_TQ
) (
  input  logic                    clk,
  input  logic                    rst_n,
  output logic [$clog2(N_TQ)-1:0] tq_cnt,      // divider count, 0..N_TQ-1
  output logic [N_TQ-1:0]         phase_clk,   // tap k: CLK0 delayed by k TQ
  output logic [N_TQ-1:0]         phase_rise   // tap k rises in this cycle
);

  localparam int unsigned CW = $clog2(N_TQ);

  logic [N_TQ-1:1] taps_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tq_cnt <= '0;
      for (int unsigned k = 1; k < N_TQ; k++) taps_q[k] <= ((N_TQ - k) < HIGH_TQ);
    end else begin
      tq_cnt <= (tq_cnt == CW'(N_TQ - 1)) ? '0 : tq_cnt + 1'b1;
      taps_q[1] <= phase_clk[0];
      for (int unsigned k = 2; k < N_TQ; k++) taps_q[k] <= taps_q[k-1];
    end
  end

  always_comb begin
    phase_clk[0] = (tq_cnt < CW'(HIGH_TQ));
    phase_clk[N_TQ-1:1] = taps_q;
    // Tap k+1 holds what tap k was one TQ ago; CLK0 is periodic in N_TQ, so the value tap N-1
    // had one TQ ago equals tap 0 now.
    for (int unsigned k = 0; k < N_TQ - 1; k++) phase_rise[k] = phase_clk[k] & ~phase_clk[k+1];
    phase_rise[N_TQ-1] = phase_clk[N_TQ-1] & ~phase_clk[0];
  end

endmodule
