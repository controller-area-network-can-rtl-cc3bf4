// tdc: 25-stage time-to-digital converter with a resolution of one TQ (40 ns).
//
// It measures the time from the latest rising edge of its reference clock (CLK1 for TDC1,
// CLK2 for TDC2) to a transition of the received data. A stage counter restarts at 0 in the
// cycle where the reference rises and advances by one per TQ, stopping at the last of the
// N_TQ stages; a data edge latches the count. `code` and the one-cycle `valid` strobe appear
// one cycle after the edge was presented. An edge in the same cycle as the reference rising
// edge reads 0. The document gives the resolution, the 25 stages and what is measured; the
// counter form is this design's choice.
`timescale 1ns / 1ps
module tdc
  import can_auth_pkg::*;
#(
  parameter int unsigned N_TQ = TQ_PER_BIT
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    ref_rise,   // reference clock rises in this cycle
  input  logic                    data_edge,  // received data changed in this cycle
  output logic [$clog2(N_TQ)-1:0] code,       // TQ from reference rise to data edge
  output logic                    valid
);

  localparam int unsigned CW = $clog2(N_TQ);

  logic [CW-1:0] stage_q, stage_now;

  always_comb begin
    if (ref_rise)                            stage_now = '0;
    else if (stage_q == CW'(N_TQ - 1))       stage_now = stage_q;
    else                                     stage_now = stage_q + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage_q <= CW'(N_TQ - 1);
      code    <= '0;
      valid   <= 1'b0;
    end else begin
      stage_q <= stage_now;
      valid   <= data_edge;
      if (data_edge) code <= stage_now;
    end
  end

endmodule
