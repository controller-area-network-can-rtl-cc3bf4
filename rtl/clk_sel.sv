// clk_sel: selects one of the N phase-shifted 1 MHz clocks (CLK_SEL1 / CLK_SEL2).
//
// A selection register picks tap `sel` of the delay line; the selected clock and its rising
// strobe are passed on. A new selection is loaded with `load`/`sel_in` and takes effect in the
// next cycle. CLK_SEL1 is reloaded by Decoder1 at every data edge of a frame; CLK_SEL2 is
// loaded once per frame, at the start-of-frame edge, and then held. The document names both
// selectors and what they align; the register-plus-multiplexer form and the reset value
// (tap 0) are this design's choice.
`timescale 1ns / 1ps
module clk_sel
  import can_auth_pkg::*;
#(
  parameter int unsigned N_TQ = TQ_PER_BIT
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [N_TQ-1:0]         phase_clk,
  input  logic [N_TQ-1:0]         phase_rise,
  input  logic                    load,
  input  logic [$clog2(N_TQ)-1:0] sel_in,
  output logic [$clog2(N_TQ)-1:0] sel,
  output logic                    clk_out,     // selected 1 MHz clock
  output logic                    clk_rise     // strobe: selected clock rises in this cycle
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    sel <= '0;
    else if (load) sel <= sel_in;
  end

  assign clk_out  = phase_clk[sel];
  assign clk_rise = phase_rise[sel];

  // A selection outside the delay line would leave the clock stuck.
  a_sel_in_range: assert property (@(posedge clk) disable iff (!rst_n)
                                   load |-> (int'(sel_in) < int'(N_TQ)));

endmodule
