// decoder1: turns the TDC1 reading into the clock selection that realigns CLK1.
//
// CLK1 is tap `sel` of the delay line: it rises when the divider count equals sel and falls
// HIGH_TQ later. TDC1 reports `code`, the TQ from the latest CLK1 rise to a data edge, so the
// edge happened at count sel+code (mod N). The document keeps the falling edges of CLK1 on
// the data edges, which puts the rising (sampling) edge in the middle of the bit; the new
// selection is therefore sel + code - HIGH_TQ (mod N). `edge_phase` = sel + code (mod N) is
// the tap whose rising edge coincides with the data edge; at the start of frame it is what
// CLK_SEL2 loads, following the Decoder1-to-CLK_SEL2 connection of the receiver diagram.
// `adjust` flags a reading that moves CLK1. Purely combinational.
`timescale 1ns / 1ps
module decoder1
  import can_auth_pkg::*;
#(
  parameter int unsigned N_TQ    = TQ_PER_BIT,
  parameter int unsigned HIGH_TQ = CLK_HIGH_TQ
) (
  input  logic [$clog2(N_TQ)-1:0] sel,         // current CLK_SEL1 selection
  input  logic [$clog2(N_TQ)-1:0] code,        // TDC1 reading
  output logic [$clog2(N_TQ)-1:0] sel_next,    // CLK_SEL1 selection that realigns CLK1
  output logic [$clog2(N_TQ)-1:0] edge_phase,  // tap aligned with the data edge
  output logic                    adjust
);

  localparam int unsigned CW = $clog2(N_TQ);

  logic [CW:0] sum, back;

  always_comb begin
    sum        = {1'b0, sel} + {1'b0, code};
    if (sum >= (CW+1)'(N_TQ)) sum = sum - (CW+1)'(N_TQ);
    edge_phase = sum[CW-1:0];
    back       = (sum >= (CW+1)'(HIGH_TQ)) ? sum - (CW+1)'(HIGH_TQ)
                                            : sum + (CW+1)'(N_TQ - HIGH_TQ);
    sel_next   = back[CW-1:0];
    adjust     = (code != CW'(HIGH_TQ));
  end

endmodule
