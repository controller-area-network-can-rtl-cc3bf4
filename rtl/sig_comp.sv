// sig_comp: COMP, the bit-parallel signature comparator that produces GO/NO_GO.
//
// At the end of a received frame (`eval`), the recovered signature is compared bit by bit
// with the expected one from the receiver's signature generator: all 16 bits in 16-bit mode,
// the low 8 bits in 8-bit mode. GO (go_nogo = 1) needs authentication enabled, every window
// of the signature received, and no differing bit. The verdict and the differing bits are
// registered one cycle after `eval` and held until `clear` (the next start of frame). The
// comparison itself is the document's; holding the verdict and the "all windows received"
// condition are this design's choices.
`timescale 1ns / 1ps
module sig_comp
  import can_auth_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic eval,
  input  logic enable,
  input  logic sig16,
  input  logic complete,
  input  sig_t sig_rec,
  input  sig_t sig_exp,
  output logic go_nogo,     // 1 = GO
  output logic valid,       // verdict available
  output sig_t mismatch     // bits that differ
);

  sig_t mask, diff;

  assign mask = sig16 ? '1 : sig_t'({SIG_SHORT_BITS{1'b1}});
  assign diff = (sig_rec ^ sig_exp) & mask;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      go_nogo  <= 1'b0;
      valid    <= 1'b0;
      mismatch <= '0;
    end else if (clear) begin
      go_nogo  <= 1'b0;
      valid    <= 1'b0;
      mismatch <= '0;
    end else if (eval) begin
      go_nogo  <= enable && complete && (diff == '0);
      valid    <= enable;
      mismatch <= diff;
    end
  end

endmodule
