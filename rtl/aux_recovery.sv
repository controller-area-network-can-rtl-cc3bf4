// aux_recovery: auxiliary data recovery logic, the receiver's phase demodulator.
//
// TDC2 reports, for every data edge, the TQ between the latest CLK2 rising edge and the edge.
// CLK2 is locked to the start-of-frame edge, so an unshifted edge reads about 0 and an edge
// shifted by the transmitter reads about 3. Readings above N_TQ/2 are taken as early edges
// (negative phase, from clock drift). Following the document, a phase below 2 TQ decodes as
// '0' and 2 TQ or more as '1'. The first edge of each five-bit window decides that window's
// signature bit (this design's choice; the document does not say which edge is used); when
// the last bit of the window is sampled the bit is shifted into sig_rec, most significant
// bit first. A window without an edge, which correct bit stuffing rules out, yields '0'.
// aux_data shows the latest decision as a serial signal. `clear` at the start of frame
// empties the register. complete is set once all 8 or 16 windows have been collected.
`timescale 1ns / 1ps
module aux_recovery
  import can_auth_pkg::*;
#(
  parameter int unsigned N_TQ      = TQ_PER_BIT,
  parameter int unsigned THRESH_TQ = AUX_THRESHOLD_TQ,
  parameter int unsigned MOD_START = MOD_START_BIT
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,       // start of frame
  input  logic                    bit_tick,    // CLK1 sampled a bit of the frame
  input  logic                    sig16,
  input  logic                    edge_valid,  // TDC2 reading available
  input  logic [$clog2(N_TQ)-1:0] code,        // TDC2 reading
  output logic                    aux_data,
  output sig_t                    sig_rec,
  output logic [4:0]              n_rec,       // windows collected
  output logic                    complete
);

  logic       in_mod, win_last, win_done, win_seen, win_val, decision, win_bit;
  logic [3:0] win_idx;

  sig_window_tracker #(.MOD_START(MOD_START)) u_win (
    .clk, .rst_n, .clear, .bit_tick, .sig16,
    .in_mod, .win_idx, .win_last, .done(win_done)
  );

  assign decision = (int'(code) >= int'(THRESH_TQ)) && (int'(code) <= int'(N_TQ / 2));
  assign win_bit  = win_seen ? win_val : (edge_valid && decision);
  assign complete = win_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      aux_data <= 1'b0;
      sig_rec  <= '0;
      n_rec    <= '0;
      win_seen <= 1'b0;
      win_val  <= 1'b0;
    end else if (clear) begin
      sig_rec  <= '0;
      n_rec    <= '0;
      win_seen <= 1'b0;
      win_val  <= 1'b0;
    end else begin
      if (edge_valid && in_mod && !win_seen) begin
        win_seen <= 1'b1;
        win_val  <= decision;
        aux_data <= decision;
      end
      if (bit_tick && in_mod && win_last) begin
        sig_rec  <= {sig_rec[SIG_MAX_BITS-2:0], win_bit};
        n_rec    <= n_rec + 1'b1;
        win_seen <= 1'b0;
      end
    end
  end

endmodule
