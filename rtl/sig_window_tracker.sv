// sig_window_tracker: where the frame stands with respect to the signature windows.
//
// Counts the bit times of a frame from its start-of-frame bit (bit 0), stuff bits included,
// since the transceiver never removes stuffing. From bit MOD_START on, every BITS_PER_AUX
// consecutive bits form one window that carries one signature bit, for nsig windows.
// The outputs describe the NEXT bit to be sampled: whether it lies in a window (in_mod),
// which window (win_idx, 0 = first = most significant signature bit), and whether it is the
// last bit of its window (win_last). `clear` restarts the count at the start of a frame; if
// `bit_tick` comes in the same cycle, that tick is bit 0. Shared by the modulator and the
// demodulator so that both ends cut the frame identically. The 1-in-5 rate follows the
// document; counting from bit 13 is this design's reading of "not the arbitration field".
`timescale 1ns / 1ps
module sig_window_tracker
  import can_auth_pkg::*;
#(
  parameter int unsigned MOD_START = MOD_START_BIT
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic       bit_tick,
  input  logic       sig16,       // 1: 16 windows, 0: 8 windows
  output logic       in_mod,
  output logic [3:0] win_idx,
  output logic       win_last,
  output logic       done         // all windows of the signature have passed
);

  logic [6:0] bit_cnt;
  logic [2:0] sub_cnt;
  logic [4:0] win_cnt;
  logic [4:0] nsig;

  assign nsig     = sig16 ? 5'(SIG_MAX_BITS) : 5'(SIG_SHORT_BITS);
  assign in_mod   = (bit_cnt >= 7'(MOD_START)) && (win_cnt < nsig);
  assign win_idx  = win_cnt[3:0];
  assign win_last = (sub_cnt == 3'(BITS_PER_AUX - 1));
  assign done     = (win_cnt >= nsig);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bit_cnt <= '0;
      sub_cnt <= '0;
      win_cnt <= '0;
    end else if (clear) begin
      bit_cnt <= bit_tick ? 7'd1 : 7'd0;
      sub_cnt <= '0;
      win_cnt <= '0;
    end else if (bit_tick) begin
      if (bit_cnt != '1) bit_cnt <= bit_cnt + 1'b1;
      if (in_mod) begin
        if (win_last) begin
          sub_cnt <= '0;
          win_cnt <= win_cnt + 1'b1;
        end else begin
          sub_cnt <= sub_cnt + 1'b1;
        end
      end
    end
  end

endmodule
