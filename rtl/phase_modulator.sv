// phase_modulator: transmitter side of the virtual auxiliary channel.
//
// A 25x divider and delay line give CLK0 (1 MHz) and CLK0_D, the same clock 3 TQ (120 ns)
// later. A D flip-flop re-samples the primary (CAN frame) data on CLKM, which is CLK0 when the
// current signature bit is 0 and CLK0_D when it is 1, so every data edge in a window is sent
// either on time or 3 TQ late. Each signature bit spans five CAN bits, which the bit-stuffing
// rule guarantees to hold at least one edge. Bits before MOD_START (start of frame and the
// arbitration field) and everything after the last window are sent unshifted. The document
// gives this structure; the following are this design's choices:
//   * The multiplexer select is latched at each CLK0 rising edge, so CLKM rises once per bit
//     and never twice when the signature bit changes between the two candidate edges.
//   * The frame is found in the data itself: while idle, the first dominant (0) sample is the
//     start of frame; seven recessive samples in a row end it. The signature is latched at
//     the start of frame.
//   * EN (driver enable of the rail converter) is high from the start of frame to its end.
//   * While the local receiver is inside a frame sent by another node (bus_busy) and this
//     modulator is not sending, tx_data goes straight to tx_mod and EN drives only its dominant
//     bits. This is how a receiving node's acknowledgement (or error flag) reaches the bus at
//     the time its controller chose instead of being re-timed to CLK0, and it keeps such a
//     dominant bit from being taken for a start of frame.
//   * The data source should change tx_data at launch_strobe (CLK0 falling edge, TQ 13), which
//     keeps it stable around both sampling points (TQ 0 and TQ 3).
// Timing: tx_mod changes in the cycle after the CLKM rising strobe, i.e. at divider count 1
// (unshifted) or 4 (shifted); bit times are 25 TQ, 28 TQ when the signature goes 0->1 and
// 22 TQ when it goes 1->0. With auth_en low the output is the unmodulated stream. In the
// pass-through case tx_mod and tx_en follow tx_data combinationally.
`timescale 1ns / 1ps
module phase_modulator
  import can_auth_pkg::*;
#(
  parameter int unsigned N_TQ      = TQ_PER_BIT,
  parameter int unsigned DELAY_TQ  = MOD_DELAY_TQ,
  parameter int unsigned MOD_START = MOD_START_BIT
) (
  input  logic       clk,            // local 25 MHz clock, one TQ per cycle
  input  logic       rst_n,
  input  logic       auth_en,        // 0: behave as a plain transceiver
  input  logic       sig16,          // 1: 16-bit signature, 0: 8-bit (low byte)
  input  sig_t       sig,            // signature for the next frame
  input  logic       tx_data,        // primary data, 1 = recessive
  input  logic       bus_busy,       // local receiver is inside a frame
  output logic       tx_mod,         // modulated primary data (TX_IN of the rail converter)
  output logic       tx_en,          // EN of the rail converter
  output logic       clk0,           // CLK0, 1 MHz
  output logic       launch_strobe,  // CLK0 falls in this cycle
  output logic       aux_bit,        // signature bit being sent (CLKM select)
  output logic       frame_active
);

  logic [$clog2(N_TQ)-1:0] tq_cnt;
  logic [N_TQ-1:0]         phase_clk, phase_rise;

  clk_div_delay_line #(.N_TQ(N_TQ)) u_div (
    .clk, .rst_n, .tq_cnt, .phase_clk, .phase_rise
  );

  logic       in_mod, win_last, win_done;
  logic [3:0] win_idx;
  logic       sample, sof, eof, mux_sel_q, aux_next;
  logic [2:0] rec_run;
  logic       tx_q, en_q, pass;
  sig_t       sig_q;

  assign clk0          = phase_clk[0];
  assign launch_strobe = phase_clk[CLK_HIGH_TQ-1] & ~phase_clk[CLK_HIGH_TQ];

  // Signature bit for the next bit to be sampled, most significant bit of the word first.
  always_comb begin
    logic [3:0] bit_pos;
    bit_pos  = (sig16 ? 4'(SIG_MAX_BITS - 1) : 4'(SIG_SHORT_BITS - 1)) - win_idx;
    aux_next = auth_en && frame_active && in_mod && sig_q[bit_pos];
  end

  // CLKM: CLK0 or CLK0_D, select latched at the CLK0 rising edge.
  assign sample = mux_sel_q ? phase_rise[DELAY_TQ] : (phase_rise[0] && !aux_next);

  assign sof = sample && !frame_active && !tx_data && !bus_busy;

  // not sending while another node's frame is on the bus: follow tx_data directly
  assign pass   = bus_busy && !frame_active;
  assign tx_mod = pass ? tx_data : tx_q;
  assign tx_en  = pass ? !tx_data : en_q;
  assign eof = sample && frame_active && tx_data && (rec_run == 3'(EOF_RECESSIVE_BITS - 1));

  sig_window_tracker #(.MOD_START(MOD_START)) u_win (
    .clk, .rst_n, .clear(sof), .bit_tick(sample), .sig16,
    .in_mod, .win_idx, .win_last, .done(win_done)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_q         <= 1'b1;
      en_q         <= 1'b0;
      frame_active <= 1'b0;
      mux_sel_q    <= 1'b0;
      aux_bit      <= 1'b0;
      rec_run      <= '0;
      sig_q        <= '0;
    end else begin
      if (phase_rise[0]) begin
        mux_sel_q <= aux_next;
        aux_bit   <= aux_next;
      end else if (sample) begin
        mux_sel_q <= 1'b0;
      end
      if (sample) begin
        tx_q    <= tx_data;
        rec_run <= tx_data ? ((rec_run == 3'(EOF_RECESSIVE_BITS - 1)) ? rec_run : rec_run + 1'b1)
                           : '0;
        if (sof) begin
          frame_active <= 1'b1;
          en_q         <= 1'b1;
          sig_q        <= sig;
        end else if (eof) begin
          frame_active <= 1'b0;
          en_q         <= 1'b0;
        end
      end
    end
  end

  // CLKM rises exactly once per bit period.
  a_one_sample_per_bit: assert property (@(posedge clk) disable iff (!rst_n)
                                         sample |=> !sample [*N_TQ-DELAY_TQ-1]);

endmodule
