// can_bit_timing_rx: testbench model of the receive bit timing of a conventional CAN node.
//
// Used to show that frames sent by the authenticating transceiver are still read correctly by
// a node without it, for which the 3 TQ shifts are only jitter. It follows the usual CAN bit
// timing rules, not the authenticating receiver:
//   * a bit is N_TQ time quanta long and is sampled at quantum SAMPLE_TQ (counted from the
//     synchronisation segment, quantum 0);
//   * while the bus is idle, a recessive-to-dominant edge is a start of frame and
//     hard-synchronises the bit counter;
//   * inside a frame only recessive-to-dominant edges after a recessive sample resynchronise,
//     by at most SJW quanta: an edge after quantum 0 but before the sample point lengthens
//     the current bit, and an edge after the sample point shortens it;
//   * seven recessive samples in a row end the frame.
// Interface: rx is the node's receive pin (1 = recessive), sampled once per clk (one quantum);
// bit_valid pulses for one cycle with bit_val holding a sampled bit of the frame (stuff bits
// included). frame_active is high from the start of frame to the end-of-frame run.
`timescale 1ns / 1ps
module can_bit_timing_rx #(
  parameter int unsigned N_TQ      = 25,
  parameter int unsigned SAMPLE_TQ = 20,
  parameter int unsigned SJW       = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic rx,
  output logic bit_valid,
  output logic bit_val,
  output logic frame_active
);

  logic       rx_q, rx_prev, last_sample;
  int         cnt, rec_run;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_q         <= 1'b1;
      rx_prev      <= 1'b1;
      last_sample  <= 1'b1;
      cnt          <= 0;
      rec_run      <= 0;
      bit_valid    <= 1'b0;
      bit_val      <= 1'b1;
      frame_active <= 1'b0;
    end else begin
      rx_q      <= rx;
      rx_prev   <= rx_q;
      bit_valid <= 1'b0;
      if (!frame_active) begin
        // hard synchronisation: this quantum is the synchronisation segment of bit 0
        if (rx_prev && !rx_q) begin
          frame_active <= 1'b1;
          cnt          <= 1;
          rec_run      <= 0;
          last_sample  <= 1'b1;
        end
      end else begin
        int nxt;
        nxt = (cnt == int'(N_TQ) - 1) ? 0 : cnt + 1;
        if (rx_prev && !rx_q && last_sample && cnt != 0) begin
          if (cnt <= int'(SAMPLE_TQ)) begin
            // late edge: lengthen the phase before the sample point
            nxt = cnt + 1 - ((cnt < int'(SJW)) ? cnt : int'(SJW));
          end else if (int'(N_TQ) - cnt <= int'(SJW)) begin
            // early edge within reach: this quantum starts the next bit
            nxt = 1;
          end else begin
            nxt = (cnt + 1 + int'(SJW)) % int'(N_TQ);
          end
        end
        if (cnt == int'(SAMPLE_TQ)) begin
          bit_valid   <= 1'b1;
          bit_val     <= rx_q;
          last_sample <= rx_q;
          if (rx_q) begin
            if (rec_run == 6) frame_active <= 1'b0;
            rec_run <= rec_run + 1;
          end else begin
            rec_run <= 0;
          end
        end
        cnt <= nxt;
      end
    end
  end

endmodule
