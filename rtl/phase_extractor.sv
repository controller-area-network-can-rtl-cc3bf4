// phase_extractor: receiver back end, recovering the primary data and the signature.
//
// Primary data recovery path: the single-rail receiver output is brought into the local
// 25 MHz domain by two flip-flops. A delay line supplies 25 clocks at 1 MHz spaced 1 TQ;
// CLK_SEL1 picks one as CLK1. TDC1 times every data edge against CLK1 and Decoder1 reloads
// CLK_SEL1 so that the falling edge of CLK1 sits on the edge; its rising edge, half a bit
// later, samples the data (rx_data) and is the recovered clock. Because CLK1 is realigned at
// every edge it follows the 3 TQ modulation shifts, jitter and drift.
// Auxiliary data recovery path: at the start-of-frame edge (first 1->0 edge while idle)
// CLK_SEL2 is loaded once with the tap that rises on that edge and holds it for the frame
// (hard synchronisation). TDC2 times every later edge against CLK2, and the recovery logic
// turns those phases into signature bits. When seven recessive bits in a row end the frame,
// COMP compares the recovered signature with the expected one (latched at the start of
// frame) and raises GO or NO_GO.
// Because CLK2 is not adjusted during the frame, the phase error accumulated against it must
// stay under 1 TQ up to the last edge that decides a signature bit (up to bit 92, 2300 TQ,
// for 16 bits): a clock offset of about +-0.043 % between transmitter and receiver.
// The structure, the 1 TQ resolution, the two clock selectors and the 2 TQ decision follow
// the document. The synchroniser, the SOF/EOF rules, the one-cycle guard after SOF during
// which CLK1 is being re-selected, and the latching of the expected signature are this
// design's choices. Timing: an edge reaches the TDCs two cycles after it arrives on rx_in;
// TDC readings and selector loads take one cycle each; go_nogo/auth_valid are updated one
// cycle after the last recessive bit of the end-of-frame run is sampled.
`timescale 1ns / 1ps
module phase_extractor
  import can_auth_pkg::*;
#(
  parameter int unsigned N_TQ      = TQ_PER_BIT,
  parameter int unsigned MOD_START = MOD_START_BIT
) (
  input  logic clk,           // local 25 MHz clock
  input  logic rst_n,
  input  logic auth_en,
  input  logic sig16,
  input  logic rx_in,         // RX_OUT of the rail converter, 1 = recessive, asynchronous
  input  sig_t sig_expected,  // from the receiver's signature generator
  output logic rx_data,       // recovered primary data
  output logic rx_clk,        // recovered clock CLK1
  output logic rx_bit_valid,  // strobe: rx_data holds a new bit of a frame
  output logic rx_clk2,       // CLK2
  output logic aux_data,      // recovered auxiliary data, latest decision
  output sig_t sig_rec,       // recovered signature
  output logic go_nogo,       // 1 = frame authentic
  output logic auth_valid,    // go_nogo holds a verdict for the last frame
  output sig_t mismatch,      // differing signature bits of the last frame
  output logic frame_active,
  output logic sof,           // start-of-frame edge seen
  output logic eof,           // end of frame
  output logic resync         // CLK1 was moved by Decoder1
);

  localparam int unsigned CW = $clog2(N_TQ);

  // Synchroniser and edge detector.
  logic rx_s1, rx_s2, rx_prev, data_edge;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) {rx_s1, rx_s2, rx_prev} <= 3'b111;
    else        {rx_s1, rx_s2, rx_prev} <= {rx_in, rx_s1, rx_s2};
  end
  assign data_edge = rx_s2 ^ rx_prev;

  // Clock divider / delay line, selectors, TDCs, Decoder1.
  logic [CW-1:0]   tq_cnt, sel1, sel2, tdc1_code, tdc2_code, sel1_next, edge_phase;
  logic [N_TQ-1:0] phase_clk, phase_rise;
  logic            clk1_rise, clk2_rise, tdc1_valid, tdc2_valid, dec_adjust;
  logic            load1, load2;
  rx_state_e       state;

  clk_div_delay_line #(.N_TQ(N_TQ)) u_div (.clk, .rst_n, .tq_cnt, .phase_clk, .phase_rise);

  clk_sel #(.N_TQ(N_TQ)) u_clk_sel1 (
    .clk, .rst_n, .phase_clk, .phase_rise, .load(load1), .sel_in(sel1_next),
    .sel(sel1), .clk_out(rx_clk), .clk_rise(clk1_rise)
  );

  clk_sel #(.N_TQ(N_TQ)) u_clk_sel2 (
    .clk, .rst_n, .phase_clk, .phase_rise, .load(load2), .sel_in(edge_phase),
    .sel(sel2), .clk_out(rx_clk2), .clk_rise(clk2_rise)
  );

  tdc #(.N_TQ(N_TQ)) u_tdc1 (
    .clk, .rst_n, .ref_rise(clk1_rise), .data_edge, .code(tdc1_code), .valid(tdc1_valid)
  );

  tdc #(.N_TQ(N_TQ)) u_tdc2 (
    .clk, .rst_n, .ref_rise(clk2_rise), .data_edge, .code(tdc2_code), .valid(tdc2_valid)
  );

  decoder1 #(.N_TQ(N_TQ)) u_decoder1 (
    .sel(sel1), .code(tdc1_code), .sel_next(sel1_next), .edge_phase, .adjust(dec_adjust)
  );

  assign load1  = tdc1_valid && (state != RX_IDLE);
  assign load2  = tdc1_valid && (state == RX_SOF_SYNC);
  assign resync = load1 && dec_adjust;

  // Frame tracking.
  logic [2:0] rec_run;
  sig_t       sig_exp_q;
  logic       sig16_q;

  assign sof          = (state == RX_IDLE) && data_edge && !rx_s2;
  assign rx_bit_valid = clk1_rise && (state == RX_FRAME);
  assign eof          = rx_bit_valid && rx_s2 && (rec_run == 3'(EOF_RECESSIVE_BITS - 1));
  assign frame_active = (state != RX_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= RX_IDLE;
      rec_run   <= '0;
      rx_data   <= 1'b1;
      sig_exp_q <= '0;
      sig16_q   <= 1'b1;
    end else begin
      if (clk1_rise) rx_data <= rx_s2;
      unique case (state)
        RX_IDLE: if (sof) begin
          state     <= RX_SOF_SYNC;
          rec_run   <= '0;
          sig_exp_q <= sig_expected;
          sig16_q   <= sig16;
        end
        RX_SOF_SYNC: if (tdc1_valid) state <= RX_FRAME;
        RX_FRAME: begin
          if (rx_bit_valid)
            rec_run <= !rx_s2 ? '0 : (rec_run == 3'(EOF_RECESSIVE_BITS - 1)) ? rec_run
                                   : rec_run + 1'b1;
          if (eof) state <= RX_IDLE;
        end
        default: state <= RX_IDLE;
      endcase
    end
  end

  // Auxiliary data recovery and comparator.
  logic       complete;
  logic [4:0] n_rec;

  aux_recovery #(.N_TQ(N_TQ), .MOD_START(MOD_START)) u_aux (
    .clk, .rst_n, .clear(sof), .bit_tick(rx_bit_valid), .sig16(sig16_q),
    .edge_valid(tdc2_valid && (state == RX_FRAME)), .code(tdc2_code),
    .aux_data, .sig_rec, .n_rec, .complete
  );

  sig_comp u_comp (
    .clk, .rst_n, .clear(sof), .eval(eof), .enable(auth_en), .sig16(sig16_q), .complete,
    .sig_rec, .sig_exp(sig_exp_q), .go_nogo, .valid(auth_valid), .mismatch
  );

endmodule
