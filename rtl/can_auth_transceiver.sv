// can_auth_transceiver: CAN transceiver that authenticates every frame over a virtual channel.
//
// A signature is hidden in the timing of the CAN frame: during the payload part of a frame
// the transmitter delays all data edges of five consecutive bits by 3 TQ (120 ns) to send a
// signature '1' and leaves them in place to send a '0'. The shift stays inside the CAN jitter
// budget, so plain nodes on the same bus still read the frame (if they sample no later than
// about 80 % of the bit, since a bit shrinks to 22 TQ where the signature goes from 1 to 0),
// while an equipped receiver measures the edge phases, rebuilds the 8- or 16-bit signature
// and compares it with the one its own signature generator expects, giving GO or NO_GO at
// the end of the frame.
//
// Transmit path: sig_gen (TX) -> phase_modulator -> TX_IN -> tx_rail_converter -> CANH/CANL.
// Receive path: CANH/CANL -> rx_rail_converter -> RX_OUT -> phase_extractor, whose expected
// signature comes from sig_gen (RX). Both generators take the host's broadcast seed;
// each is stepped by its own command. With sig_ext_en the host supplies the signatures
// instead (the document allows the signature source to sit in the host). With auth_en low
// the transceiver behaves as a plain one: no modulation, no verdict.
// The bus side is split into what this node drives (drive, canh_drv_mv, canl_drv_mv) and the
// resolved bus voltages it sees (canh_mv, canl_mv); the cable and termination are outside.
// All logic runs on the local 25 MHz clock (1 TQ per cycle); frames run at 1 Mb/s.
// The host should change tx_data in the cycle tx_launch is high. sig16 is taken at reset.
// While the receiver is inside another node's frame, tx_data reaches the bus directly (own
// choice), so the host's acknowledgement bit keeps the timing the host gave it.
`timescale 1ns / 1ps
module can_auth_transceiver
  import can_auth_pkg::*;
(
  input  logic        clk,            // local 25 MHz clock
  input  logic        rst_n,
  input  logic        cfg_sig16,      // signature length, sampled while in reset
  input  logic        cfg_auth_en,    // 0: behave as an unequipped transceiver
  // signature source
  input  logic        sig_seed_load,  // broadcast seed for both generators
  input  sig_t        sig_seed,
  input  logic        tx_sig_advance, // step the TX generator
  input  logic        rx_sig_advance, // step the RX generator
  input  logic        sig_ext_en,     // use the host's signatures below
  input  sig_t        tx_sig_ext,
  input  sig_t        rx_sig_ext,
  // host side, transmit
  input  logic        tx_data,        // primary data (TXD), 1 = recessive
  output logic        tx_clk0,        // CLK0
  output logic        tx_launch,      // CLK0 falling edge: change tx_data now
  output logic        tx_aux,         // signature bit being modulated
  output logic        tx_in_mon,      // TX_IN, the modulated stream
  // bus side
  output logic        can_drive,
  output logic [11:0] canh_drv_mv,
  output logic [11:0] canl_drv_mv,
  input  logic [11:0] canh_mv,
  input  logic [11:0] canl_mv,
  // host side, receive
  output logic        rx_out_mon,     // RX_OUT, the single-rail received stream
  output logic        rx_data,        // recovered primary data
  output logic        rx_clk,         // recovered clock
  output logic        rx_bit_valid,
  output logic        rx_aux_data,    // recovered auxiliary data
  output sig_t        rx_sig,         // recovered signature
  output sig_t        rx_sig_expected,
  output logic        go_nogo,
  output logic        auth_valid,
  output logic        rx_frame_active,
  output logic        rx_resync       // CLK1 realigned (soft synchronisation)
);

  // Signature length: captured at every clock edge while reset is held, then frozen.
  logic sig16_q;
  always_ff @(posedge clk) begin
    if (!rst_n) sig16_q <= cfg_sig16;
  end

  sig_t tx_sig_int, rx_sig_int, tx_state, rx_state, tx_sig;

  sig_gen u_sig_gen_tx (
    .clk, .rst_n, .seed_load(sig_seed_load), .seed(sig_seed), .advance(tx_sig_advance),
    .sig(tx_sig_int), .state(tx_state)
  );

  sig_gen u_sig_gen_rx (
    .clk, .rst_n, .seed_load(sig_seed_load), .seed(sig_seed), .advance(rx_sig_advance),
    .sig(rx_sig_int), .state(rx_state)
  );

  assign tx_sig          = sig_ext_en ? tx_sig_ext : tx_sig_int;
  assign rx_sig_expected = sig_ext_en ? rx_sig_ext : rx_sig_int;

  logic tx_en, tx_frame_active;

  phase_modulator u_mod (
    .clk, .rst_n, .auth_en(cfg_auth_en), .sig16(sig16_q), .sig(tx_sig), .tx_data,
    .bus_busy(rx_frame_active), .tx_mod(tx_in_mon), .tx_en, .clk0(tx_clk0),
    .launch_strobe(tx_launch), .aux_bit(tx_aux),
    .frame_active(tx_frame_active)
  );

  tx_rail_converter u_tx_rail (
    .tx_in(tx_in_mon), .en(tx_en), .drive(can_drive), .canh_mv(canh_drv_mv),
    .canl_mv(canl_drv_mv)
  );

  rx_rail_converter u_rx_rail (.canh_mv, .canl_mv, .rx_out(rx_out_mon));

  logic rx_clk2, rx_sof, rx_eof;
  sig_t rx_mismatch;

  phase_extractor u_ext (
    .clk, .rst_n, .auth_en(cfg_auth_en), .sig16(sig16_q), .rx_in(rx_out_mon),
    .sig_expected(rx_sig_expected), .rx_data, .rx_clk, .rx_bit_valid, .rx_clk2,
    .aux_data(rx_aux_data), .sig_rec(rx_sig), .go_nogo, .auth_valid, .mismatch(rx_mismatch),
    .frame_active(rx_frame_active), .sof(rx_sof), .eof(rx_eof), .resync(rx_resync)
  );

endmodule
