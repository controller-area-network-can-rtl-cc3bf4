// tb_phase_extractor: checks the receiver back end on modulated CAN frames.
// The testbench draws the single-rail waveform a modulating transmitter would produce, with
// its own bit clock: bit k starts at t0 + k x 1 us (scaled by a frequency offset) and its
// edge is 120 ns late when bit k lies in a window carrying a signature '1'. A random start
// phase against the receiver clock and up to +-10 ns of jitter per edge are added. Checks:
// every bit of the frame is recovered, CLK1 was realigned, the recovered signature equals
// the sent one, and GO/NO_GO is GO with the right expected signature, NO_GO with a wrong one,
// NO_GO for an unmodulated frame, and absent with authentication off. 8- and 16-bit modes.
`timescale 1ns / 1ps
module tb_phase_extractor;
  import can_frame_pkg::*;
  logic clk = 0, rst_n = 0;
  logic auth_en = 1, sig16 = 1, rx_in = 1;
  logic [15:0] sig_expected, sig_rec, mismatch;
  logic rx_data, rx_clk, rx_bit_valid, rx_clk2, aux_data, go_nogo, auth_valid;
  logic frame_active, sof, eof, resync;
  int checks = 0, failures = 0;

  phase_extractor dut (.clk, .rst_n, .auth_en, .sig16, .rx_in, .sig_expected, .rx_data, .rx_clk,
                       .rx_bit_valid, .rx_clk2, .aux_data, .sig_rec, .go_nogo, .auth_valid,
                       .mismatch, .frame_active, .sof, .eof, .resync);

  always #20 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit got[$];
  int n_resync;
  logic valid_q = 0;
  always @(posedge clk) begin
    if (valid_q) got.push_back(rx_data);
    valid_q <= rx_bit_valid;
    if (resync) n_resync++;
  end

  // Sends one frame; tx_sig is modulated when modulate is set; exp_go is the verdict wanted.
  task automatic frame(input bit [15:0] tx_sig, input bit [15:0] exp_sig, input bit s16,
                       input bit modulate, input bit ae, input real drift, input bit exp_go);
    frame_q_t fr;
    realtime t0, te;
    int end_idx;
    bit ok;
    fr = build_frame(11'($urandom), 8, {$urandom, $urandom});
    sig_expected = exp_sig;
    auth_en = ae;
    got.delete();
    n_resync = 0;
    end_idx = fr.size();
    for (int k = fr.size() - 1; k >= 7; k--) begin
      bit all1;
      all1 = 1;
      for (int j = k - 6; j <= k; j++) all1 &= fr[j];
      if (all1) end_idx = k;
    end
    #($urandom_range(0, 40000) / 1000.0);
    t0 = $realtime;
    for (int k = 0; k < fr.size(); k++) begin
      te = t0 + (k * 1000.0 + (aux_of(k, tx_sig, s16, modulate) ? 120.0 : 0.0)) * (1.0 + drift)
           + (k == 0 ? 0.0 : ($urandom_range(0, 20000) / 1000.0 - 10.0));
      if (te > $realtime) #(te - $realtime);
      rx_in = fr[k];
    end
    #3000;
    ok = (got.size() == end_idx + 1);
    for (int k = 0; k <= end_idx && k < got.size(); k++) ok &= (got[k] == fr[k]);
    checks++;
    if (!ok) begin
      failures++;
      $display("primary data: %0d bits recovered, %0d expected", got.size(), end_idx + 1);
    end
    checks++;
    if (n_resync == 0) begin
      failures++;
      $display("CLK1 never realigned");
    end
    if (modulate && ae) begin
      checks++;
      if (sig_rec !== (s16 ? tx_sig : {8'h00, tx_sig[7:0]})) begin
        failures++;
        $display("signature %h sent %h", sig_rec, tx_sig);
      end
    end
    checks++;
    if (auth_valid !== ae || go_nogo !== exp_go) begin
      failures++;
      $display("verdict valid %b go %b, want %b %b", auth_valid, go_nogo, ae, exp_go);
    end
  endtask

  initial begin
    bit [15:0] s;
    n_resync = 0;
    sig_expected = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (50) @(negedge clk);
    frame(16'b0101001111101101, 16'b0101001111101101, 1, 1, 1, 0.0, 1);
    frame(16'b0110111111010010, 16'b0110111111010010, 1, 1, 1, 0.0, 1);
    for (int i = 0; i < 6; i++) begin
      s = 16'($urandom);
      frame(s, s, 1, 1, 1, 0.0002 * ($urandom_range(0, 2) - 1.0), 1);
    end
    s = 16'($urandom);
    frame(s, s ^ 16'h0100, 1, 1, 1, 0.0, 0);          // wrong expected signature
    frame(16'hBEEF, 16'hBEEF, 1, 0, 1, 0.0, 0);       // sender does not modulate
    frame(16'h1234, 16'h1234, 1, 1, 0, 0.0, 0);       // authentication off
    // 8-bit mode: the length is taken at the start of frame
    sig16 = 0;
    s = 16'($urandom);
    frame(s, {~s[15:8], s[7:0]}, 0, 1, 1, 0.0, 1);    // upper byte is not compared
    frame(s, s ^ 16'h0001, 0, 1, 1, 0.0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
