// tb_auth_random_traffic: randomised authenticated traffic between two transceivers.
//
// Two complete transceivers, each on its own 25 MHz clock, share one CAN bus. Every frame
// has a random identifier, data length and payload, a random signature supplied by the host,
// a random phase between the two clocks, a random frequency offset inside the drift budget
// and a random CANH/CANL skew of up to 110 ns on either line. The receiver must recover every
// bit of the frame and the exact signature, and give GO, or NO_GO when its expected
// signature was made to differ in one random bit. This runs the claim that authentication
// holds for any combination of frame and signature as long as the accumulated phase error
// stays within 1 TQ.
// Drift budget: the last signature window of a 16-bit word starts at bit 88 and may need an
// edge as late as bit 92, i.e. 2300 TQ after the start of frame; the 1 TQ margin on each side
// of the 2 TQ decision then allows |f_TX/f_RX - 1| <= 1/2300 = 0.043 %. Offsets are drawn
// from +-0.04 %. 16-bit frames carry 8 data bytes; 8-bit frames carry 3 to 8.
// All parameters of the design are at their defaults.
`timescale 1ns / 1ps
module tb_auth_random_traffic;
  import can_frame_pkg::*;

  localparam int N_FRAMES_16 = 200;
  localparam int N_FRAMES_8  = 120;

  // ---------------- clocks, bus ----------------
  logic clk_a = 0, clk_b = 0, rst_n = 0;
  realtime half_a = 20.0, half_b = 20.0;
  always #(half_a) clk_a = ~clk_a;
  always #(half_b) clk_b = ~clk_b;

  logic        cfg_sig16 = 1;
  logic [15:0] ext_tx = 0, ext_rx = 0;
  logic        txd_a = 1, txd_b = 1;

  logic        drv_a, drv_b, go_a, go_b, val_a, val_b, bv_a, bv_b, rxd_a, rxd_b;
  logic [11:0] h_a, l_a, h_b, l_b;
  logic [15:0] sig_a, sig_b;

  logic [11:0] bus_h, bus_l, line_h = 900, line_l = 900;
  realtime dly_h = 0.0, dly_l = 0.0;

  always_comb begin
    if ((drv_a && h_a > l_a) || (drv_b && h_b > l_b)) begin
      bus_h = 12'd1800; bus_l = 12'd0;
    end else begin
      bus_h = 12'd900;  bus_l = 12'd900;
    end
  end
  always @(bus_h) line_h <= #(dly_h) bus_h;
  always @(bus_l) line_l <= #(dly_l) bus_l;

  logic        la, lb;
  can_auth_transceiver u_a (
    .clk(clk_a), .rst_n, .cfg_sig16, .cfg_auth_en(1'b1), .sig_seed_load(1'b0),
    .sig_seed(16'h0001), .tx_sig_advance(1'b0), .rx_sig_advance(1'b0), .sig_ext_en(1'b1),
    .tx_sig_ext(ext_tx), .rx_sig_ext(ext_rx), .tx_data(txd_a), .tx_clk0(), .tx_launch(la),
    .tx_aux(), .tx_in_mon(), .can_drive(drv_a), .canh_drv_mv(h_a), .canl_drv_mv(l_a),
    .canh_mv(line_h), .canl_mv(line_l), .rx_out_mon(), .rx_data(rxd_a), .rx_clk(),
    .rx_bit_valid(bv_a), .rx_aux_data(), .rx_sig(sig_a), .rx_sig_expected(), .go_nogo(go_a),
    .auth_valid(val_a), .rx_frame_active(), .rx_resync()
  );
  can_auth_transceiver u_b (
    .clk(clk_b), .rst_n, .cfg_sig16, .cfg_auth_en(1'b1), .sig_seed_load(1'b0),
    .sig_seed(16'h0001), .tx_sig_advance(1'b0), .rx_sig_advance(1'b0), .sig_ext_en(1'b1),
    .tx_sig_ext(ext_tx), .rx_sig_ext(ext_rx), .tx_data(txd_b), .tx_clk0(), .tx_launch(lb),
    .tx_aux(), .tx_in_mon(), .can_drive(drv_b), .canh_drv_mv(h_b), .canl_drv_mv(l_b),
    .canh_mv(line_h), .canl_mv(line_l), .rx_out_mon(), .rx_data(rxd_b), .rx_clk(),
    .rx_bit_valid(bv_b), .rx_aux_data(), .rx_sig(sig_b), .rx_sig_expected(), .go_nogo(go_b),
    .auth_valid(val_b), .rx_frame_active(), .rx_resync()
  );

  // ---------------- bookkeeping ----------------
  int checks = 0, failures = 0;
  int n_go = 0, n_nogo = 0, n_pos = 0, n_neg = 0;

  initial begin
    #200ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit got_a[$], got_b[$];
  logic vq_a = 0, vq_b = 0;
  always @(posedge clk_a) begin
    if (vq_a) got_a.push_back(rxd_a);
    vq_a <= bv_a;
  end
  always @(posedge clk_b) begin
    if (vq_b) got_b.push_back(rxd_b);
    vq_b <= bv_b;
  end

  function automatic int frame_end(input frame_q_t fr);
    int e;
    e = fr.size();
    for (int k = fr.size() - 1; k >= 7; k--) begin
      bit all1;
      all1 = 1;
      for (int j = k - 6; j <= k; j++) all1 &= fr[j];
      if (all1) e = k;
    end
    return e;
  endfunction

  // One random frame from A (a_to_b) or B.
  task automatic random_frame(input bit a_to_b);
    frame_q_t fr;
    int e, dlc, nsig, slip;
    bit ok, want_go, rx_valid, rx_go;
    logic [15:0] rx_sig, exp_sig;
    real d;
    nsig = cfg_sig16 ? 16 : 8;
    dlc  = cfg_sig16 ? 8 : 3 + int'($urandom_range(0, 5));
    fr   = build_frame(11'($urandom), dlc, {$urandom, $urandom});
    e    = frame_end(fr);
    // signature, and one bit flipped in the expected word for a quarter of the frames
    ext_tx  = 16'($urandom);
    want_go = ($urandom_range(0, 3) != 0);
    ext_rx  = want_go ? ext_tx : ext_tx ^ (16'd1 << $urandom_range(0, nsig - 1));
    // random clock phase: run B's clock 0.5 ns slow for a random number of half periods
    slip = int'($urandom_range(0, 79));
    half_b = 20.5;
    repeat (slip) @(clk_b);
    // random frequency offset f_TX/f_RX - 1 in +-0.04 %, random skew on one line
    d = (real'($urandom_range(0, 800)) - 400.0) * 1.0e-6;
    if (a_to_b) begin half_a = 20.0; half_b = 20.0 * (1.0 + d); end
    else        begin half_b = 20.0; half_a = 20.0 * (1.0 + d); end
    if (d > 0.0) n_pos++; else if (d < 0.0) n_neg++;
    if ($urandom_range(0, 1) == 1) begin dly_h = real'($urandom_range(0, 110)); dly_l = 0.0; end
    else                           begin dly_l = real'($urandom_range(0, 110)); dly_h = 0.0; end
    #3000;
    got_a.delete(); got_b.delete();
    for (int k = 0; k < fr.size(); k++) begin
      if (a_to_b) begin
        do @(posedge clk_a); while (!la);
        #1 txd_a = fr[k];
      end else begin
        do @(posedge clk_b); while (!lb);
        #1 txd_b = fr[k];
      end
    end
    #5000;
    ok = 1;
    if (a_to_b) begin
      ok &= (got_b.size() == e + 1);
      for (int k = 0; k <= e && k < got_b.size(); k++) ok &= (got_b[k] == fr[k]);
    end else begin
      ok &= (got_a.size() == e + 1);
      for (int k = 0; k <= e && k < got_a.size(); k++) ok &= (got_a[k] == fr[k]);
    end
    checks++;
    if (!ok) begin
      failures++;
      $display("%0t: primary data not recovered (drift %0.4f %%)", $realtime, d * 100.0);
    end
    rx_valid = a_to_b ? val_b : val_a;
    rx_go    = a_to_b ? go_b : go_a;
    rx_sig   = a_to_b ? sig_b : sig_a;
    exp_sig  = (nsig == 16) ? ext_tx : {8'h00, ext_tx[7:0]};
    checks++;
    if (rx_sig !== exp_sig) begin
      failures++;
      $display("%0t: %0d-bit signature %h recovered, %h sent (drift %0.4f %%, skew %0.0f/%0.0f ns)",
               $realtime, nsig, rx_sig, exp_sig, d * 100.0, dly_h, dly_l);
    end
    checks++;
    if (!rx_valid || rx_go !== want_go) begin
      failures++;
      $display("%0t: verdict valid=%b go=%b, want go=%b", $realtime, rx_valid, rx_go, want_go);
    end
    if (want_go) n_go++; else n_nogo++;
  endtask

  initial begin
    rst_n = 0; cfg_sig16 = 1;
    #500 rst_n = 1;
    #500;
    for (int i = 0; i < N_FRAMES_16; i++) random_frame(i % 3 != 2);
    rst_n = 0; cfg_sig16 = 0;
    #500 rst_n = 1;
    #500;
    for (int i = 0; i < N_FRAMES_8; i++) random_frame(i % 3 != 2);
    // both verdicts and both drift signs must have occurred
    checks++;
    if (n_go == 0 || n_nogo == 0 || n_pos == 0 || n_neg == 0) begin
      failures++;
      $display("coverage: go %0d nogo %0d drift+ %0d drift- %0d", n_go, n_nogo, n_pos, n_neg);
    end
    $display("frames %0d: GO %0d, NO_GO %0d; drift + %0d, - %0d",
             N_FRAMES_16 + N_FRAMES_8, n_go, n_nogo, n_pos, n_neg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
