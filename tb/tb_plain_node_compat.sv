// tb_plain_node_compat: a conventional CAN node reading frames from an authenticating sender.
//
// Backward compatibility is the point of hiding the signature in edge timing: to a node
// without the phase receiver, the 3 TQ shifts must look like ordinary jitter that normal CAN
// bit timing absorbs. Node A (authenticating transceiver) sends random frames with random
// 16-bit signatures. On the same bus sit node B (authenticating transceiver, must give GO)
// and four conventional receivers (can_bit_timing_rx) on a third clock with a random
// frequency offset of up to +-0.05 % against A:
//   SJW 1, sample point at quantum 17 (70 %) and 20 (80 %);
//   SJW 4, the same two sample points.
// A later sample point is not safe: where the signature goes from 1 to 0 one bit is only
// 22 TQ long, and a node still aligned to the late edges samples it at its own quantum, so
// quantum 21 (84 %) leaves 1 TQ for comparator skew and clock quantisation, and misreads
// occur with 40 ns of CANH/CANL skew.
// Their receive pin is a plain comparator on CANH - CANL with a single 0.7 V threshold. Each
// must return every bit of every frame; a few frames are sent unmodulated as a reference.
// Node B's host acknowledges every frame, 12 TQ after it sampled the CRC delimiter, so all
// receivers must also read a dominant ACK slot.
// The bus has a random CANH/CANL skew of up to 40 ns. All design parameters are at defaults.
`timescale 1ns / 1ps
module tb_plain_node_compat;
  import can_frame_pkg::*;

  localparam int N_FRAMES = 60;

  logic clk_a = 0, clk_b = 0, clk_p = 0, rst_n = 0;
  realtime half_a = 20.0, half_b = 20.0, half_p = 20.0;
  always #(half_a) clk_a = ~clk_a;
  always #(half_b) clk_b = ~clk_b;
  always #(half_p) clk_p = ~clk_p;

  logic        auth_en_a = 1;
  logic [15:0] ext_sig = 0;
  logic        txd_a = 1, txd_b = 1;
  logic        drv_a, drv_b, la, go_b, val_b, bv_b, rxd_b;
  logic [11:0] h_a, l_a, h_b, l_b;

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

  can_auth_transceiver u_a (
    .clk(clk_a), .rst_n, .cfg_sig16(1'b1), .cfg_auth_en(auth_en_a), .sig_seed_load(1'b0),
    .sig_seed(16'h0001), .tx_sig_advance(1'b0), .rx_sig_advance(1'b0), .sig_ext_en(1'b1),
    .tx_sig_ext(ext_sig), .rx_sig_ext(ext_sig), .tx_data(txd_a), .tx_clk0(), .tx_launch(la),
    .tx_aux(), .tx_in_mon(), .can_drive(drv_a), .canh_drv_mv(h_a), .canl_drv_mv(l_a),
    .canh_mv(line_h), .canl_mv(line_l), .rx_out_mon(), .rx_data(), .rx_clk(),
    .rx_bit_valid(), .rx_aux_data(), .rx_sig(), .rx_sig_expected(), .go_nogo(),
    .auth_valid(), .rx_frame_active(), .rx_resync()
  );
  can_auth_transceiver u_b (
    .clk(clk_b), .rst_n, .cfg_sig16(1'b1), .cfg_auth_en(1'b1), .sig_seed_load(1'b0),
    .sig_seed(16'h0001), .tx_sig_advance(1'b0), .rx_sig_advance(1'b0), .sig_ext_en(1'b1),
    .tx_sig_ext(ext_sig), .rx_sig_ext(ext_sig), .tx_data(txd_b), .tx_clk0(), .tx_launch(),
    .tx_aux(), .tx_in_mon(), .can_drive(drv_b), .canh_drv_mv(h_b), .canl_drv_mv(l_b),
    .canh_mv(line_h), .canl_mv(line_l), .rx_out_mon(), .rx_data(rxd_b), .rx_clk(),
    .rx_bit_valid(bv_b), .rx_aux_data(), .rx_sig(), .rx_sig_expected(), .go_nogo(go_b),
    .auth_valid(val_b), .rx_frame_active(), .rx_resync()
  );

  // conventional node: single-threshold receiver and four bit-timing settings
  logic rx_plain;
  assign rx_plain = !((int'(line_h) - int'(line_l)) > 700);

  localparam int N_PLAIN = 4;
  logic [N_PLAIN-1:0] pv, pb, pf;
  can_bit_timing_rx #(.SAMPLE_TQ(17), .SJW(1)) u_p0 (.clk(clk_p), .rst_n, .rx(rx_plain),
    .bit_valid(pv[0]), .bit_val(pb[0]), .frame_active(pf[0]));
  can_bit_timing_rx #(.SAMPLE_TQ(20), .SJW(1)) u_p1 (.clk(clk_p), .rst_n, .rx(rx_plain),
    .bit_valid(pv[1]), .bit_val(pb[1]), .frame_active(pf[1]));
  can_bit_timing_rx #(.SAMPLE_TQ(17), .SJW(4)) u_p2 (.clk(clk_p), .rst_n, .rx(rx_plain),
    .bit_valid(pv[2]), .bit_val(pb[2]), .frame_active(pf[2]));
  can_bit_timing_rx #(.SAMPLE_TQ(20), .SJW(4)) u_p3 (.clk(clk_p), .rst_n, .rx(rx_plain),
    .bit_valid(pv[3]), .bit_val(pb[3]), .frame_active(pf[3]));

  int checks = 0, failures = 0;
  int n_mod = 0, n_plain = 0;

  initial begin
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit got_p[N_PLAIN][$];
  bit got_b[$];
  logic vq_b = 0;
  always @(posedge clk_p)
    for (int i = 0; i < N_PLAIN; i++) if (pv[i]) got_p[i].push_back(pb[i]);
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

  function automatic bit same(input frame_q_t fr, input int e, input bit got[$]);
    if (got.size() != e + 1) return 1'b0;
    for (int k = 0; k <= e; k++) if (got[k] != fr[k]) return 1'b0;
    return 1'b1;
  endfunction

  task automatic one_frame(input bit modulate);
    frame_q_t fr;
    int e, ack_idx;
    real d;
    fr = build_frame(11'($urandom), 8, {$urandom, $urandom});
    ack_idx = fr.size() - 12;            // CRC delimiter, ACK, ACK delimiter, EOF, intermission
    ext_sig   = 16'($urandom);
    auth_en_a = modulate;
    // offsets f_A/f - 1 within +-0.05 % for the conventional node, +-0.04 % for node B
    d = (real'($urandom_range(0, 1000)) - 500.0) * 1.0e-6;
    half_p = 20.0 * (1.0 + d);
    d = (real'($urandom_range(0, 800)) - 400.0) * 1.0e-6;
    half_b = 20.0 * (1.0 + d);
    if ($urandom_range(0, 1) == 1) begin dly_h = real'($urandom_range(0, 40)); dly_l = 0.0; end
    else                           begin dly_l = real'($urandom_range(0, 40)); dly_h = 0.0; end
    #(real'($urandom_range(3000, 3999)));
    foreach (got_p[i]) got_p[i].delete();
    got_b.delete();
    fork
      begin
        for (int t = 0; t < 5000 && got_b.size() < ack_idx; t++) @(posedge clk_b);
        repeat (12) @(posedge clk_b);
        #1 txd_b = 0;
        repeat (25) @(posedge clk_b);
        #1 txd_b = 1;
      end
    join_none
    for (int k = 0; k < fr.size(); k++) begin
      do @(posedge clk_a); while (!la);
      #1 txd_a = fr[k];
    end
    #5000;
    fr[ack_idx] = 1'b0;
    e = frame_end(fr);
    for (int i = 0; i < N_PLAIN; i++) begin
      checks++;
      if (!same(fr, e, got_p[i])) begin
        failures++;
        $display("%0t: conventional receiver %0d misread a %s frame (%0d of %0d bits)",
                 $realtime, i, modulate ? "modulated" : "plain", got_p[i].size(), e + 1);
      end
    end
    checks++;
    if (!same(fr, e, got_b)) begin
      failures++;
      $display("%0t: authenticating receiver misread the frame", $realtime);
    end
    checks++;
    if (!val_b || go_b !== modulate) begin
      failures++;
      $display("%0t: node B verdict valid=%b go=%b, sender modulating=%b", $realtime, val_b,
               go_b, modulate);
    end
    if (modulate) n_mod++; else n_plain++;
  endtask

  initial begin
    #500 rst_n = 1;
    #500;
    for (int i = 0; i < N_FRAMES; i++) one_frame(i % 10 != 9);
    checks++;
    if (n_mod == 0 || n_plain == 0) begin
      failures++;
      $display("coverage: modulated %0d, unmodulated %0d", n_mod, n_plain);
    end
    $display("frames: %0d modulated, %0d unmodulated", n_mod, n_plain);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
