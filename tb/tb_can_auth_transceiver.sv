// tb_can_auth_transceiver: end-to-end test of two transceivers on one CAN bus.
//
// Node A and node B each run from their own 25 MHz clock; B's clock can be offset to give a
// TX/RX frequency drift. Both nodes' drivers are resolved onto CANH/CANL (dominant wins,
// otherwise the termination holds both lines at 0.9 V), and each line has its own delay, so
// the bus can be given CANH/CANL skew. A host model plays stuffed CAN frames into a sender;
// the other node must recover every bit, the 8- or 16-bit signature, and the right verdict.
// Scenarios, each counted and required at least once:
//   GO with matching generators, and GO after both generators are stepped again;
//   NO_GO when the receiver's generator is out of step and when the sender is unequipped;
//   no verdict when the receiver has authentication switched off;
//   8-bit and 16-bit signatures; host-supplied signatures (as in the measured 16-bit words);
//   +0.05 % and -0.05 % frequency drift; 50 ns, 100 ns and 110 ns line skew;
//   CLK1 realignment; 3 TQ shifted bits; driver disabled between frames;
//   traffic in both directions; acknowledgement by the receiving node.
// Every frame is acknowledged as on a real bus: the receiving node's host drives the ACK slot
// dominant for one bit of its own clock, starting 12 TQ after it sampled the CRC delimiter.
// Both the receiver and the sender's own receiver must read that bit as 0, and the receiving
// node may drive the bus only for that one bit (its transceiver must not re-time the bit or
// take it for a start of frame of its own).
// RX_OUT pulse widths are compared with TX_IN pulse widths: skew must not change them, and
// pulses of 1 us + 3 TQ (1.12 us) and of three bits + 3 TQ (3.12 us) must appear.
// All parameters of the design are at their defaults.
`timescale 1ns / 1ps
module tb_can_auth_transceiver;
  import can_frame_pkg::*;
  import sig_ref_pkg::*;

  // ---------------- clocks, bus ----------------
  logic clk_a = 0, clk_b = 0, rst_n = 0;
  realtime half_a = 20.0, half_b = 20.0;
  always #(half_a) clk_a = ~clk_a;
  always #(half_b) clk_b = ~clk_b;

  logic        cfg_sig16 = 1;
  logic        auth_en_a = 1, auth_en_b = 1;
  logic        seed_load = 0;
  logic [15:0] seed = 16'hC0DE;
  logic        adv_tx_a = 0, adv_rx_a = 0, adv_tx_b = 0, adv_rx_b = 0;
  logic        ext_en = 0;
  logic [15:0] ext_tx = 0, ext_rx = 0;
  logic        txd_a = 1, txd_b = 1;

  typedef struct {
    logic        clk0, launch, aux, tx_in, drive;
    logic [11:0] canh_drv, canl_drv;
    logic        rx_out, rx_data, rx_clk, rx_bit_valid, rx_aux, go, valid, frame, resync;
    logic [15:0] sig, sig_exp;
  } node_t;
  node_t a, b;

  logic [11:0] bus_h, bus_l, line_h = 900, line_l = 900;
  realtime dly_h = 0.0, dly_l = 0.0;

  always_comb begin
    if ((a.drive && a.canh_drv > a.canl_drv) || (b.drive && b.canh_drv > b.canl_drv)) begin
      bus_h = 12'd1800; bus_l = 12'd0;
    end else begin
      bus_h = 12'd900;  bus_l = 12'd900;
    end
  end
  always @(bus_h) line_h <= #(dly_h) bus_h;
  always @(bus_l) line_l <= #(dly_l) bus_l;

  can_auth_transceiver u_a (
    .clk(clk_a), .rst_n, .cfg_sig16, .cfg_auth_en(auth_en_a), .sig_seed_load(seed_load),
    .sig_seed(seed), .tx_sig_advance(adv_tx_a), .rx_sig_advance(adv_rx_a), .sig_ext_en(ext_en),
    .tx_sig_ext(ext_tx), .rx_sig_ext(ext_rx), .tx_data(txd_a), .tx_clk0(a.clk0),
    .tx_launch(a.launch), .tx_aux(a.aux), .tx_in_mon(a.tx_in), .can_drive(a.drive),
    .canh_drv_mv(a.canh_drv), .canl_drv_mv(a.canl_drv), .canh_mv(line_h), .canl_mv(line_l),
    .rx_out_mon(a.rx_out), .rx_data(a.rx_data), .rx_clk(a.rx_clk), .rx_bit_valid(a.rx_bit_valid),
    .rx_aux_data(a.rx_aux), .rx_sig(a.sig), .rx_sig_expected(a.sig_exp), .go_nogo(a.go),
    .auth_valid(a.valid), .rx_frame_active(a.frame), .rx_resync(a.resync)
  );

  can_auth_transceiver u_b (
    .clk(clk_b), .rst_n, .cfg_sig16, .cfg_auth_en(auth_en_b), .sig_seed_load(seed_load),
    .sig_seed(seed), .tx_sig_advance(adv_tx_b), .rx_sig_advance(adv_rx_b), .sig_ext_en(ext_en),
    .tx_sig_ext(ext_tx), .rx_sig_ext(ext_rx), .tx_data(txd_b), .tx_clk0(b.clk0),
    .tx_launch(b.launch), .tx_aux(b.aux), .tx_in_mon(b.tx_in), .can_drive(b.drive),
    .canh_drv_mv(b.canh_drv), .canl_drv_mv(b.canl_drv), .canh_mv(line_h), .canl_mv(line_l),
    .rx_out_mon(b.rx_out), .rx_data(b.rx_data), .rx_clk(b.rx_clk), .rx_bit_valid(b.rx_bit_valid),
    .rx_aux_data(b.rx_aux), .rx_sig(b.sig), .rx_sig_expected(b.sig_exp), .go_nogo(b.go),
    .auth_valid(b.valid), .rx_frame_active(b.frame), .rx_resync(b.resync)
  );

  // ---------------- bookkeeping ----------------
  int checks = 0, failures = 0;
  typedef enum int {
    M_GO, M_GO_AFTER_STEP, M_NOGO_OUT_OF_STEP, M_NOGO_UNEQUIPPED, M_NO_VERDICT, M_SIG8, M_SIG16,
    M_EXT_SIG, M_DRIFT_POS, M_DRIFT_NEG, M_SKEW, M_RESYNC, M_SHIFTED_BIT, M_DRIVER_OFF,
    M_B_TO_A, M_PULSE_1120, M_PULSE_3120, M_ACK, M_COUNT
  } mech_e;
  int mech[M_COUNT];

  initial begin
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // receivers' sampled bits
  bit got_a[$], got_b[$];
  logic vq_a = 0, vq_b = 0;
  always @(posedge clk_a) begin
    if (vq_a) got_a.push_back(a.rx_data);
    vq_a <= a.rx_bit_valid;
    if (a.resync) mech[M_RESYNC]++;
  end
  int drv_cyc_a = 0, drv_cyc_b = 0;   // cycles each node drives the bus during a frame
  always @(posedge clk_a) if (a.drive) drv_cyc_a++;
  always @(posedge clk_b) if (b.drive) drv_cyc_b++;
  always @(posedge clk_b) begin
    if (vq_b) got_b.push_back(b.rx_data);
    vq_b <= b.rx_bit_valid;
    if (b.resync) mech[M_RESYNC]++;
  end

  // shifted bits and driver switched off, seen at the senders
  logic aux_q_a = 0, aux_q_b = 0, drv_q_a = 0, drv_q_b = 0;
  always @(posedge clk_a) begin
    if (a.aux && !aux_q_a) mech[M_SHIFTED_BIT]++;
    if (drv_q_a && !a.drive) mech[M_DRIVER_OFF]++;
    aux_q_a <= a.aux; drv_q_a <= a.drive;
  end
  always @(posedge clk_b) begin
    if (b.aux && !aux_q_b) mech[M_SHIFTED_BIT]++;
    if (drv_q_b && !b.drive) mech[M_DRIVER_OFF]++;
    aux_q_b <= b.aux; drv_q_b <= b.drive;
  end

  // edge times of the sender's TX_IN and the receiver's RX_OUT
  realtime tx_edges[$], rx_edges[$];
  bit watch_a_to_b = 1;
  always @(a.tx_in) if (watch_a_to_b)  tx_edges.push_back($realtime);
  always @(b.tx_in) if (!watch_a_to_b) tx_edges.push_back($realtime);
  always @(b.rx_out) if (watch_a_to_b)  rx_edges.push_back($realtime);
  always @(a.rx_out) if (!watch_a_to_b) rx_edges.push_back($realtime);

  // ---------------- helpers ----------------
  task automatic do_reset(input bit s16);
    rst_n = 0;
    cfg_sig16 = s16;
    #500;
    rst_n = 1;
    #500;
  endtask

  // Host commands: a step lasts one cycle of the node's own clock; the seed broadcast is
  // held until both nodes have seen it.
  typedef enum int {C_SEED, C_TX_A, C_RX_A, C_TX_B, C_RX_B} cmd_e;
  task automatic pulse_cmd(input cmd_e c);
    case (c)
      C_SEED: begin
        @(negedge clk_a) seed_load = 1;
        @(negedge clk_a);
        @(negedge clk_b);
        @(negedge clk_b);
        seed_load = 0;
      end
      C_TX_A: begin @(negedge clk_a) adv_tx_a = 1; @(negedge clk_a) adv_tx_a = 0; end
      C_RX_A: begin @(negedge clk_a) adv_rx_a = 1; @(negedge clk_a) adv_rx_a = 0; end
      C_TX_B: begin @(negedge clk_b) adv_tx_b = 1; @(negedge clk_b) adv_tx_b = 0; end
      default: begin @(negedge clk_b) adv_rx_b = 1; @(negedge clk_b) adv_rx_b = 0; end
    endcase
  endtask

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

  // Send one frame from A (a_to_b) or B and check the other node.
  // want: 2 = GO, 1 = NO_GO, 0 = no verdict.
  task automatic send(input bit a_to_b, input int want, input bit [15:0] sent_sig,
                      input bit check_sig);
    frame_q_t fr;
    int e, nsig, ack_idx, rcv_cyc;
    bit ok, own_ok, rx_valid, rx_go;
    logic [15:0] rx_sig;
    fr = build_frame(11'($urandom), 8, {$urandom, $urandom});
    ack_idx = fr.size() - 12;            // CRC delimiter, ACK, ACK delimiter, EOF, intermission
    got_a.delete(); got_b.delete();
    tx_edges.delete(); rx_edges.delete();
    watch_a_to_b = a_to_b;
    drv_cyc_a = 0; drv_cyc_b = 0;
    // receiving node's host: acknowledge from the bit boundary after the CRC delimiter
    fork
      begin
        if (a_to_b) begin
          for (int t = 0; t < 5000 && got_b.size() < ack_idx; t++) @(posedge clk_b);
          repeat (12) @(posedge clk_b);
          #1 txd_b = 0;
          repeat (25) @(posedge clk_b);
          #1 txd_b = 1;
        end else begin
          for (int t = 0; t < 5000 && got_a.size() < ack_idx; t++) @(posedge clk_a);
          repeat (12) @(posedge clk_a);
          #1 txd_a = 0;
          repeat (25) @(posedge clk_a);
          #1 txd_a = 1;
        end
      end
    join_none
    for (int k = 0; k < fr.size(); k++) begin
      if (a_to_b) begin
        do @(posedge clk_a); while (!a.launch);
        #1 txd_a = fr[k];
      end else begin
        do @(posedge clk_b); while (!b.launch);
        #1 txd_b = fr[k];
      end
    end
    #5000;
    // what every receiver must read: the frame with the ACK slot dominant
    fr[ack_idx] = 1'b0;
    e = frame_end(fr);
    // primary data at the receiving node, and at the sender's own receiver
    ok = 1; own_ok = 1;
    if (a_to_b) begin
      ok &= (got_b.size() == e + 1);
      for (int k = 0; k <= e && k < got_b.size(); k++) ok &= (got_b[k] == fr[k]);
      own_ok &= (got_a.size() == e + 1);
      for (int k = 0; k <= e && k < got_a.size(); k++) own_ok &= (got_a[k] == fr[k]);
    end else begin
      ok &= (got_a.size() == e + 1);
      for (int k = 0; k <= e && k < got_a.size(); k++) ok &= (got_a[k] == fr[k]);
      own_ok &= (got_b.size() == e + 1);
      for (int k = 0; k <= e && k < got_b.size(); k++) own_ok &= (got_b[k] == fr[k]);
    end
    checks++;
    if (!ok) begin
      failures++;
      $display("%0t: primary data not recovered (%0d/%0d bits)", $realtime,
               a_to_b ? got_b.size() : got_a.size(), e + 1);
    end
    checks++;
    if (!own_ok) begin
      failures++;
      $display("%0t: sender did not read its own frame with the ACK (%0d/%0d bits)", $realtime,
               a_to_b ? got_a.size() : got_b.size(), e + 1);
    end
    // the receiving node drove the bus for the ACK bit only
    rcv_cyc = a_to_b ? drv_cyc_b : drv_cyc_a;
    checks++;
    if (rcv_cyc < 24 || rcv_cyc > 26) begin
      failures++;
      $display("%0t: receiving node drove the bus for %0d cycles", $realtime, rcv_cyc);
    end
    if (ok && own_ok && rcv_cyc >= 24 && rcv_cyc <= 26) mech[M_ACK]++;
    rx_valid = a_to_b ? b.valid : a.valid;
    rx_go    = a_to_b ? b.go : a.go;
    rx_sig   = a_to_b ? b.sig : a.sig;
    nsig     = cfg_sig16 ? 16 : 8;
    checks++;
    if (rx_valid !== (want != 0) || rx_go !== (want == 2)) begin
      failures++;
      $display("%0t: verdict valid=%b go=%b, want %0d", $realtime, rx_valid, rx_go, want);
    end
    if (check_sig) begin
      checks++;
      if (rx_sig !== (nsig == 16 ? sent_sig : {8'h00, sent_sig[7:0]})) begin
        failures++;
        $display("%0t: recovered signature %h, sent %h", $realtime, rx_sig, sent_sig);
      end
    end
    // pulse widths: RX_OUT must reproduce TX_IN, followed by the two edges of the ACK bit
    checks++;
    if (tx_edges.size() + 2 != rx_edges.size()) begin
      failures++;
      $display("%0t: %0d TX_IN edges, %0d RX_OUT edges", $realtime, tx_edges.size(), rx_edges.size());
    end else begin
      for (int i = 1; i < tx_edges.size(); i++) begin
        realtime wt, wr;
        wt = tx_edges[i] - tx_edges[i-1];
        wr = rx_edges[i] - rx_edges[i-1];
        if (wr - wt > 0.5 || wt - wr > 0.5) begin
          failures++;
          $display("%0t: pulse %0d width %0.1f ns, TX_IN %0.1f ns", $realtime, i, wr, wt);
          break;
        end
        if (wr > 1119.0 && wr < 1121.0) mech[M_PULSE_1120]++;
        if (wr > 3119.0 && wr < 3121.0) mech[M_PULSE_3120]++;
      end
    end
    if (want == 2) mech[M_GO]++;
    if (nsig == 8) mech[M_SIG8]++; else mech[M_SIG16]++;
    if (!a_to_b) mech[M_B_TO_A]++;
    #2000;
  endtask

  // reference generator states: TX and RX generator of each node
  logic [15:0] st_tx_a, st_rx_a, st_tx_b, st_rx_b;
  task automatic step(input cmd_e c);
    pulse_cmd(c);
    case (c)
      C_TX_A: st_tx_a = ref_step(st_tx_a);
      C_RX_A: st_rx_a = ref_step(st_rx_a);
      C_TX_B: st_tx_b = ref_step(st_tx_b);
      C_RX_B: st_rx_b = ref_step(st_rx_b);
      default: ;
    endcase
  endtask
  task automatic load_seed();
    pulse_cmd(C_SEED);
    st_tx_a = seed; st_rx_a = seed; st_tx_b = seed; st_rx_b = seed;
  endtask

  // ---------------- scenarios ----------------
  initial begin
    bit [15:0] s, e;
    foreach (mech[i]) mech[i] = 0;
    do_reset(1);
    load_seed();

    // matching generators, no impairments
    send(1, 2, ref_hash(st_tx_a), 1);
    send(1, 2, ref_hash(st_tx_a), 1);
    // both generators stepped: still in step
    step(C_TX_A);
    step(C_RX_B);
    send(1, 2, ref_hash(st_tx_a), 1);
    mech[M_GO_AFTER_STEP]++;
    // receiver stepped alone: out of step
    step(C_RX_B);
    send(1, 1, ref_hash(st_tx_a), 1);
    mech[M_NOGO_OUT_OF_STEP]++;
    step(C_TX_A);
    // traffic from B to A
    step(C_TX_B); step(C_TX_B);
    step(C_RX_A); step(C_RX_A);
    send(0, 2, ref_hash(st_tx_b), 1);

    // measured 16-bit words, supplied by the host
    ext_en = 1;
    ext_tx = 16'b0101001111101101; ext_rx = ext_tx;
    half_b = 20.0 / (1.0 + 0.0005);       // f_TX / f_RX - 1 = -0.05 %
    #3000;
    send(1, 2, ext_tx, 1);
    mech[M_DRIFT_NEG]++;
    mech[M_EXT_SIG]++;
    ext_tx = 16'b0110111111010010; ext_rx = ext_tx;
    half_b = 20.0 / (1.0 - 0.0005);       // +0.05 %
    #3000;
    send(1, 2, ext_tx, 1);
    mech[M_DRIFT_POS]++;
    half_b = 20.0;

    // CANH/CANL skew
    ext_tx = 16'($urandom); ext_rx = ext_tx;
    dly_h = 50.0; dly_l = 0.0;
    #3000;
    send(1, 2, ext_tx, 1);
    dly_h = 0.0; dly_l = 100.0;
    #3000;
    send(1, 2, ext_tx, 1);
    dly_h = 110.0; dly_l = 0.0;
    #3000;
    send(1, 2, ext_tx, 1);
    mech[M_SKEW]++;
    dly_h = 0.0; dly_l = 0.0;

    // unequipped sender: frame is read, signature check fails
    auth_en_a = 0;
    send(1, 1, ext_tx, 0);
    mech[M_NOGO_UNEQUIPPED]++;
    // receiver with authentication off: frame is read, no verdict
    auth_en_a = 1; auth_en_b = 0;
    send(1, 0, ext_tx, 0);
    mech[M_NO_VERDICT]++;
    auth_en_b = 1;
    ext_en = 0;

    // 8-bit signature, chosen at reset
    do_reset(0);
    load_seed();
    send(1, 2, ref_hash(st_tx_a), 1);
    step(C_RX_B);
    step(C_RX_B);
    s = ref_hash(st_tx_a);
    e = ref_hash(st_rx_b);
    send(1, (s[7:0] == e[7:0]) ? 2 : 1, s, 1);

    foreach (mech[i]) begin
      checks++;
      if (mech[i] == 0) begin
        failures++;
        $display("mechanism %s never happened", mech_e'(i));
      end else begin
        $display("mechanism %-20s %0d", mech_e'(i), mech[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
