// tb_phase_modulator: checks the transmitter's phase modulation on whole CAN frames.
// The testbench plays stuffed CAN frames into tx_data at the launch strobes. For every change
// of the modulated output it finds the bit it belongs to and checks the value and the delay
// from the CLK0 rising edge: 1 cycle (register) for an unshifted bit, 1 + 3 TQ for a bit whose
// window carries a signature '1'. Frames are sent with 16- and 8-bit signatures and with
// authentication off; EN must be high exactly while a frame is being sent. It also counts the
// 22 TQ and 28 TQ bit times that a signature change produces. Last, with bus_busy high (the
// local receiver inside another node's frame) and no frame of its own, tx_data changes at
// random times: tx_mod must follow it at once, EN must be high exactly for dominant data,
// and no frame may start; after bus_busy falls the output must be recessive and undriven.
`timescale 1ns / 1ps
module tb_phase_modulator;
  import can_frame_pkg::*;
  logic clk = 0, rst_n = 0;
  logic auth_en = 1, sig16 = 1, tx_data = 1, bus_busy = 0;
  logic [15:0] sig;
  logic tx_mod, tx_en, clk0, launch_strobe, aux_bit, frame_active;
  int checks = 0, failures = 0;

  phase_modulator dut (.clk, .rst_n, .auth_en, .sig16, .sig, .tx_data, .bus_busy,
                       .tx_mod, .tx_en, .clk0,
                       .launch_strobe, .aux_bit, .frame_active);

  always #20 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  frame_q_t fr;
  int launched;          // index of the last launched bit
  int cur_bit;           // bit sampled in the current CLK0 period
  int cyc, last_rise, last_change, n_short, n_long, end_idx;
  logic clk0_q, mod_q;
  bit running;

  // Monitor at negative edges.
  always @(negedge clk) if (running) begin
    cyc++;
    if (clk0 && !clk0_q) begin
      last_rise = cyc;
      cur_bit = launched;
    end
    if (tx_mod !== mod_q && cur_bit >= 0 && cur_bit < fr.size()) begin
      int off, want;
      off  = cyc - last_rise;
      want = aux_of(cur_bit, sig, sig16, auth_en) ? 4 : 1;
      checks++;
      if (off != want || tx_mod !== fr[cur_bit]) begin
        failures++;
        $display("bit %0d: value %b want %b, offset %0d want %0d", cur_bit, tx_mod, fr[cur_bit],
                 off, want);
      end
      if (last_change >= 0) begin
        if ((cyc - last_change) % 25 == 22) n_short++;
        if ((cyc - last_change) % 25 == 3)  n_long++;
      end
      last_change = cyc;
    end
    // EN while the frame is on the line: from SOF up to the seventh recessive bit in a row.
    if (cur_bit >= 1 && cur_bit < end_idx && last_rise + 5 == cyc) begin
      checks++;
      if (!tx_en) begin
        failures++;
        $display("EN low inside frame at bit %0d", cur_bit);
      end
    end
    clk0_q = clk0;
    mod_q  = tx_mod;
  end

  task automatic send(input bit [15:0] s, input bit s16, input bit ae);
    bit [63:0] d;
    d = {$urandom, $urandom};
    sig = s; sig16 = s16; auth_en = ae;
    fr = build_frame(11'($urandom), 8, d);
    launched = -1; cur_bit = -1; last_change = -1;
    end_idx = fr.size();
    for (int k = fr.size() - 1; k >= 7; k--) begin
      bit all1;
      all1 = 1;
      for (int j = k - 6; j <= k; j++) all1 &= fr[j];
      if (all1) end_idx = k;
    end
    for (int k = 0; k < fr.size(); k++) begin
      do @(posedge clk); while (!launch_strobe);
      #1 tx_data = fr[k];
      launched = k;
    end
    repeat (60) @(posedge clk);
    checks++;
    if (tx_en || frame_active) begin
      failures++;
      $display("EN still high after frame");
    end
  endtask

  initial begin
    clk0_q = 0; mod_q = 1; cyc = 0; last_rise = 0; n_short = 0; n_long = 0;
    running = 0; launched = -1; cur_bit = -1; last_change = -1; end_idx = 0;
    fr = build_frame(11'h0, 0, '0);
    repeat (3) @(negedge clk);
    rst_n = 1;
    running = 1;
    send(16'b0101001111101101, 1, 1);
    send(16'b0110111111010010, 1, 1);
    send(16'($urandom), 1, 1);
    send(16'h00A5, 0, 1);
    send(16'hFFFF, 1, 0);
    running = 0;
    bus_busy = 1;
    repeat (5) @(posedge clk);
    for (int i = 0; i < 200; i++) begin
      #($urandom_range(1, 120));
      tx_data = 1'($urandom);
      #1;
      checks++;
      if (tx_mod !== tx_data || tx_en !== !tx_data || frame_active) begin
        failures++;
        $display("%0t: pass-through tx_data=%b tx_mod=%b tx_en=%b frame=%b", $realtime, tx_data,
                 tx_mod, tx_en, frame_active);
      end
    end
    tx_data = 1;
    repeat (30) @(posedge clk);
    bus_busy = 0;
    repeat (30) @(posedge clk);
    checks++;
    if (tx_mod !== 1'b1 || tx_en || frame_active) begin
      failures++;
      $display("after pass-through: tx_mod=%b tx_en=%b frame=%b", tx_mod, tx_en, frame_active);
    end
    checks++;
    if (n_short == 0 || n_long == 0) begin
      failures++;
      $display("no 22/28 TQ bits seen (%0d/%0d)", n_short, n_long);
    end
    $display("22 TQ bits %0d, 28 TQ bits %0d", n_short, n_long);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
