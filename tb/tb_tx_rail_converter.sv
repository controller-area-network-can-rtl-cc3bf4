// tb_tx_rail_converter: checks the single-to-dual-rail driver model.
//
// Expected behaviour, worked out from the driver's specification rather than from the model:
//   dominant (tx_in = 0) with EN: CANH = VDD = 1800 mV, CANL = 0 mV, differential 1.8 V;
//   recessive with EN: both lines actively driven to VCM = 900 mV, differential 0;
//   without EN: the stage does not drive (drive = 0), whatever tx_in is.
// A random sequence of 500 input steps is applied. Every step checks the drive flag, both
// line levels and the differential. Because the phase channel needs both kinds of edge to be
// driven alike, the delay from a TX_IN edge to the CANH/CANL change is measured for every
// dominant-going and every recessive-going edge while EN is high; all must be equal.
`timescale 1ns / 1ps
module tb_tx_rail_converter;
  logic tx_in = 1, en = 0, drive;
  logic [11:0] canh_mv, canl_mv;
  int checks = 0, failures = 0;
  int n_dom = 0, n_rec = 0;

  tx_rail_converter dut (.tx_in, .en, .drive, .canh_mv, .canl_mv);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  realtime d_dom = -1.0, d_rec = -1.0;

  // After a driven TX_IN edge, wait in 10 ps steps until both lines show the new level and
  // record that delay for the edge's direction.
  task automatic record_edge(input logic to_dom);
    realtime dly;
    logic [11:0] want_h, want_l;
    want_h = to_dom ? 12'd1800 : 12'd900;
    want_l = to_dom ? 12'd0    : 12'd900;
    dly = 0.0;
    while ((canh_mv !== want_h || canl_mv !== want_l) && dly < 5.0) begin
      #0.01;
      dly += 0.01;
    end
    checks++;
    if (dly >= 5.0) begin
      failures++;
      $display("%0t: lines did not follow a %s edge", $realtime, to_dom ? "dominant" : "recessive");
    end
    if (to_dom) begin
      if (d_dom < 0.0) d_dom = dly;
      else if (dly != d_dom) begin failures++; $display("%0t: dominant edge delay changed", $realtime); end
      n_dom++;
    end else begin
      if (d_rec < 0.0) d_rec = dly;
      else if (dly != d_rec) begin failures++; $display("%0t: recessive edge delay changed", $realtime); end
      n_rec++;
    end
  endtask

  task automatic check_levels();
    logic [11:0] exp_h, exp_l;
    int diff;
    exp_h = (en && !tx_in) ? 12'd1800 : 12'd900;
    exp_l = (en && !tx_in) ? 12'd0    : 12'd900;
    diff  = int'(canh_mv) - int'(canl_mv);
    checks++;
    if (drive !== en) begin
      failures++;
      $display("%0t: drive=%b with en=%b", $realtime, drive, en);
    end
    if (en) begin
      checks++;
      if (canh_mv !== exp_h || canl_mv !== exp_l) begin
        failures++;
        $display("%0t: tx_in=%b CANH=%0d CANL=%0d, want %0d/%0d", $realtime, tx_in, canh_mv,
                 canl_mv, exp_h, exp_l);
      end
      checks++;
      if (diff != (tx_in ? 0 : 1800)) begin
        failures++;
        $display("%0t: differential %0d mV with tx_in=%b", $realtime, diff, tx_in);
      end
    end
  endtask

  initial begin
    #10;
    for (int i = 0; i < 500; i++) begin
      // EN stays on for long runs so that many edges are driven
      logic nxt;
      if ($urandom_range(0, 15) == 0) begin
        en = ~en;
        #10;
      end
      nxt = 1'($urandom);
      if (en && nxt != tx_in) begin
        tx_in = nxt;
        record_edge(!nxt);
        #10;
      end else begin
        tx_in = nxt;
        #10;
      end
      check_levels();
    end
    checks++;
    if (n_dom == 0 || n_rec == 0 || d_dom != d_rec) begin
      failures++;
      $display("edges: %0d dominant (delay %0.3f), %0d recessive (delay %0.3f)", n_dom, d_dom,
               n_rec, d_rec);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
