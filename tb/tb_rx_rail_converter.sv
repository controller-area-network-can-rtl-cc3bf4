// tb_rx_rail_converter: checks the hysteretic receiver model.
// A reference comparator kept here switches to dominant above 1200 mV differential and to
// recessive below 600 mV, holding in between. Random line voltages are applied; then
// CANH/CANL skew cases check that a step on one line alone does not switch the output and
// that the output switches when the later line arrives, on both edges.
`timescale 1ns / 1ps
module tb_rx_rail_converter;
  logic [11:0] canh_mv, canl_mv;
  logic rx_out;
  int checks = 0, failures = 0;

  rx_rail_converter dut (.canh_mv, .canl_mv, .rx_out);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int h, input int l, input bit want);
    canh_mv = 12'(h); canl_mv = 12'(l);
    #10;
    checks++;
    if (rx_out !== want) begin
      failures++;
      $display("CANH %0d CANL %0d: out %b want %b", h, l, rx_out, want);
    end
  endtask

  initial begin
    bit st;
    int h, l, d;
    apply(900, 900, 1);
    st = 1;
    for (int i = 0; i < 2000; i++) begin
      h = $urandom_range(900, 1800);
      l = $urandom_range(0, 900);
      d = h - l;
      if (d > 1200) st = 0;
      else if (d < 600) st = 1;
      apply(h, l, st);
    end
    // Skew: CANH moves first, then CANL (recessive -> dominant -> recessive).
    apply(900, 900, 1);
    apply(1800, 900, 1);
    apply(1800, 0, 0);
    apply(900, 0, 0);
    apply(900, 900, 1);
    // CANL moves first.
    apply(900, 0, 1);
    apply(1800, 0, 0);
    apply(1800, 900, 0);
    apply(900, 900, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
