// tb_decoder1: exhaustive check of Decoder1 over all 25 x 25 (selection, TDC reading) pairs.
// Expected: the edge lies at tap (sel + code) mod 25; the new CLK1 selection puts the falling
// edge, 13 TQ after the rising edge, on it: (sel + code - 13) mod 25.
`timescale 1ns / 1ps
module tb_decoder1;
  logic [4:0] sel, code, sel_next, edge_phase;
  logic adjust;
  int checks = 0, failures = 0;

  decoder1 dut (.sel, .code, .sel_next, .edge_phase, .adjust);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 25; s++)
      for (int c = 0; c < 25; c++) begin
        sel = 5'(s); code = 5'(c);
        #1;
        checks++;
        if (int'(edge_phase) != (s + c) % 25 || int'(sel_next) != (s + c + 25 - 13) % 25
            || adjust != (c != 13)) begin
          failures++;
          $display("sel %0d code %0d -> edge %0d next %0d", s, c, edge_phase, sel_next);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
