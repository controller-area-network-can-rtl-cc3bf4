// tb_aux_recovery: checks the phase demodulator on synthetic TDC2 readings.
// Bit samples come every 25 cycles after a start-of-frame clear. Before some bit samples an
// edge is reported with a TDC2 reading: around 0 (24, 0, 1) in windows carrying a signature
// '0', around 3 (2, 3, 4) in windows carrying a '1', and arbitrary readings before the first
// window (which must be ignored). Every window gets at least one edge. The recovered
// signature must equal the sent one for 16- and 8-bit signatures, and the serial output
// must show each window's bit after its first edge.
`timescale 1ns / 1ps
module tb_aux_recovery;
  logic clk = 0, rst_n = 0;
  logic clear = 0, bit_tick = 0, sig16 = 1, edge_valid = 0;
  logic [4:0] code;
  logic aux_data, complete;
  logic [15:0] sig_rec;
  logic [4:0] n_rec;
  int checks = 0, failures = 0;

  aux_recovery dut (.clk, .rst_n, .clear, .bit_tick, .sig16, .edge_valid, .code, .aux_data,
                    .sig_rec, .n_rec, .complete);

  always #20 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic frame(input bit [15:0] s, input bit s16);
    int n;
    bit first_seen;
    logic [15:0] want;
    n = s16 ? 16 : 8;
    @(negedge clk);
    sig16 = s16;
    clear = 1;
    @(negedge clk);
    clear = 0;
    for (int k = 0; k < 13 + 5 * n + 4; k++) begin
      bit in_win, has_edge, b;
      int w;
      w = (k - 13) / 5;
      in_win = (k >= 13) && (w < n);
      b = in_win ? s[n - 1 - w] : 1'b0;
      has_edge = ($urandom_range(0, 1) == 1) || (in_win && (k - 13) % 5 == 4);
      if (k < 13 || (k - 13) % 5 == 0) first_seen = 0;
      for (int c = 0; c < 25; c++) begin
        edge_valid = has_edge && (c == 3);
        if (in_win) code = b ? 5'($urandom_range(2, 4)) : 5'((24 + $urandom_range(0, 2)) % 25);
        else        code = 5'($urandom_range(0, 24));
        bit_tick = (c == 15);
        @(negedge clk);
        if (in_win && has_edge && c == 3 && !first_seen) begin
          // the first edge of a window must show its bit
          first_seen = 1;
          checks++;
          if (aux_data !== b) begin
            failures++;
            $display("serial aux %b want %b at bit %0d", aux_data, b, k);
          end
        end
      end
    end
    edge_valid = 0;
    bit_tick = 0;
    want = s16 ? s : {8'h00, s[7:0]};
    checks++;
    if (sig_rec !== want || !complete || n_rec != 5'(n)) begin
      failures++;
      $display("recovered %h want %h (complete %b, %0d windows)", sig_rec, want, complete, n_rec);
    end
  endtask

  initial begin
    code = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    frame(16'b0101001111101101, 1);
    frame(16'b0110111111010010, 1);
    for (int i = 0; i < 10; i++) frame(16'($urandom), 1);
    for (int i = 0; i < 10; i++) frame(16'($urandom), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
