// tb_sig_gen: checks the example signature generator.
// A reference LFSR and hash written here from their definitions (taps 16,14,13,11; keyed
// add-rotate-xor rounds) must match the module after seed loading and every step; the LFSR
// must return to its seed after exactly 65535 steps (maximal length) and not earlier; a zero
// seed must load as 1; a one-bit change of the state must flip several signature bits.
`timescale 1ns / 1ps
module tb_sig_gen;
  import sig_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic seed_load = 0, advance = 0;
  logic [15:0] seed, sig, state;
  int checks = 0, failures = 0;

  sig_gen dut (.clk, .rst_n, .seed_load, .seed, .advance, .sig, .state);

  always #20 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] m;
    int period, flips;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    seed = 16'hACE1; seed_load = 1;
    @(negedge clk);
    seed_load = 0;
    m = 16'hACE1;
    checks++;
    if (state !== m || sig !== ref_hash(m)) failures++;
    for (int i = 0; i < 300; i++) begin
      advance = 1;
      @(negedge clk);
      advance = 0;
      m = ref_step(m);
      checks++;
      if (state !== m || sig !== ref_hash(m)) begin
        failures++;
        $display("step %0d state %h want %h", i, state, m);
      end
    end
    // maximal length
    seed = 16'h0001; seed_load = 1;
    @(negedge clk);
    seed_load = 0;
    advance = 1;
    period = 0;
    do begin
      @(negedge clk);
      period++;
    end while (state != 16'h0001 && period < 70000);
    advance = 0;
    checks++;
    if (period != 65535) begin
      failures++;
      $display("period %0d", period);
    end
    // zero seed
    seed = 16'h0000; seed_load = 1;
    @(negedge clk);
    seed_load = 0;
    checks++;
    if (state !== 16'h0001) failures++;
    // avalanche: average flipped bits over single-bit state changes
    flips = 0;
    for (int b = 0; b < 16; b++) flips += $countones(ref_hash(16'h1234) ^ ref_hash(16'h1234 ^ (16'd1 << b)));
    checks++;
    if (flips < 16 * 4) begin
      failures++;
      $display("avalanche too weak: %0d flips", flips);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
