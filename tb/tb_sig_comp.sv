// tb_sig_comp: checks the GO/NO_GO comparator with random signatures in both lengths.
// Expected verdict computed here: GO only if enabled, complete, and the compared bits (16, or
// the low 8) are equal; single-bit errors in the compared bits must give NO_GO, errors in the
// upper byte must not matter in 8-bit mode, and clear must withdraw the verdict.
`timescale 1ns / 1ps
module tb_sig_comp;
  logic clk = 0, rst_n = 0;
  logic clear = 0, eval = 0, enable, sig16, complete;
  logic [15:0] rec, expd, mismatch;
  logic go_nogo, valid;
  int checks = 0, failures = 0;

  sig_comp dut (.clk, .rst_n, .clear, .eval, .enable, .sig16, .complete, .sig_rec(rec),
                .sig_exp(expd), .go_nogo, .valid, .mismatch);

  always #20 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] mask;
    bit exp_go;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      enable   = ($urandom_range(0, 7) != 0);
      sig16    = $urandom_range(0, 1);
      complete = ($urandom_range(0, 7) != 0);
      expd     = 16'($urandom);
      case ($urandom_range(0, 3))
        0: rec = expd;
        1: rec = expd ^ (16'd1 << $urandom_range(0, 15));
        2: rec = expd ^ (16'd1 << $urandom_range(8, 15));
        default: rec = 16'($urandom);
      endcase
      mask   = sig16 ? 16'hFFFF : 16'h00FF;
      exp_go = enable && complete && (((rec ^ expd) & mask) == 0);
      eval = 1;
      @(negedge clk);
      eval = 0;
      checks++;
      if (go_nogo !== exp_go || valid !== enable || mismatch !== ((rec ^ expd) & mask)) begin
        failures++;
        $display("i=%0d rec=%h exp=%h sig16=%b go=%b want %b", i, rec, expd, sig16, go_nogo, exp_go);
      end
      clear = 1;
      @(negedge clk);
      clear = 0;
      checks++;
      if (go_nogo !== 1'b0 || valid !== 1'b0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
