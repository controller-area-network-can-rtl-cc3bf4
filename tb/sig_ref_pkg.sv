// sig_ref_pkg: reference model of the example signature generator, for testbenches.
// ref_step advances a 16-bit Fibonacci LFSR with taps 16, 14, 13, 11 by one step;
// ref_hash is the keyed add-rotate-xor scrambler (key 16'h5A3C) applied to the LFSR state.
`timescale 1ns / 1ps
package sig_ref_pkg;

  function automatic logic [15:0] rl(logic [15:0] x, int n);
    return (x << n) | (x >> (16 - n));
  endfunction

  function automatic logic [15:0] ref_hash(logic [15:0] s);
    logic [15:0] x;
    x = s ^ 16'h5A3C;
    x = x + rl(x, 5);
    x = x ^ rl(x, 9);
    x = x + rl(x, 3);
    x = x ^ rl(x, 12);
    x = x + (rl(x, 7) ^ 16'h5A3C);
    return x;
  endfunction

  function automatic logic [15:0] ref_step(logic [15:0] s);
    return {s[14:0], s[15] ^ s[13] ^ s[12] ^ s[10]};
  endfunction

endpackage
