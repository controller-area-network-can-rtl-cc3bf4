// sig_gen: example signature generator (the transceiver's built-in hardware security module).
//
// A 16-bit maximal-length Fibonacci LFSR (x^16 + x^14 + x^13 + x^11 + 1) holds the signature
// root. Its state is scrambled by a small keyed hash of additions and rotations so that a
// one-bit change of the state changes many signature bits. All nodes stay in step because
// the host loads the same seed into every node (seed_load, a broadcast at bus start-up or
// later) and then steps the LFSR on command (advance), as often as it wants fresh
// signatures: per frame or per group of frames. An all-zero seed, which would lock the LFSR,
// is replaced by 16'h0001. `sig` follows the state combinationally, so a new signature is
// available in the cycle after seed_load or advance.
// The document calls for an LFSR scrambled by a small hash and for seed broadcast plus
// commanded stepping; the polynomial, the hash and KEY are this design's choices, and a
// real deployment is expected to replace this module with its own security module.
`timescale 1ns / 1ps
module sig_gen
  import can_auth_pkg::*;
#(
  parameter logic [15:0] KEY = 16'h5A3C
) (
  input  logic clk,
  input  logic rst_n,
  input  logic seed_load,
  input  sig_t seed,
  input  logic advance,
  output sig_t sig,
  output sig_t state
);

  function automatic sig_t rotl(sig_t x, int unsigned n);
    return (x << n) | (x >> (SIG_MAX_BITS - n));
  endfunction

  function automatic sig_t scramble(sig_t s);
    sig_t x;
    x = s ^ KEY;
    x = x + rotl(x, 5);
    x = x ^ rotl(x, 9);
    x = x + rotl(x, 3);
    x = x ^ rotl(x, 12);
    x = x + (rotl(x, 7) ^ KEY);
    return x;
  endfunction

  logic feedback;
  assign feedback = state[15] ^ state[13] ^ state[12] ^ state[10];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         state <= 16'h0001;
    else if (seed_load) state <= (seed == '0) ? 16'h0001 : seed;
    else if (advance)   state <= {state[14:0], feedback};
  end

  assign sig = scramble(state);

endmodule
