// can_frame_pkg: testbench helper that builds CAN base-format data frames as bit streams.
//
// build_frame returns the bits a CAN controller puts on TXD for one frame: start of frame,
// 11-bit identifier, RTR, IDE, r0, 4-bit DLC, data bytes, 15-bit CRC (polynomial 0x4599),
// all with a stuff bit inserted after five equal bits, then CRC delimiter, ACK slot and
// delimiter (left recessive, since no other node acknowledges here), seven end-of-frame bits
// and three intermission bits. 1 = recessive. aux_of() gives the signature bit a transmitter
// modulates into bit k of the frame (0 outside the signature windows).
`timescale 1ns / 1ps
package can_frame_pkg;

  typedef bit frame_q_t[$];

  function automatic frame_q_t build_frame(input bit [10:0] id, input int dlc,
                                           input bit [63:0] data);
    frame_q_t raw, out;
    bit [14:0] crc;
    int run;
    bit last;
    raw.push_back(1'b0);
    for (int i = 10; i >= 0; i--) raw.push_back(id[i]);
    raw.push_back(1'b0); raw.push_back(1'b0); raw.push_back(1'b0);
    for (int i = 3; i >= 0; i--) raw.push_back(dlc[i]);
    for (int b = 0; b < dlc; b++)
      for (int i = 7; i >= 0; i--) raw.push_back(data[63 - 8*b - (7 - i)]);
    crc = '0;
    foreach (raw[i]) begin
      bit nxt;
      nxt = raw[i] ^ crc[14];
      crc = {crc[13:0], 1'b0};
      if (nxt) crc = crc ^ 15'h4599;
    end
    for (int i = 14; i >= 0; i--) raw.push_back(crc[i]);
    run = 0;
    last = 1'b1;
    foreach (raw[i]) begin
      out.push_back(raw[i]);
      if (i != 0 && raw[i] == last) run++;
      else run = 1;
      last = raw[i];
      if (run == 5) begin
        out.push_back(~last);
        last = ~last;
        run = 1;
      end
    end
    for (int i = 0; i < 3 + 7 + 3; i++) out.push_back(1'b1);
    return out;
  endfunction

  function automatic bit aux_of(input int k, input bit [15:0] sig, input bit sig16,
                                input bit auth_en);
    int n, w;
    n = sig16 ? 16 : 8;
    if (!auth_en || k < 13) return 1'b0;
    w = (k - 13) / 5;
    if (w >= n) return 1'b0;
    return sig[n - 1 - w];
  endfunction

endpackage
