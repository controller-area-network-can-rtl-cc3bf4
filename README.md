# CAN transceiver with a phase-modulated authentication channel

Classical CAN has no way to tell a genuine frame from an injected one. This transceiver adds
frame authentication without changing the CAN protocol, the frame format or the software that
builds frames. A signature of 8 or 16 bits travels in the *timing* of the frame's edges. The
sending transceiver delays some data edges by 3 time quanta (120 ns at 1 Mb/s), which is well
inside the jitter a CAN receiver must accept anyway. An ordinary CAN node on the same bus
sees a normal frame with a little jitter, as long as its sample point is not too late in the bit
(see *Known limits*). An equipped receiver measures each edge's phase,
rebuilds the signature and compares it with the one its own signature generator expects. At the
end of the frame it raises **GO** or **NO_GO**.

The bits are unchanged; the signature is a second, "virtual" channel on the same wires. The
design also includes the analog rail converters, as behavioural models. These move the
single-rail logic signal onto the CANH/CANL pair and back while keeping its edge timing. The
phase channel depends on that.

All digital logic runs from one local 25 MHz clock. One clock period is one CAN time quantum
(TQ = 40 ns), and one bit at 1 Mb/s is 25 TQ.

## How a signature bit is carried

```
 bit times      |<------ 25 TQ ------>|<------ 25 TQ ------>|
 signature 0    edge at TQ 0 of the bit (on time)
 signature 1    edge at TQ 3 of the bit (120 ns late)
```

* **Rate.** Each signature bit covers five consecutive CAN bits, called a *window*. CAN bit
  stuffing never allows more than five equal bits in a row. So every window holds at least one
  edge that can carry the phase.
* **Which bits are modulated.** The start of frame and the arbitration field are sent
  unshifted. Windows start at bit 13 (counting the start-of-frame bit as 0) and follow each
  other for 8 or 16 windows, i.e. 40 or 80 bits. A 16-bit signature therefore needs a frame
  that is still in its CRC field at bit 93. A base frame with 8 data bytes has 98 bits before
  the CRC delimiter. An 8-bit signature needs at least 3 data bytes. A frame too short for its
  signature gets NO_GO.
* **Stuff bits.** Both ends count bit times as they appear on the bus, stuff bits included.
  The transceiver never removes stuffing, so transmitter and receiver cut the frame into the
  same windows.
* **Signature order.** The most significant bit goes first. In 8-bit mode the low byte of the
  16-bit signature word is used. The length is selected at reset (`cfg_sig16`).
* **Effect on bit times.** All edges inside a window move together, so bit lengths change
  only where the signature changes. A 0-to-1 change stretches one bit to 28 TQ, and a 1-to-0
  change shortens one bit to 22 TQ. Both stay within CAN's resynchronisation tolerance.

## Transmitter: `phase_modulator`

The modulator is a D flip-flop that re-samples the data coming from the CAN controller
(`tx_data`). Its clock, CLKM, is one of two 1 MHz clocks:

* CLK0, produced by dividing the 25 MHz clock by 25;
* CLK0_D, which is CLK0 delayed by 3 TQ.

The signature bit of the current window chooses between them.

In this RTL the clocks are not real clock nets. `clk_div_delay_line` is a modulo-25 counter
followed by a chain of 1 TQ flip-flop delay cells. It provides every delayed copy of CLK0 plus a
one-cycle strobe when each copy rises. The "flip-flop clocked by CLKM" is a register enabled by
the strobe of tap 0 or tap 3.

The multiplexer select is latched at each CLK0 rising edge. That way CLKM fires exactly once
per bit, even when the signature bit changes between the two candidate edges. An assertion
checks this.

The modulator also finds the frame in the data stream itself:

* While idle, the first dominant sample is the start of frame (SOF). The signature is latched
  at that point, so the host may step its generator during the frame.
* Seven recessive samples in a row end the frame.
* Between those two points it drives `tx_en`, the enable of the output stage.
* While the node's own receiver is inside a frame that another node sends, `tx_data` goes
  straight to the output, and the stage is enabled only for dominant data. This is how the
  host's acknowledgement bit (or an error flag) reaches the bus at the time the host chose.
  Without it, the bit would be re-timed to this node's CLK0, which is not aligned with the
  sender's bits, and would be taken for a start of frame.

The controller should change `tx_data` when `tx_launch` pulses (CLK0 falling edge, TQ 13). The
data is then stable at both possible sampling points, TQ 0 and TQ 3. The modulated output
`tx_in_mon` changes one cycle after the selected strobe: at TQ 1 for a 0 window, TQ 4 for a 1
window.

## Receiver: `phase_extractor`

The receiver has two jobs that pull in opposite directions:

* **Recovering the data** needs a sampling clock that follows every edge, including the 3 TQ
  shifts the modulator put there.
* **Recovering the signature** needs a clock that does *not* follow those shifts, so that it
  can measure them.

It therefore derives two clocks from the same 25-tap delay line.

```
 rx_in -> 2-FF sync -> edge detect --+--> TDC1 --> Decoder1 --> CLK_SEL1 --> CLK1 --> sample FF -> rx_data
                                     |                  \                                   (rx_clk)
                                     |                   `--(at SOF)--> CLK_SEL2 --> CLK2
                                     +--> TDC2 (vs CLK2) --> aux_recovery --> sig_rec --> sig_comp -> go_nogo
```

* **CLK1, soft synchronisation.** `tdc` measures, in whole TQ, the time from the last CLK1
  rising edge to each data edge. `decoder1` turns the reading into a new tap,
  `sel + code - 13 (mod 25)`. This moves CLK1's falling edge onto the data edge, which puts
  its rising edge, the sampling point, in the middle of the bit. The full correction is applied
  at every edge; there is no step limit. So CLK1 follows modulation, jitter and drift, and
  `rx_data` is the plain CAN bit stream. CLK1 is also the recovered clock.
* **CLK2, hard synchronisation.** At the SOF edge (the first 1-to-0 edge while idle),
  `clk_sel` for CLK2 is loaded once with the tap whose rising edge coincides with that edge.
  It then stays fixed for the whole frame. The SOF is never modulated, so CLK2's rising edges
  mark where unshifted edges should fall.
* **Phase decision.** A second TDC times every edge against CLK2. `aux_recovery` reads 0..12
  TQ as a late edge and 13..24 as an early one (negative phase, from clock drift). It decodes
  below 2 TQ as `0` and 2 TQ or more as `1`. The first edge of each window decides that
  window's bit, which is then shifted into `sig_rec`.
* **Verdict.** When the frame ends (seven recessive bits), `sig_comp` XORs the recovered
  signature with the expected one, latched at SOF. GO needs no differing bit among the 16, or
  the low 8, *and* all windows received *and* authentication enabled. The verdict holds until
  the next SOF.

### Error budget

Because CLK2 is fixed for the whole frame, the following all add up against it:

* the difference between the two nodes' oscillators;
* the TDC's 1 TQ quantisation;
* jitter.

The 2 TQ threshold sits between 0 and 3 TQ. So a `0` still decodes correctly with an edge up to
1 TQ late, and a `1` with an edge up to 1 TQ early. The 1 TQ quantisation of the start-of-frame
edge uses up whatever part of that margin the clock phase happens to take, so the guaranteed
budget is an accumulated phase error of under 1 TQ at the last edge that decides a signature bit.

* **16-bit signature.** The last window starts at bit 88 and may need an edge as late as bit
  92, which is 2300 TQ after the start of frame. The guaranteed offset is therefore
  1/2300 ≈ ±0.043 %.
* **8-bit signature.** The last decision comes by bit 52 (1300 TQ), which allows about
  ±0.077 %.

At ±0.05 % a 16-bit signature is usually still recovered. The two 16-bit test words in the
end-to-end testbench are recovered at +0.05 % and at −0.05 %. Whether it works depends on the
clock phase and on where the last window's first edge falls. In a run of 200 random 16-bit
frames at exactly ±0.05 %, 15 (about 7 %) lost a bit in the last windows. The frame data was
always recovered. Re-locking CLK2 at the first modulated bit would shorten the span to the 80
modulated bits (2000 TQ) and give ±0.05 % exactly. This design does not do that.

## Signatures: `sig_gen` and synchronisation

Each transceiver has two signature generators:

* a **TX generator**, for the frames it sends;
* an **RX generator**, for the signature it expects on frames it receives.

The included generator is only an example. It is a 16-bit maximal-length LFSR
(x^16 + x^14 + x^13 + x^11 + 1) whose state goes through a keyed add-rotate-xor hash. Its key is
the parameter `KEY`.

Nodes stay in step as follows:

* the host broadcasts a seed (`sig_seed_load`, `sig_seed`);
* each node steps its generators on command (`tx_sig_advance`, `rx_sig_advance`), as often as
  the system wants a new signature: per frame or per group of frames.

A production system is expected to use its own security module. With `sig_ext_en` set, the host
supplies both signatures directly (`tx_sig_ext`, `rx_sig_ext`).

With `cfg_auth_en` low the node behaves like an unequipped transceiver:

* it sends frames unshifted;
* it gives no verdict.

An equipped receiver reading a frame from such a node recovers the data normally and reports
NO_GO.

## Rail converters (behavioural models)

These two modules stand for analog circuits. They carry voltages as integer millivolts. They
exist so that the end-to-end simulation has a physical layer. They are not meant for
synthesis into a product.

* `tx_rail_converter`: when EN is high, a dominant bit drives CANH to 1.8 V and CANL to 0 V. A
  recessive bit drives both lines to the 0.9 V common mode itself, instead of leaving that to
  the termination. This gives both edges the same drive strength, so pulse widths survive. When
  EN is low the stage is disconnected (`can_drive = 0`).
* `rx_rail_converter`: a hysteretic comparator on CANH − CANL. It switches to dominant above
  V_THH = V_REFH − V_REFL + V_OS = 1.2 V, switches to recessive below V_THL = 0.6 V, and holds in
  between. A step on one line alone leaves the difference inside the band, so the output moves
  only when the later of the two lines arrives. Skew between CANH and CANL therefore delays
  both edges equally and leaves the pulse width intact. The held state is a latch, the only one
  in the design, and intentional.

On the digital side 1 = recessive, as on a CAN TXD/RXD pin.

## Top level: `can_auth_transceiver`

| group | ports |
|---|---|
| clock, config | `clk` (25 MHz, 1 TQ), `rst_n` (async, active low), `cfg_sig16` (sampled while reset is held), `cfg_auth_en` |
| signatures | `sig_seed_load`, `sig_seed[15:0]`, `tx_sig_advance`, `rx_sig_advance`, `sig_ext_en`, `tx_sig_ext[15:0]`, `rx_sig_ext[15:0]`, out: `rx_sig_expected[15:0]` |
| host, transmit | `tx_data` in; `tx_clk0`, `tx_launch`, `tx_aux` (signature bit being sent), `tx_in_mon` (modulated stream) out |
| bus | out: `can_drive`, `canh_drv_mv[11:0]`, `canl_drv_mv[11:0]` (what this node drives); in: `canh_mv[11:0]`, `canl_mv[11:0]` (the resolved bus) |
| host, receive | `rx_out_mon`, `rx_data`, `rx_clk`, `rx_bit_valid`, `rx_aux_data`, `rx_sig[15:0]`, `go_nogo`, `auth_valid`, `rx_frame_active`, `rx_resync` |

The bus is split into "driven" and "seen" so that several nodes, the cable and the termination
can be modelled outside the transceiver. The end-to-end testbench resolves the bus with
dominant winning and gives each line its own delay.

Module hierarchy:

```
can_auth_transceiver
  sig_gen (x2)
  phase_modulator      -> clk_div_delay_line, sig_window_tracker
  tx_rail_converter, rx_rail_converter
  phase_extractor      -> clk_div_delay_line, clk_sel (x2), tdc (x2), decoder1,
                          aux_recovery -> sig_window_tracker, sig_comp
```

`can_auth_pkg` holds the shared constants: 25 TQ per bit, the 3 TQ shift, 5 bits per signature
bit, the 2 TQ threshold, the first modulated bit and the end-of-frame run.

## What is specified and what is chosen here

These points follow the source description:

* 25 TQ per bit, 25 phase clocks and 25-stage TDCs;
* the 3 TQ shift, one signature bit per five CAN bits, and the 2 TQ decision;
* CLK1 tracking edges with its falling edge, and CLK2 locked at SOF;
* 8/16-bit signatures compared bit-parallel after the frame;
* the rail converters' levels and thresholds;
* the example generator's LFSR-plus-hash structure, and seed broadcast plus commanded stepping.

These are this design's own choices:

* **Edge shifting.** The whole window's edges are shifted (a flip-flop re-sampling the
  stream), not only rising edges. The source also describes the scheme as moving rising edges
  only; the flip-flop structure was taken as authoritative.
* **Frame boundaries.** The first modulated bit is 13. The frame ends after seven recessive
  bits.
* **Receiver details.** Edges are synchronised with two flip-flops. CLK1 samples are ignored
  for one cycle while CLK1 is hard-synchronised at SOF. The first edge of a window decides its
  bit.
* **Generator details.** The LFSR polynomial, the hash, the key and the bit order of the
  signature.
* **EN timing.** `tx_en` is high from SOF to the end-of-frame run.
* **Pass-through while receiving.** The host's bits go to the bus unmodified while another
  node's frame is in progress (see the transmitter section).
* **CLK2 is never retuned during a frame.** The source also speaks of CLK2 being used to
  resynchronise against drift during the frame, without saying how. That cannot be done on
  modulated edges without knowing the signature. So CLK2 stays locked to the start of frame.
  The source's drift budget, 1 TQ of accumulated error across the signature, also assumes no
  correction during the signature (see the error budget above).

## Known limits

* **No ACK slot handling.** The modulator drives the bus for the whole frame, ACK slot
  included. In a real network the receivers' dominant ACK bit would meet this node's actively
  driven recessive level.
* **No arbitration loss handling.** The same applies when this node loses arbitration: it
  keeps driving recessive. The transceiver has no notion of either case.
* **Sample point of conventional nodes.** Where the signature changes from 1 to 0, one bit
  is only 22 TQ long. A conventional CAN node that has synchronised to the late edges samples
  that bit at its own sample point. At 1 Mb/s with 25 TQ per bit, nodes sampling at or before
  80 % (quantum 20) read every frame in simulation. At 84 % a few frames were misread, and at
  87.5 % nearly all of them. Mixed networks must set conventional nodes' sample points
  accordingly.
* **No error frame on NO_GO.** The source mentions that a failed check can optionally raise an
  error frame. Here the verdict is only a signal to the host, and it comes after the end of
  frame, when CAN no longer allows an error frame for that frame.
* **No frame decoding.** Only bit times are counted. Frames with extended identifiers, or
  remote frames, are modulated from the same bit 13, which lies inside their arbitration
  field.
* **No error frames.** A frame interrupted by an error frame will not produce a meaningful
  verdict.
* **Ideal analog models.** The rail converters switch instantaneously and have no supply or
  temperature dependence. Edge slopes, offset mismatch and the transistor-level circuit are
  not modelled.

## Simulation

Every testbench is self-checking. It ends with `TB_RESULT checks=N failures=M` and has a
watchdog.

| testbench | what it shows |
|---|---|
| `tb_clk_div_delay_line` | tap levels, rising strobes, 25 TQ period, 3 TQ delay of CLK0_D |
| `tb_clk_sel`, `tb_tdc`, `tb_decoder1` | selection and strobe, TDC reading for every delay 0..24, exhaustive decoder table |
| `tb_phase_modulator` | on stuffed CAN frames: every output edge at +1 or +4 cycles from CLK0 as its window demands; EN timing; 22/28 TQ bits; 8-bit and disabled modes; pass-through while another frame is on the bus |
| `tb_aux_recovery`, `tb_sig_comp`, `tb_sig_gen` | demodulation with ±1 TQ jitter; verdict rules; generator against a reference model, 65535-step period, avalanche |
| `tb_phase_extractor` | receiver on drawn waveforms with random phase, jitter and drift: every bit, the signature, GO/NO_GO in all cases |
| `tb_tx_rail_converter`, `tb_rx_rail_converter` | drive levels over 500 random steps, with dominant-going and recessive-going edges reaching the lines after the same delay; hysteresis and the later-line rule under skew |
| `tb_can_auth_transceiver` | two nodes with separate clocks on a modelled bus (details below) |
| `tb_plain_node_compat` | backward compatibility: four conventional CAN receivers (`can_bit_timing_rx`, a model of standard bit timing with hard sync and SJW-limited resync), with SJW 1 or 4 and sample point 70 % or 80 %, read 60 random frames bit for bit (every tenth unmodulated), while an authenticating node gives GO and acknowledges each frame |
| `tb_auth_random_traffic` | 320 random frames between two nodes with random identifier, payload, length, signature, clock phase, offset within ±0.04 % and CANH/CANL skew up to 110 ns; a quarter with a one-bit signature mismatch. Every bit, signature and verdict is checked |

`tb_can_auth_transceiver` runs with all parameters at their defaults. It covers:

* GO, and GO again after both generators step;
* NO_GO when the generators are out of step, and NO_GO from an unequipped sender;
* no verdict when the receiver has authentication off;
* 8- and 16-bit signatures, and traffic in both directions;
* an acknowledgement on every frame from the receiving node's host. The receiver and the
  sender's own receiver must both read it, and the receiving node may drive the bus for that
  one bit only;
* the two measured 16-bit words at +0.05 % and −0.05 % frequency offset;
* 50 ns, 100 ns and 110 ns CANH/CANL skew, with RX_OUT pulse widths checked against TX_IN
  (including pulses of 1 µs + 3 TQ and 3 µs + 3 TQ).

It counts each of these events and fails if any never happens.

Run one with Verilator 5 from the repository root, listing the packages first:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/can_auth_pkg.sv tb/can_frame_pkg.sv tb/sig_ref_pkg.sv \
    tb/tb_can_auth_transceiver.sv --top-module tb_can_auth_transceiver
./obj_dir/Vtb_can_auth_transceiver
```

Building takes about 15 s, and the end-to-end run takes under a second once built. The
bus model's line delays are variables, so Verilator prints `ZERODLY` warnings for that
testbench. That is why the command has `-Wno-fatal`. Test helpers live in
`tb/`:

* `can_frame_pkg` builds stuffed base frames with a real CRC-15 and gives the expected
  signature bit of each frame bit.
* `sig_ref_pkg` is the reference model of the example generator.
