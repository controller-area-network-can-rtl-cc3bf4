// rx_rail_converter: behavioural model of the hysteretic dual-to-single-rail receiver.
//
// This models an analog comparator; voltages are integers in millivolts. An NMOS pair
// compares CANH with VREFH and a PMOS pair compares CANL with VREFL; their summed currents
// act on a latch with built-in offset VOS. The net effect modelled here is a comparison of
// the difference CANH - CANL with two trigger points, VTHH = VREFH - VREFL + VOS (1.2 V) and
// VTHL = VREFH - VREFL - VOS (0.6 V): above VTHH the output goes dominant (0), below VTHL it
// goes recessive (1), in between it holds. A step on one line alone leaves the difference
// inside the band, so the output switches only when the later of the two lines arrives,
// which keeps the rising and falling delays equal under CANH/CANL skew. The output is held
// in a latch, as in the circuit; with an idle bus (difference 0) it settles recessive. The
// thresholds, references and offset are the document's values; the polarity (0 = dominant,
// as on a CAN RXD pin) is this design's choice.
`timescale 1ns / 1ps
module rx_rail_converter #(
  parameter int VREFH_MV = 1350,
  parameter int VREFL_MV = 450,
  parameter int VOS_MV   = 300
) (
  input  logic [11:0] canh_mv,
  input  logic [11:0] canl_mv,
  output logic        rx_out     // RX_OUT, 1 = recessive
);

  localparam int VTHH_MV = VREFH_MV - VREFL_MV + VOS_MV;
  localparam int VTHL_MV = VREFH_MV - VREFL_MV - VOS_MV;

  int vdif;
  assign vdif = int'(canh_mv) - int'(canl_mv);

  logic go_dom, go_rec;   // difference above VTHH / below VTHL
  assign go_dom = (vdif > VTHH_MV);
  assign go_rec = (vdif < VTHL_MV);

  // transparent while outside the band, holding inside it
  always_latch begin
    if (go_dom || go_rec) rx_out = go_rec;
  end

endmodule
