// tx_rail_converter: behavioural model of the enhanced single-to-dual-rail CAN driver.
//
// This is a model of an analog output stage, not logic to be synthesised into a chip: bus
// voltages are carried as integers in millivolts. When EN is high the driver forces both
// levels itself: a dominant bit (tx_in = 0) pulls CANH to VDD and CANL to ground, a recessive
// bit (tx_in = 1) pulls both lines to the common-mode voltage VCM through its own switches,
// so both edges are driven with the same strength and the bit keeps its width. When EN is
// low the switches disconnect the stage (drive = 0) and the termination alone sets the bus.
// The reported voltages then read VCM. Transitions are taken as instantaneous; the wiring
// model around the transceiver adds line delays. The drive scheme follows the document; the
// 1.8 V supply and 0.9 V common mode come from its receiver description.
`timescale 1ns / 1ps
module tx_rail_converter #(
  parameter int unsigned VDD_MV = 1800,
  parameter int unsigned VCM_MV = 900
) (
  input  logic        tx_in,     // TX_IN, 1 = recessive
  input  logic        en,        // EN, driver connected
  output logic        drive,     // the stage drives the lines
  output logic [11:0] canh_mv,   // V_CANH as driven
  output logic [11:0] canl_mv    // V_CANL as driven
);

  always_comb begin
    drive = en;
    if (en && !tx_in) begin
      canh_mv = 12'(VDD_MV);
      canl_mv = 12'd0;
    end else begin
      canh_mv = 12'(VCM_MV);
      canl_mv = 12'(VCM_MV);
    end
  end

endmodule
