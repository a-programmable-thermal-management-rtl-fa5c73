// osc_power_selector: supply control for the three ERIF ring oscillators.
//
// The sensor-select bits of the configuration register are decoded so that
// only the oscillator being measured is powered. When the on-chip sensor is
// selected, all three are off. Turning off the unused oscillators removes
// their heat and noise, as the document intends.
//
// Outputs are active-high enables for external supply switches
// (osc_vdd_en[0] = Osc1 Vdd). Driving the switches is outside this design.
// The logic is purely combinational.
module osc_power_selector
  import tmic_pkg::*;
(
  input  sensor_sel_e sel,
  output logic [2:0]  osc_vdd_en
);

  always_comb begin
    unique case (sel)
      SEL_OSC1: osc_vdd_en = 3'b001;
      SEL_OSC2: osc_vdd_en = 3'b010;
      SEL_OSC3: osc_vdd_en = 3'b100;
      default:  osc_vdd_en = 3'b000;
    endcase
  end

endmodule
