// temp_register: temperature-reading mux and 8-bit temperature register.
//
// According to the sensor-select bits, the mux passes either the
// ring-oscillator down-counter value or the 8-bit on-chip digital-filter
// output. The register takes the mux output on each Loading Enable pulse
// from the clock counter. It therefore holds the latest sample, refreshed at
// the rate set by the sampling register. This structure follows the
// document. The reset value of 0 is this design's choice.
//
// Interface: clk, rst_n (asynchronous, active low), sel, osc_count,
// filter_temp, load_en, temp. temp changes on the clock edge at which
// load_en is high.
module temp_register
  import tmic_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  sensor_sel_e  sel,
  input  logic [W-1:0] osc_count,
  input  logic [W-1:0] filter_temp,
  input  logic         load_en,
  output logic [W-1:0] temp
);

  logic [W-1:0] reading;

  assign reading = (sel == SEL_ONCHIP) ? filter_temp : osc_count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       temp <= '0;
    else if (load_en) temp <= reading;
  end

endmodule
