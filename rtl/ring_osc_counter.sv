// ring_osc_counter: oscillator mux and 8-bit down counter used as a
// frequency counter for the ERIF ring-oscillator temperature sensors.
//
// The document calls for an 8-bit down counter used as a frequency counter,
// fed through a mux of OSC1-OSC3. How it counts is not given, so this is the
// simplest counter that does the job:
//   * The mux passes the oscillator named by sel. With the on-chip sensor
//     selected it passes a constant 0.
//   * Two flip-flops bring the mux output into the SYSCLK domain. A third
//     flop detects rising edges. Oscillators must therefore run below half
//     of SYSCLK.
//   * load_en, the end of a sampling interval, reloads the counter to all
//     ones. Each detected rising edge lowers it by one, and it stops at 0.
// The temperature register takes count on the same load_en edge that
// reloads it. The reading is thus 2^W-1 minus the number of oscillator edges
// in one interval. A hotter, slower oscillator gives a larger number.
// Software converts that number to a temperature using a calibration table.
//
// Interface: clk, rst_n (asynchronous, active low), osc[2:0] (osc[0]=OSC1),
// sel, load_en, count. Latency from an oscillator edge to the decrement is
// three SYSCLK cycles.
module ring_osc_counter
  import tmic_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [2:0]   osc,
  input  sensor_sel_e  sel,
  input  logic         load_en,
  output logic [W-1:0] count
);

  logic osc_mux;
  logic [2:0] sync;  // [0],[1] synchronizer, [2] previous value
  logic rise;

  always_comb begin
    unique case (sel)
      SEL_OSC1: osc_mux = osc[0];
      SEL_OSC2: osc_mux = osc[1];
      SEL_OSC3: osc_mux = osc[2];
      default:  osc_mux = 1'b0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync <= '0;
    else        sync <= {sync[1:0], osc_mux};
  end

  assign rise = sync[1] & ~sync[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                     count <= '1;
    else if (load_en)               count <= '1;
    else if (rise && count != '0)   count <= count - 1'b1;
  end

endmodule
