// tmic_pkg: types and constants shared by the thermal management interface
// circuit (TMIC).
//
// Bit numbering. The PowerPC bus numbers bits from the most significant end
// (D0 is the MSB of a byte, A0 the MSB of an address). All vectors here are
// declared [N-1:0], so bus bit D0 is bit 7 of a byte and address pin A0 is
// bit 3 of the 4-bit address.
//
// Configuration register. The 4-bit register sits on D0-D3 and holds the
// read-only threshold flag, the interrupt enable and two sensor-select bits.
// Which bit is where is this design's choice: the flag is on D0, the sign
// bit of the byte, so software can test it right after one load.
//
// Register map. The registers fill two cache lines. One address pin picks
// the line. The beat number inside a four-beat burst picks the register:
//   temperature line: beat 0 = temperature register
//   control line:     beat 0 = configuration, beat 1 = sample,
//                     beat 2 = threshold
// Other beats read as zero, and writes to them are ignored. Both the line
// split and the beat map are this design's choices.
package tmic_pkg;

  // Width of the data registers and of the D0-D7 bus lane.
  localparam int unsigned DW = 8;

  // Number of data beats in a burst (four-clock burst mode).
  localparam int unsigned BEATS = 4;

  // Sensor selection: the embedded sensor or one of the three ERIF ring
  // oscillators.
  typedef enum logic [1:0] {
    SEL_ONCHIP = 2'd0,
    SEL_OSC1   = 2'd1,
    SEL_OSC2   = 2'd2,
    SEL_OSC3   = 2'd3
  } sensor_sel_e;

  // Configuration register, most significant field first (D0 .. D3).
  typedef struct packed {
    logic        flag;  // D0: threshold flag, read-only
    logic        ie;    // D1: interrupt enable
    sensor_sel_e sel;   // D2-D3: sensor selection
  } cfg_t;

  // Cache line selected by address pin A3.
  typedef enum logic {
    LINE_TEMP = 1'b0,
    LINE_CTRL = 1'b1
  } line_e;

  // Beat numbers inside a burst on the control line.
  localparam logic [1:0] BEAT_CFG    = 2'd0;
  localparam logic [1:0] BEAT_SAMPLE = 2'd1;
  localparam logic [1:0] BEAT_THRESH = 2'd2;
  localparam logic [1:0] BEAT_TEMP   = 2'd0;  // on the temperature line

  // Register loading signals: one write strobe per writable register plus
  // the byte taken from the bus.
  typedef struct packed {
    logic          cfg_we;
    logic          sample_we;
    logic          thresh_we;
    logic [DW-1:0] wdata;
  } reg_wr_t;

  // Bus enable signals: which register drives the bus during a read beat.
  typedef enum logic [2:0] {
    RD_NONE   = 3'd0,
    RD_TEMP   = 3'd1,
    RD_CFG    = 3'd2,
    RD_SAMPLE = 3'd3,
    RD_THRESH = 3'd4
  } rd_sel_e;

endpackage
