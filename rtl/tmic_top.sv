// tmic_top: Thermal Management Interface Circuit (TMIC) for a PowerPC 604
// node.
//
// The TMIC lets software trade polling against interrupts when it watches
// the node's temperature. It samples one of four sensors at a programmable
// interval into an 8-bit temperature register. The four sensors are the
// on-chip sensor, through its digital filter, and three ring oscillators on
// the router chip, measured by a frequency counter. It compares each sample
// with a programmable threshold and raises a read-only flag. When enabled,
// it also raises an interrupt. Software reads and writes the registers as
// two burst-only cache lines on the 604 bus.
//
// Structure:
//   ppc604_if          bus slave: TS/AACK/DBB/TA, 4-beat bursts
//   tmic_regfile       configuration (flag, ie, sel), sample, threshold
//   clock_counter      sampling interval -> load_en
//   ring_osc_counter   oscillator mux + 8-bit down counter
//   osc_power_selector supply enables for the oscillators
//   temp_register      sensor mux + temperature register
//   interrupt_gen      threshold comparator, flag and interrupt
// The blocks and how they connect follow the document's block diagram. The
// details each submodule chooses for itself are described in that module.
//
// Interface: SYSCLK (clk) and an active-low reset. The 604 bus signals ts_n,
// tt_rd, addr (A0-A3, addr[3] = A0), dbb_n, d_in/d_out/d_oe (D0-D7,
// bit 7 = D0), aack_n and ta_n. int_n is the active-low interrupt. osc[2:0]
// are OSC1-OSC3 from the ERIF, osc_vdd_en[2:0] their supply enables, and
// filter_temp is the 8-bit reading of the on-chip sensor's digital filter.
module tmic_top
  import tmic_pkg::*;
#(
  parameter logic [2:0] DEV_SEL = 3'b110
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ts_n,
  input  logic          tt_rd,
  input  logic [3:0]    addr,
  input  logic          dbb_n,
  input  logic [DW-1:0] d_in,
  output logic [DW-1:0] d_out,
  output logic          d_oe,
  output logic          aack_n,
  output logic          ta_n,
  output logic          int_n,
  input  logic [2:0]    osc,
  output logic [2:0]    osc_vdd_en,
  input  logic [DW-1:0] filter_temp
);

  reg_wr_t       wr;
  rd_sel_e       rd_sel;
  logic [DW-1:0] rdata;
  logic          ie;
  sensor_sel_e   sel;
  logic [DW-1:0] sample;
  logic [DW-1:0] thresh;
  logic [DW-1:0] temp;
  logic [DW-1:0] osc_count;
  logic          load_en;
  logic          flag;
  logic          irq;

  ppc604_if #(.W(DW), .DEV_SEL(DEV_SEL)) u_bus (
    .clk, .rst_n, .ts_n, .tt_rd, .addr, .dbb_n, .d_in,
    .aack_n, .ta_n, .d_out, .d_oe, .wr, .rd_sel, .rdata
  );

  tmic_regfile #(.W(DW)) u_regs (
    .clk, .rst_n, .wr, .rd_sel, .flag, .temp,
    .rdata, .ie, .sel, .sample, .thresh
  );

  clock_counter #(.CW(DW)) u_clkcnt (
    .clk, .rst_n, .sample, .load_en
  );

  ring_osc_counter #(.W(DW)) u_osccnt (
    .clk, .rst_n, .osc, .sel, .load_en, .count(osc_count)
  );

  osc_power_selector u_pwr (
    .sel, .osc_vdd_en
  );

  temp_register #(.W(DW)) u_temp (
    .clk, .rst_n, .sel, .osc_count, .filter_temp, .load_en, .temp
  );

  interrupt_gen #(.W(DW)) u_int (
    .temp, .thresh, .ie, .flag, .irq
  );

  assign int_n = ~irq;

endmodule
