// tmic_regfile: configuration, sampling and threshold registers of the TMIC,
// and the read-back mux for the bus.
//
// Registers (all reset asynchronously, active low):
//   configuration  4 bits on D0-D3: {flag, ie, sel}. flag is read-only and
//                  comes from the threshold comparator. ie and sel are
//                  written from D1-D3. Reset: ie = 0, sel = on-chip sensor.
//   sample         8 bits: the sampling interval for the clock counter.
//                  Reset: 8'hFF, the longest interval.
//   threshold      8 bits: the trip point of the comparator. Reset: 8'hFF,
//                  so no reading can exceed it.
// A register loads wr.wdata on the clock edge where its loading strobe in wr
// is high. rdata is the byte chosen by rd_sel, the bus enable signals. The
// configuration byte is {flag, ie, sel, 4'b0000}, with D0 in the MSB. The
// temperature register is read through the same mux.
//
// The register widths and fields follow the document. The bit positions and
// reset values are this design's choices.
module tmic_regfile
  import tmic_pkg::*;
#(
  parameter int unsigned       W         = 8,
  parameter logic [W-1:0]     SAMPLE_RST = '1,
  parameter logic [W-1:0]     THRESH_RST = '1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  reg_wr_t       wr,
  input  rd_sel_e       rd_sel,
  input  logic          flag,
  input  logic [W-1:0] temp,
  output logic [W-1:0] rdata,
  output logic          ie,
  output sensor_sel_e   sel,
  output logic [W-1:0] sample,
  output logic [W-1:0] thresh
);

  cfg_t cfg_rd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ie  <= 1'b0;
      sel <= SEL_ONCHIP;
    end else if (wr.cfg_we) begin
      // D1 is the interrupt enable, D2-D3 the sensor selection.
      ie  <= wr.wdata[W-2];
      sel <= sensor_sel_e'(wr.wdata[W-3 -: 2]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            sample <= SAMPLE_RST;
    else if (wr.sample_we) sample <= wr.wdata[W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            thresh <= THRESH_RST;
    else if (wr.thresh_we) thresh <= wr.wdata[W-1:0];
  end

  assign cfg_rd = '{flag: flag, ie: ie, sel: sel};

  always_comb begin
    unique case (rd_sel)
      RD_TEMP:   rdata = temp;
      RD_CFG:    rdata = {cfg_rd, {(W-4){1'b0}}};
      RD_SAMPLE: rdata = sample;
      RD_THRESH: rdata = thresh;
      default:   rdata = '0;
    endcase
  end

endmodule
