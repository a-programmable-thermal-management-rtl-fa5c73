// ppc604_if: PowerPC 604 bus slave of the TMIC.
//
// The TMIC appears to the processor as two cache lines that may only be
// accessed in four-beat bursts. One line holds the temperature register.
// The other holds the configuration, sample and threshold registers. This
// unit turns the processor's bus cycles into register loading strobes
// (writes) and bus enable signals (reads).
//
// Address decode. Address pins A0-A2 (addr[3:1]) must equal DEV_SEL when TS
// is asserted. A3 (addr[0]) then picks the line: 0 = temperature, 1 =
// control. The beat number picks the register inside the line (see
// tmic_pkg). tt_rd is 1 for a read and 0 for a write. Which board address
// lines reach the four pins is the board's choice.
//
// Bus cycle (all signals are sampled on the rising edge of clk):
//   cycle t    ts_n low, address ours        -> access taken
//   cycle t+1  aack_n low                    (address tenure ends)
//   then       wait until dbb_n is low: the master owns the data bus
//   4 cycles   ta_n low, one beat per cycle; a read drives d_out with
//              d_oe high; a write is taken on the edge that ends each beat
// TA starts the cycle after AACK if DBB is already low at AACK, and
// otherwise the cycle after DBB is first seen low. Every access addressed to
// the TMIC is treated as a burst, and TS is ignored while an access is under
// way.
//
// The four-beat burst, the two-line map and the TS/DBB/AACK/TA handshake
// follow the document. The pin split, the beat map, the use of TT1 for
// read/write and the exact cycle timing are this design's choices.
module ppc604_if
  import tmic_pkg::*;
#(
  parameter int unsigned W      = 8,
  parameter logic [2:0]  DEV_SEL = 3'b110
) (
  input  logic          clk,
  input  logic          rst_n,
  // PowerPC 604 bus
  input  logic          ts_n,
  input  logic          tt_rd,
  input  logic [3:0]    addr,
  input  logic          dbb_n,
  input  logic [W-1:0] d_in,
  output logic          aack_n,
  output logic          ta_n,
  output logic [W-1:0] d_out,
  output logic          d_oe,
  // register side
  output reg_wr_t       wr,
  output rd_sel_e       rd_sel,
  input  logic [W-1:0] rdata
);

  typedef enum logic [1:0] {S_IDLE, S_AACK, S_DWAIT, S_DATA} state_e;

  state_e     state;
  line_e      line;
  logic       rd;
  logic [1:0] beat;
  logic       hit;

  assign hit = !ts_n && (addr[3:1] == DEV_SEL);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      line  <= LINE_TEMP;
      rd    <= 1'b0;
      beat  <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (hit) begin
          state <= S_AACK;
          line  <= line_e'(addr[0]);
          rd    <= tt_rd;
        end
        S_AACK:  state <= dbb_n ? S_DWAIT : S_DATA;
        S_DWAIT: if (!dbb_n) state <= S_DATA;
        S_DATA: begin
          beat <= beat + 1'b1;
          if (beat == 2'(BEATS - 1)) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign aack_n = (state != S_AACK);
  assign ta_n   = (state != S_DATA);

  // Bus enable signals.
  always_comb begin
    rd_sel = RD_NONE;
    if (state == S_DATA && rd) begin
      if (line == LINE_TEMP) begin
        if (beat == BEAT_TEMP) rd_sel = RD_TEMP;
      end else begin
        unique case (beat)
          BEAT_CFG:    rd_sel = RD_CFG;
          BEAT_SAMPLE: rd_sel = RD_SAMPLE;
          BEAT_THRESH: rd_sel = RD_THRESH;
          default:     rd_sel = RD_NONE;
        endcase
      end
    end
  end

  assign d_oe  = (state == S_DATA) && rd;
  assign d_out = d_oe ? rdata : '0;

  // Register loading signals.
  always_comb begin
    wr       = '0;
    wr.wdata = d_in;
    if (state == S_DATA && !rd && line == LINE_CTRL) begin
      wr.cfg_we    = (beat == BEAT_CFG);
      wr.sample_we = (beat == BEAT_SAMPLE);
      wr.thresh_we = (beat == BEAT_THRESH);
    end
  end

  // Bus rules: the two acknowledges never overlap, and a burst always has
  // exactly four beats once started. Their 'disable iff' reads the
  // asynchronous reset synchronously, which lint reports as a reset used both
  // ways. That does not affect the circuit.
  a_ack_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
    !(!aack_n && !ta_n));
  a_burst_len: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_DATA && beat == 2'd0) |=> (state == S_DATA)[*3] ##1 (state != S_DATA));

endmodule
