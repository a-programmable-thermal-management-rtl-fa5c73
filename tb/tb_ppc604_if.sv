// tb_ppc604_if: checks the PowerPC 604 bus slave on its own.
// The testbench plays the bus master: it asserts TS with an address, then
// grants itself the data bus after a chosen delay, and follows TA. It checks:
//   * AACK comes exactly one cycle after TS
//   * TA starts one cycle after DBB is asserted (or right after AACK when
//     DBB is already asserted) and lasts exactly four consecutive cycles
//   * writes on the control line give loading strobes for configuration,
//     sample and threshold on beats 0, 1, 2 with the beat's data
//   * writes to the temperature line load nothing
//   * reads drive, on each beat, the byte of the register named by the
//     beat map, with d_oe high
//   * a TS to another device is not answered.
// A register model in the testbench answers rd_sel with a known byte per
// register.
module tb_ppc604_if;
  import tmic_pkg::*;
  localparam logic [2:0] DEV = 3'b101;

  logic clk = 1'b0, rst_n = 1'b0;
  logic ts_n, tt_rd, dbb_n, aack_n, ta_n, d_oe;
  logic [3:0] addr;
  logic [7:0] d_in, d_out, rdata;
  reg_wr_t wr;
  rd_sel_e rd_sel;
  int checks = 0, failures = 0;
  int n_cfg_we = 0, n_sample_we = 0, n_thresh_we = 0;
  logic [7:0] last_cfg, last_sample, last_thresh;

  ppc604_if #(.W(8), .DEV_SEL(DEV)) dut (.clk, .rst_n, .ts_n, .tt_rd, .addr, .dbb_n, .d_in,
    .aack_n, .ta_n, .d_out, .d_oe, .wr, .rd_sel, .rdata);

  always #5 clk = ~clk;

  // register model: each register reads as a distinct byte
  function automatic logic [7:0] reg_byte(rd_sel_e s);
    case (s)
      RD_TEMP:   return 8'hA1;
      RD_CFG:    return 8'hB2;
      RD_SAMPLE: return 8'hC3;
      RD_THRESH: return 8'hD4;
      default:   return 8'h00;
    endcase
  endfunction
  assign rdata = reg_byte(rd_sel);

  always @(posedge clk) begin
    if (wr.cfg_we)    begin n_cfg_we++;    last_cfg = wr.wdata; end
    if (wr.sample_we) begin n_sample_we++; last_sample = wr.wdata; end
    if (wr.thresh_we) begin n_thresh_we++; last_thresh = wr.wdata; end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // One burst. dbb_wait = cycles after the AACK cycle before DBB is driven.
  task automatic burst(input bit rd, input bit line, input logic [3:0][7:0] wd,
                       output logic [3:0][7:0] rv, input int dbb_wait);
    @(negedge clk);
    ts_n = 1'b0; tt_rd = rd; addr = {DEV, line};
    check(aack_n && ta_n, "idle before TS");
    @(negedge clk);
    ts_n = 1'b1; addr = 4'h0;
    check(!aack_n, "AACK one cycle after TS");
    check(ta_n, "no TA during AACK");
    for (int w = 0; w < dbb_wait; w++) begin
      @(negedge clk);
      check(aack_n && ta_n, "waiting for the data bus");
    end
    dbb_n = 1'b0;
    for (int b = 0; b < 4; b++) begin
      @(negedge clk);
      check(!ta_n, $sformatf("TA on beat %0d", b));
      check(aack_n, "no AACK during data");
      if (rd) begin
        check(d_oe, "d_oe on read beat");
        rv[b] = d_out;
      end else begin
        check(!d_oe, "no drive on write beat");
        d_in = wd[b];
      end
    end
    @(negedge clk);
    dbb_n = 1'b1; d_in = 8'h00;
    check(ta_n && !d_oe, "exactly four beats");
  endtask

  initial begin
    logic [3:0][7:0] rv, wd;
    ts_n = 1'b1; tt_rd = 1'b0; dbb_n = 1'b1; addr = '0; d_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // write the control line
    wd = {8'h44, 8'h33, 8'h22, 8'h11};   // beat3..beat0
    burst(1'b0, 1'b1, wd, rv, 0);
    check(n_cfg_we == 1 && n_sample_we == 1 && n_thresh_we == 1, "one strobe per register");
    check(last_cfg == 8'h11 && last_sample == 8'h22 && last_thresh == 8'h33, "beat map on write");

    // write again with DBB delayed by 3 cycles
    wd = {8'h99, 8'h88, 8'h77, 8'h66};
    burst(1'b0, 1'b1, wd, rv, 3);
    check(n_cfg_we == 2 && last_cfg == 8'h66 && last_sample == 8'h77 && last_thresh == 8'h88,
          "delayed write");

    // writes to the temperature line load nothing
    burst(1'b0, 1'b0, wd, rv, 1);
    check(n_cfg_we == 2 && n_sample_we == 2 && n_thresh_we == 2, "temperature line is read-only");

    // read the control line
    burst(1'b1, 1'b1, '0, rv, 0);
    check(rv[0] == 8'hB2 && rv[1] == 8'hC3 && rv[2] == 8'hD4 && rv[3] == 8'h00,
          $sformatf("control line read %h", rv));

    // read the temperature line
    burst(1'b1, 1'b0, '0, rv, 2);
    check(rv[0] == 8'hA1 && rv[1] == 8'h00 && rv[2] == 8'h00 && rv[3] == 8'h00,
          $sformatf("temperature line read %h", rv));

    // a TS for another device is ignored
    @(negedge clk);
    ts_n = 1'b0; tt_rd = 1'b1; addr = {~DEV, 1'b1};
    @(negedge clk);
    ts_n = 1'b1; dbb_n = 1'b0;
    repeat (8) begin
      check(aack_n && ta_n && !d_oe, "other device not answered");
      @(negedge clk);
    end
    dbb_n = 1'b1;

    // back-to-back random bursts
    for (int i = 0; i < 40; i++) begin
      automatic bit rd = 1'($urandom);
      automatic int ws = n_sample_we;
      wd = {8'($urandom), 8'($urandom), 8'($urandom), 8'($urandom)};
      burst(rd, 1'b1, wd, rv, $urandom_range(0, 3));
      if (rd) check(rv[1] == 8'hC3, "random read");
      else check(n_sample_we == ws + 1 && last_sample == wd[1], "random write");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
