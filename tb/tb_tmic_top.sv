// tb_tmic_top: end-to-end test of the TMIC at its default parameters.
//
// The testbench acts as the PowerPC 604 and its software. It reaches the
// TMIC only through four-beat bursts on the bus. The on-chip sensor's
// digital filter is a testbench-driven byte. Each ERIF ring oscillator is a
// behavioural model (ring_osc_model) powered by the TMIC's supply enables.
//
// Sequence:
//  1. Reset values read back over the bus.
//  2. ACPI-style thresholds. Software enables the interrupt, selects the
//     on-chip sensor and stores the passive trip point (PSV). The filter
//     reading then ramps up. On each interrupt, software reads the
//     temperature line and the flag, acts, and stores the next trip point:
//     active (ACX), then critical (CRT). The interrupt must come within one
//     sampling interval of the crossing and must drop once the higher trip
//     point is stored.
//  3. Polling. With the interrupt disabled, the flag must be readable while
//     the interrupt line stays quiet. Enabling it then raises the interrupt.
//  4. Ring oscillators. Each oscillator is selected in turn. Only its supply
//     may be on, and the reading must be 255 minus the number of its edges
//     in one sampling interval, within one count.
// Every burst chooses a random delay before DBB. The test counts each
// mechanism it exercises and fails if any of them never occurred.
module tb_tmic_top;
  import tmic_pkg::*;
  localparam logic [2:0] DEV     = 3'b110;  // tmic_top default
  localparam logic [7:0] PSV     = 8'd60;
  localparam logic [7:0] ACX     = 8'd80;
  localparam logic [7:0] CRT     = 8'd100;
  localparam int         CLK_T   = 10;

  logic clk = 1'b0, rst_n = 1'b0;
  logic ts_n, tt_rd, dbb_n, d_oe, aack_n, ta_n, int_n;
  logic [3:0] addr;
  logic [7:0] d_in, d_out, filter_temp;
  logic [2:0] osc, osc_vdd_en;
  int half_period [3] = '{25, 40, 50};
  int checks = 0, failures = 0;
  int cycle = 0;
  logic [7:0] last_temp = 8'h00;

  // mechanisms
  int n_burst_wr = 0, n_burst_rd = 0, n_dbb_wait = 0, n_foreign = 0;
  int n_sample = 0, n_sel [4] = '{0, 0, 0, 0};
  int n_irq [3] = '{0, 0, 0};
  int n_rearm = 0, n_poll = 0, n_irq_enable = 0;

  tmic_top dut (
    .clk, .rst_n, .ts_n, .tt_rd, .addr, .dbb_n, .d_in, .d_out, .d_oe,
    .aack_n, .ta_n, .int_n, .osc, .osc_vdd_en, .filter_temp
  );

  for (genvar i = 0; i < 3; i++) begin : g_osc
    ring_osc_model u_osc (.vdd_en(osc_vdd_en[i]), .half_period(half_period[i]), .osc(osc[i]));
  end

  always #(CLK_T/2) clk = ~clk;
  always @(posedge clk) cycle++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cycle, what); end
  endtask

  // Four-beat burst as the 604 runs it; checks the handshake timing.
  task automatic burst(input bit rd, input bit line, input logic [3:0][7:0] wd,
                       output logic [3:0][7:0] rv);
    automatic int wait_c = $urandom_range(0, 3);
    @(negedge clk);
    ts_n = 1'b0; tt_rd = rd; addr = {DEV, line};
    @(negedge clk);
    ts_n = 1'b1; addr = 4'h0;
    check(!aack_n && ta_n, "AACK one cycle after TS");
    for (int w = 0; w < wait_c; w++) begin
      @(negedge clk);
      check(aack_n && ta_n, "no TA before DBB");
    end
    if (wait_c > 0) n_dbb_wait++;
    dbb_n = 1'b0;
    for (int b = 0; b < 4; b++) begin
      @(negedge clk);
      check(!ta_n, "four consecutive TA beats");
      if (rd) rv[b] = d_out; else d_in = wd[b];
    end
    @(negedge clk);
    dbb_n = 1'b1; d_in = '0;
    check(ta_n, "burst ends after four beats");
    if (rd) n_burst_rd++; else n_burst_wr++;
  endtask

  task automatic write_ctrl(input logic ie, input sensor_sel_e sel,
                            input logic [7:0] sample, input logic [7:0] thresh);
    logic [3:0][7:0] rv;
    burst(1'b0, LINE_CTRL, {8'h00, thresh, sample, {1'b0, ie, sel, 4'b0000}}, rv);
    n_sel[int'(sel)]++;
  endtask

  task automatic read_ctrl(output logic [3:0][7:0] rv);
    burst(1'b1, LINE_CTRL, '0, rv);
  endtask

  task automatic read_temp(output logic [7:0] t);
    logic [3:0][7:0] rv;
    burst(1'b1, LINE_TEMP, '0, rv);
    t = rv[0];
    // a new value means the temperature register was reloaded
    if (t != last_temp) n_sample++;
    last_temp = t;
  endtask

  // filter reading ramp
  int ramp_step = 0;      // cycles per +1, 0 = hold
  int cross_cycle [3] = '{-1, -1, -1};
  always @(negedge clk) begin
    if (ramp_step > 0 && cycle % ramp_step == 0 && filter_temp < 8'd120)
      filter_temp <= filter_temp + 1'b1;
  end
  always @(negedge clk) begin
    if (filter_temp > PSV && cross_cycle[0] < 0) cross_cycle[0] = cycle;
    if (filter_temp > ACX && cross_cycle[1] < 0) cross_cycle[1] = cycle;
    if (filter_temp > CRT && cross_cycle[2] < 0) cross_cycle[2] = cycle;
  end

  initial begin
    logic [3:0][7:0] rv;
    logic [7:0] t;
    logic [7:0] trip [3];
    int sample_n;
    ts_n = 1'b1; tt_rd = 1'b0; dbb_n = 1'b1; addr = '0; d_in = '0;
    filter_temp = 8'd40;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // 1. reset values
    read_ctrl(rv);
    check(rv[0] == 8'h00 && rv[1] == 8'hFF && rv[2] == 8'hFF && rv[3] == 8'h00,
          $sformatf("reset values %h", rv));
    check(int_n && osc_vdd_en == 3'b000, "quiet after reset");

    // a TS to another device must not be answered
    @(negedge clk);
    ts_n = 1'b0; tt_rd = 1'b1; addr = {~DEV, 1'b1};
    @(negedge clk);
    ts_n = 1'b1; dbb_n = 1'b0;
    repeat (6) begin check(aack_n && ta_n && !d_oe, "foreign TS ignored"); @(negedge clk); end
    dbb_n = 1'b1; n_foreign++;

    // 2. ACPI-style trip points
    sample_n = 9;
    trip = '{PSV, ACX, CRT};
    write_ctrl(1'b1, SEL_ONCHIP, 8'(sample_n), PSV);
    read_ctrl(rv);
    check(rv[0] == 8'h40 && rv[1] == 8'(sample_n) && rv[2] == PSV, $sformatf("readback %h", rv));
    // a lowered sampling value takes effect once the running count wraps
    repeat (260) @(negedge clk);
    ramp_step = 7;
    for (int lvl = 0; lvl < 3; lvl++) begin
      automatic int guard = 0;
      while (int_n && guard < 20000) begin @(negedge clk); guard++; end
      check(!int_n, $sformatf("interrupt for trip point %0d", lvl));
      check(cross_cycle[lvl] >= 0 && cycle - cross_cycle[lvl] <= sample_n + 1,
            $sformatf("interrupt latency %0d cycles, limit %0d", cycle - cross_cycle[lvl], sample_n + 1));
      n_irq[lvl]++;
      read_temp(t);
      check(t > trip[lvl], $sformatf("temperature %0d above trip %0d", t, trip[lvl]));
      read_ctrl(rv);
      check(rv[0][7] && rv[0][6], "flag and enable read back set");
      if (lvl < 2) begin
        // acting on the event, then stepping the threshold up
        write_ctrl(1'b1, SEL_ONCHIP, 8'(sample_n), trip[lvl + 1]);
        @(negedge clk);
        check(int_n, "interrupt drops after the next trip point is stored");
        read_ctrl(rv);
        check(!rv[0][7], "flag clear below the next trip point");
        n_rearm++;
      end
    end
    // critical: shutdown, stop the ramp
    ramp_step = 0;

    // 3. polling: interrupt disabled, flag still visible
    filter_temp = 8'd50;
    write_ctrl(1'b0, SEL_ONCHIP, 8'(sample_n), 8'd20);
    repeat (2 * (sample_n + 1)) @(negedge clk);
    read_ctrl(rv);
    check(rv[0][7] && !rv[0][6], "flag set with interrupt disabled");
    check(int_n, "no interrupt while disabled");
    if (rv[0][7] && int_n) n_poll++;
    write_ctrl(1'b1, SEL_ONCHIP, 8'(sample_n), 8'd20);
    @(negedge clk);
    check(!int_n, "interrupt when enabled");
    if (!int_n) n_irq_enable++;
    write_ctrl(1'b0, SEL_ONCHIP, 8'(sample_n), 8'hFF);

    // 4. ring oscillators, one after another
    sample_n = 199;
    for (int k = 0; k < 3; k++) begin
      automatic int edges = (sample_n + 1) * CLK_T / (2 * half_period[k]);
      automatic int expect_v = 255 - edges;
      write_ctrl(1'b0, sensor_sel_e'(k + 1), 8'(sample_n), 8'hFF);
      @(negedge clk);
      check(osc_vdd_en == 3'(1 << k), $sformatf("only OSC%0d powered: %b", k + 1, osc_vdd_en));
      repeat (3 * (sample_n + 1)) @(negedge clk);
      read_temp(t);
      check(int'(t) >= expect_v - 1 && int'(t) <= expect_v + 1,
            $sformatf("OSC%0d reading %0d expected %0d +-1", k + 1, t, expect_v));
    end
    write_ctrl(1'b0, SEL_ONCHIP, 8'(sample_n), 8'hFF);
    @(negedge clk);
    check(osc_vdd_en == 3'b000, "oscillators off for the on-chip sensor");

    // every mechanism must have happened
    check(n_burst_wr > 0, "burst write");
    check(n_burst_rd > 0, "burst read");
    check(n_dbb_wait > 0, "TA held off until DBB");
    check(n_foreign > 0, "foreign address ignored");
    check(n_sample > 0, "sampling event");
    foreach (n_sel[i]) check(n_sel[i] > 0, $sformatf("sensor %0d selected", i));
    foreach (n_irq[i]) check(n_irq[i] > 0, $sformatf("interrupt at trip point %0d", i));
    check(n_rearm == 2, "threshold re-armed twice");
    check(n_poll > 0, "polled flag");
    check(n_irq_enable > 0, "interrupt enable");
    $display("mechanisms: wr=%0d rd=%0d dbb_wait=%0d foreign=%0d samples=%0d sel=%0d/%0d/%0d/%0d irq=%0d/%0d/%0d rearm=%0d poll=%0d enable=%0d",
             n_burst_wr, n_burst_rd, n_dbb_wait, n_foreign, n_sample,
             n_sel[0], n_sel[1], n_sel[2], n_sel[3], n_irq[0], n_irq[1], n_irq[2],
             n_rearm, n_poll, n_irq_enable);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
