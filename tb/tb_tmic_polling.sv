// tb_tmic_polling: the TMIC used by a polling thermal loop, and its
// interrupt catching a short temperature spike.
//
// Part 1 is a software loop with a granularity window, as in a typical ACPI
// flow. Interrupts are disabled, and the loop reads the temperature line
// over the bus again and again. When a reading falls outside a +-2 window,
// it moves the window there. It starts passive cooling, active cooling and
// shutdown the first time the reading passes each trip point. The on-chip
// reading rises and then falls. The test checks that each action happens
// exactly once, in order, and that the window moved both up and down.
//
// Part 2 samples every cycle (sample register 0) with the interrupt enabled.
// A reading that jumps above the threshold for only two cycles, far shorter
// than one polling round, must still pull int_n low.
module tb_tmic_polling;
  import tmic_pkg::*;
  localparam logic [2:0] DEV = 3'b110;

  logic clk = 1'b0, rst_n = 1'b0;
  logic ts_n, tt_rd, dbb_n, d_oe, aack_n, ta_n, int_n;
  logic [3:0] addr;
  logic [7:0] d_in, d_out, filter_temp;
  logic [2:0] osc, osc_vdd_en;
  int checks = 0, failures = 0;

  tmic_top dut (
    .clk, .rst_n, .ts_n, .tt_rd, .addr, .dbb_n, .d_in, .d_out, .d_oe,
    .aack_n, .ta_n, .int_n, .osc, .osc_vdd_en, .filter_temp
  );

  assign osc = 3'b000;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic burst(input bit rd, input bit line, input logic [3:0][7:0] wd,
                       output logic [3:0][7:0] rv);
    @(negedge clk);
    ts_n = 1'b0; tt_rd = rd; addr = {DEV, line};
    @(negedge clk);
    ts_n = 1'b1; addr = 4'h0; dbb_n = 1'b0;
    for (int b = 0; b < 4; b++) begin
      @(negedge clk);
      check(!ta_n, "TA beat");
      if (rd) rv[b] = d_out; else d_in = wd[b];
    end
    @(negedge clk);
    dbb_n = 1'b1; d_in = '0;
  endtask

  // rising then falling on-chip reading
  int profile_step = 0;
  always @(negedge clk) begin
    if (profile_step > 0) begin
      profile_step++;
      if (profile_step % 5 == 0) begin
        if (profile_step < 5 * 90) filter_temp <= filter_temp + 1'b1;
        else if (filter_temp > 8'd30) filter_temp <= filter_temp - 1'b1;
      end
    end
  end

  initial begin
    logic [3:0][7:0] rv;
    logic [7:0] t, win_lo, win_hi;
    automatic int acted [3] = '{0, 0, 0};
    automatic int order_ok = 1, n_up = 0, n_down = 0;
    automatic logic [7:0] trip [3] = '{8'd70, 8'd90, 8'd110};
    bit seen_low;

    ts_n = 1'b1; tt_rd = 1'b0; dbb_n = 1'b1; addr = '0; d_in = '0;
    filter_temp = 8'd30;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // Part 1: polling with a granularity window
    burst(1'b0, LINE_CTRL, {8'h00, 8'hFF, 8'd3, 8'h00}, rv);  // ie=0, on-chip, every 4 cycles
    repeat (300) @(negedge clk);
    win_lo = 8'd28; win_hi = 8'd32;
    profile_step = 1;
    for (int poll = 0; poll < 400; poll++) begin
      burst(1'b1, LINE_TEMP, '0, rv);
      t = rv[0];
      if (t < win_lo) begin win_lo = t - 8'd2; win_hi = t + 8'd2; n_down++; end
      else if (t > win_hi) begin win_lo = t - 8'd2; win_hi = t + 8'd2; n_up++; end
      for (int k = 0; k < 3; k++)
        if (t > trip[k] && acted[k] == 0) begin
          acted[k]++;
          if (k > 0 && acted[k - 1] == 0) order_ok = 0;
        end
      check(int_n, "no interrupt while polling");
    end
    profile_step = 0;
    check(acted[0] == 1 && acted[1] == 1 && acted[2] == 1 && order_ok == 1,
          $sformatf("passive/active/critical actions %0d/%0d/%0d in order %0d",
                    acted[0], acted[1], acted[2], order_ok));
    check(n_up > 0 && n_down > 0, $sformatf("window moved up %0d and down %0d times", n_up, n_down));

    // Part 2: two-cycle spike, sampling every cycle, interrupt enabled
    filter_temp = 8'd50;
    burst(1'b0, LINE_CTRL, {8'h00, 8'd100, 8'd0, 8'h40}, rv);  // ie=1, on-chip, every cycle
    repeat (300) @(negedge clk);
    check(int_n, "no interrupt below the threshold");
    seen_low = 1'b0;
    filter_temp = 8'd120;
    repeat (2) @(negedge clk);
    filter_temp = 8'd50;
    repeat (4) begin
      if (!int_n) seen_low = 1'b1;
      @(negedge clk);
    end
    check(seen_low, "two-cycle spike raised the interrupt");
    check(int_n, "interrupt released after the spike");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
