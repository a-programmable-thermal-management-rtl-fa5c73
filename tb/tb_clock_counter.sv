// tb_clock_counter: checks the sampling-interval timer.
// For several sampling values N, it measures the distance between load_en
// pulses (expected N+1 cycles) and the first pulse after reset (expected at
// cycle N). It also checks that the pulse is exactly one cycle wide.
module tb_clock_counter;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] sample;
  logic load_en;
  int checks = 0, failures = 0;

  clock_counter #(.CW(8)) dut (.clk, .rst_n, .sample, .load_en);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run_period(input int n);
    int t, last, gaps;
    rst_n = 1'b0; sample = 8'(n);
    @(negedge clk); rst_n = 1'b1;
    t = 0; last = -1; gaps = 0;
    // sample load_en just before each rising edge
    while (gaps < 4) begin
      if (load_en) begin
        if (last < 0) check(t == n, $sformatf("first pulse at cycle %0d, expected %0d", t, n));
        else begin
          check(t - last == n + 1, $sformatf("N=%0d interval %0d expected %0d", n, t - last, n + 1));
          gaps++;
        end
        last = t;
      end
      @(negedge clk); t++;
      if (t > 20 * (n + 2)) begin check(1'b0, "no pulse"); break; end
    end
  endtask

  initial begin
    automatic int vals[5] = '{0, 1, 5, 17, 255};
    foreach (vals[i]) run_period(vals[i]);
    // one-cycle pulse width for N=3
    rst_n = 1'b0; sample = 8'd3; @(negedge clk); rst_n = 1'b1;
    repeat (3) @(negedge clk);
    check(load_en, "pulse at count 3");
    @(negedge clk);
    check(!load_en, "pulse is one cycle wide");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
