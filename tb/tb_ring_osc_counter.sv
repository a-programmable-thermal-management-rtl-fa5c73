// tb_ring_osc_counter: checks the oscillator mux and down counter.
// The testbench makes oscillator edges at known cycles, well inside each
// counting window. The count taken at each Loading Enable must be 255 minus
// the number of edges of the selected oscillator. It also checks that an
// unselected oscillator is ignored, that the on-chip selection counts
// nothing, and that the counter stops at 0.
module tb_ring_osc_counter;
  import tmic_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [2:0] osc;
  sensor_sel_e sel;
  logic load_en;
  logic [7:0] count;
  int checks = 0, failures = 0;

  ring_osc_counter #(.W(8)) dut (.clk, .rst_n, .osc, .sel, .load_en, .count);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // One window: reload, then give n_sel edges on the selected oscillator
  // (half period hp cycles) and n_other on another one, then read.
  task automatic window(input sensor_sel_e s, input int n_sel, input int n_other, input int hp);
    int idx, oth;
    sel = s;
    idx = (s == SEL_ONCHIP) ? 0 : int'(s) - 1;
    oth = (idx + 1) % 3;
    osc = '0;
    @(negedge clk); load_en = 1'b1;
    @(negedge clk); load_en = 1'b0;
    check(count == 8'hFF, "reload to all ones");
    repeat (4) @(negedge clk);
    for (int e = 0; e < n_sel || e < n_other; e++) begin
      if (e < n_sel)   osc[idx] = 1'b1;
      if (e < n_other) osc[oth] = 1'b1;
      repeat (hp) @(negedge clk);
      osc = '0;
      repeat (hp) @(negedge clk);
    end
    repeat (5) @(negedge clk);
    begin
      int exp_cnt = (s == SEL_ONCHIP) ? 255 : ((255 - n_sel) < 0 ? 0 : 255 - n_sel);
      check(count == 8'(exp_cnt), $sformatf("sel=%0d edges=%0d count=%0d expected %0d",
                                            int'(s), n_sel, count, exp_cnt));
    end
  endtask

  initial begin
    osc = '0; sel = SEL_ONCHIP; load_en = 1'b0;
    @(negedge clk);
    check(count == 8'hFF, "reset value");
    rst_n = 1'b1;
    window(SEL_OSC1, 10, 0, 2);
    window(SEL_OSC2, 37, 5, 2);
    window(SEL_OSC3, 1, 20, 3);
    window(SEL_ONCHIP, 12, 12, 2);
    window(SEL_OSC1, 0, 9, 2);
    window(SEL_OSC2, 300, 0, 2);   // saturates at 0
    window(SEL_OSC3, 255, 0, 2);   // reaches exactly 0
    for (int k = 0; k < 6; k++)
      window(sensor_sel_e'($urandom_range(1, 3)), $urandom_range(0, 120), $urandom_range(0, 50), $urandom_range(2, 5));
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
