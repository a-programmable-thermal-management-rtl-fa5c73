// tb_temp_register: random stimulus against a reference model of the sensor
// mux and the temperature register. The register must hold its value
// between Loading Enable pulses and take the selected source on a pulse.
module tb_temp_register;
  import tmic_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  sensor_sel_e sel;
  logic [7:0] osc_count, filter_temp, temp, model;
  logic load_en;
  int checks = 0, failures = 0;

  temp_register #(.W(8)) dut (.clk, .rst_n, .sel, .osc_count, .filter_temp, .load_en, .temp);

  always #5 clk = ~clk;

  initial begin
    sel = SEL_ONCHIP; osc_count = '0; filter_temp = '0; load_en = 1'b0;
    model = '0;
    @(negedge clk);
    checks++; if (temp !== 8'd0) begin failures++; $display("FAIL: reset value"); end
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      sel = sensor_sel_e'($urandom_range(0, 3));
      osc_count = 8'($urandom);
      filter_temp = 8'($urandom);
      load_en = ($urandom_range(0, 3) == 0);
      @(posedge clk);
      if (load_en) model = (sel == SEL_ONCHIP) ? filter_temp : osc_count;
      @(negedge clk);
      checks++;
      if (temp !== model) begin
        failures++;
        $display("FAIL: step %0d temp=%0d expected %0d", i, temp, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
