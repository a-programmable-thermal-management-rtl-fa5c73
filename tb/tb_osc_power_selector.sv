// tb_osc_power_selector: exhaustive check of the oscillator supply decode.
module tb_osc_power_selector;
  import tmic_pkg::*;
  sensor_sel_e sel;
  logic [2:0] osc_vdd_en;
  int checks = 0, failures = 0;
  logic [2:0] expect_tab [4] = '{3'b000, 3'b001, 3'b010, 3'b100};

  osc_power_selector dut (.sel, .osc_vdd_en);

  initial begin
    for (int i = 0; i < 4; i++) begin
      sel = sensor_sel_e'(i);
      #1;
      checks++;
      if (osc_vdd_en !== expect_tab[i]) begin
        failures++;
        $display("FAIL: sel=%0d osc_vdd_en=%b expected %b", i, osc_vdd_en, expect_tab[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
