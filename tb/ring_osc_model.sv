// ring_osc_model: behavioural model of one ring-oscillator temperature
// sensor, for simulation only (not synthesizable).
// While vdd_en is high, the output toggles every half_period time units.
// While it is low, the oscillator is unpowered and its output stays 0. A
// hotter die runs slower, so a testbench models temperature by lengthening
// half_period.
module ring_osc_model (
  input  logic vdd_en,
  input  int   half_period,
  output logic osc
);
  initial osc = 1'b0;

  always begin
    if (vdd_en) begin
      #(half_period);
      osc = vdd_en ? ~osc : 1'b0;
    end else begin
      osc = 1'b0;
      @(posedge vdd_en);
    end
  end
endmodule
