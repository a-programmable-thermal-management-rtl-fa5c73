// clock_counter: sampling-interval timer of the TMIC.
//
// A counter advances by one every SYSCLK cycle and is compared with the
// sampling register. When the two are equal, load_en is high for that one
// cycle and the counter returns to 0 on the next edge. A sampling value of
// N therefore gives one load_en pulse every N+1 cycles. A value of 0 gives a
// pulse on every cycle. If software lowers the value below the running count,
// the counter wraps through its maximum before the next match.
//
// The counter, the equality comparator and the reset to 0 follow the
// document. The 8-bit width matches the sampling register. The count starts
// at 0 after reset.
//
// Interface: clk, rst_n (asynchronous, active low), sample (sampling
// register), load_en (Loading Enable, combinational from the count).
module clock_counter #(
  parameter int unsigned CW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [CW-1:0] sample,
  output logic          load_en
);

  logic [CW-1:0] cnt;

  assign load_en = (cnt == sample);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       cnt <= '0;
    else if (load_en) cnt <= '0;
    else              cnt <= cnt + 1'b1;
  end

endmodule
