// interrupt_gen: threshold comparator and interrupt generator.
//
// The temperature register is compared with the threshold register. The
// threshold flag is high while the temperature is strictly greater than the
// threshold, compared unsigned. The interrupt is the flag gated by the
// interrupt-enable bit. Clearing the enable gives polling-only operation:
// software reads the flag. Setting it gives interrupt-driven operation.
//
// The flag is a level, not a latched event. Raising the threshold above the
// current reading removes both the flag and the interrupt. The ACPI-style
// sequence uses exactly this, stepping the threshold from the passive to the
// active to the critical trip point. The comparator and the enable gate
// follow the document. The level behaviour is this design's reading of it.
//
// Interface: temp, thresh, ie in; flag, irq (active high) out. The logic is
// purely combinational. Both inputs come from registers.
module interrupt_gen #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] temp,
  input  logic [W-1:0] thresh,
  input  logic         ie,
  output logic         flag,
  output logic         irq
);

  assign flag = (temp > thresh);
  assign irq  = flag & ie;

endmodule
