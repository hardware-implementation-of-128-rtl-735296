// aes_clock_gate: clock-gating cell, a latch followed by an AND gate.
//
// The enable is captured by a latch that is transparent while clk is low and
// closed while clk is high; gclk is clk AND the latched enable. Glitches on
// en during the high phase therefore never reach gclk, and a register bank
// clocked by gclk needs no per-bit feedback multiplexer. The latch is
// intentional (it is the point of the cell) and is the only latch in the
// design. On an FPGA the same effect is obtained with the vendor's clock
// enable / clock control buffers; this cell is the generic form.
//
// Timing: en must settle before the rising edge of clk; gclk pulses during
// every clk high phase for which en was high just before the edge.
module aes_clock_gate (
  input  logic clk,   // free-running clock
  input  logic en,    // enable, may glitch while clk is high
  output logic gclk   // gated clock
);
  logic en_latched;

  always_latch begin
    if (!clk) en_latched = en;
  end

  assign gclk = clk & en_latched;
endmodule
