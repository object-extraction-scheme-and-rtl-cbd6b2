// clk_gate: latch-based clock gate. The enable, synchronous to clk, is
// captured by a latch that is open while clk is low, so gclk = clk & en_l
// can only start or stop on a whole high phase and never glitches. On an
// FPGA or ASIC this is the vendor's gating cell; the latch below is that
// cell's logic function, and the latch warning it gives is intended.
module clk_gate (
  input  logic clk,
  input  logic en,
  output logic gclk
);
  logic en_l;
  always_latch begin
    if (!clk) en_l = en;
  end
  assign gclk = clk & en_l;
endmodule
