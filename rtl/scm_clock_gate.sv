// scm_clock_gate: clock gate for one row of a latch based standard cell memory.
//
// A latch that is open while the clock is high samples the row-select line
// during the first half of the cycle. At the falling edge it closes. During
// the second half of the cycle, when the clock is low, the held value lets
// a pulse through to gclk. A selected row thus sees gclk high for the low
// phase of the clock, and its storage latches are open for that time. Every
// other row gets a silenced clock that stays low. The pulse ends at the next
// rising edge of clk, which is when the row's latches close and keep the data.
//
// The enable is held in a latch, so changes to it while the clock is low
// cannot glitch gclk. The gate's function follows the published clock-gating
// scheme. The exact cell (latch polarity and the gate that follows it) is
// this design's own choice.
//
// The latch is intended. Its output is combined with clk, which is how a
// clock gate works.
module scm_clock_gate (
  input  logic clk,    // memory clock
  input  logic en,     // row select from the write address decoder
  output logic gclk    // gated row clock, high in the low phase when enabled
);

  logic en_l;

  always_latch begin
    if (clk) en_l = en;
  end

  assign gclk = en_l & ~clk;

endmodule
