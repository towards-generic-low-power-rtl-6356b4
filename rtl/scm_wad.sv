// scm_wad: write address decoder of a standard cell memory.
//
// Turns the binary write address into one row-select line per word. When the
// write enable is low, or the address is R or above, no line is active, so no
// row receives a clock pulse. The output is one-hot or all zero, which is what
// the row clock gates expect. Purely combinational: the clock gates sample the
// lines during the high phase of the clock.
//
// The one-hot write decoder follows the published write logic. The write
// enable and the handling of out-of-range addresses are this design's own.
module scm_wad #(
  parameter int unsigned R  = 88,
  parameter int unsigned AW = (R > 1) ? $clog2(R) : 1
) (
  input  logic          we,       // write in this cycle
  input  logic [AW-1:0] waddr,    // word to write
  output logic [R-1:0]  row_sel   // one-hot row select, zero when idle
);

  always_comb begin
    row_sel = '0;
    for (int unsigned r = 0; r < R; r++)
      row_sel[r] = we && (waddr == AW'(r));
  end

endmodule
