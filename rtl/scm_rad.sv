// scm_rad: read address decoder of a standard cell memory.
//
// Turns the registered binary read address into one select line per word for
// the AND-OR output multiplexers. An address of R or above selects no row, so
// the memory then reads all zeros. With a proper one-hot code only one AND gate
// per output bit is open, and activity on the other words stops there.
// Purely combinational.
//
// The one-hot read decoder feeding AND-OR multiplexers follows the published
// read logic. Reading zero for out-of-range addresses is this design's own.
module scm_rad #(
  parameter int unsigned R  = 88,
  parameter int unsigned AW = (R > 1) ? $clog2(R) : 1
) (
  input  logic [AW-1:0] raddr,    // registered read address
  output logic [R-1:0]  row_sel   // one-hot row select
);

  always_comb begin
    row_sel = '0;
    for (int unsigned r = 0; r < R; r++)
      row_sel[r] = (raddr == AW'(r));
  end

endmodule
