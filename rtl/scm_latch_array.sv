// scm_latch_array: storage array of a latch based standard cell memory.
//
// R rows of C plain latches, with no enable. Every latch in row r is
// transparent while that row's gated clock row_clk[r] is high, and keeps its
// value while it is low. All rows share the write data lines. The clock gates
// open at most one row, during the second half of a cycle, so the row takes
// the write data present at the end of that cycle. All words are visible at
// once on the rows output, for the read multiplexers.
//
// Storage cells are latches on purpose. A row that is open passes wdata
// straight through to its rows output.
//
// Plain latches with no enable and one gated clock per row follow the
// published array. Making the latch transparent while its clock is high is
// this design's choice.
module scm_latch_array #(
  parameter int unsigned R = 88,
  parameter int unsigned C = 135
) (
  input  logic [R-1:0] row_clk,      // gated clock per row
  input  logic [C-1:0] wdata,        // shared write data lines
  output logic [C-1:0] rows [R]      // content of every word
);

  for (genvar r = 0; r < R; r++) begin : g_row
    always_latch begin
      if (row_clk[r]) rows[r] = wdata;
    end
  end

endmodule
