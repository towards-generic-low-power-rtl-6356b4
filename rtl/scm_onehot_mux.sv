// scm_onehot_mux: AND-OR read multiplexer of a standard cell memory.
//
// C parallel R-to-1 multiplexers that take a one-hot select. Each data bit is
// ANDed with its row's select line, and the AND outputs of one column are
// ORed. If the select is one-hot, a glitch on a word that is not selected
// stops at the first gate level. An all-zero select gives an all-zero output.
// Purely combinational.
//
// The AND-OR structure is the published one. Synthesis may map the final OR
// levels onto library multiplexer cells.
module scm_onehot_mux #(
  parameter int unsigned R = 88,
  parameter int unsigned C = 135
) (
  input  logic [R-1:0] sel,          // one-hot row select
  input  logic [C-1:0] rows [R],     // all words
  output logic [C-1:0] dout          // selected word
);

  always_comb begin
    dout = '0;
    for (int unsigned r = 0; r < R; r++)
      dout |= rows[r] & {C{sel[r]}};
  end

endmodule
