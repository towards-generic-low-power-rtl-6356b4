// scm_latch: latch based standard cell memory (SCM) with one write port and
// one read port, R words of C bits.
//
// The memory is built only from standard cells, so R and C can be any values.
// Write path: the write address decoder (scm_wad) makes one row-select line per
// word. A clock gate per row (scm_clock_gate) turns the line into a row clock.
// Only the selected row gets a pulse, during the low half of the cycle, and all
// other rows stay silent. The storage cells are plain latches with no enable
// (scm_latch_array). The pulsed row is transparent during the low half and
// holds wdata when the pulse ends at the next rising edge.
// Read path: the read address goes through ceil(log2(R)) flip-flops, the read
// address decoder (scm_rad) makes it one-hot, and C AND-OR multiplexers
// (scm_onehot_mux) select the word.
//
// Timing, with the rising edge as the active edge:
//   write: we, waddr and wdata are applied in cycle n, and the word holds the
//          new value from the rising edge that ends cycle n. The address and
//          enable must settle in the high (first) half of the cycle. wdata must
//          be held until that rising edge.
//   read:  raddr is registered at a rising edge, and rdata shows that word
//          after the multiplexer delay. Read latency is one cycle. rdata is
//          combinational from the latches, so it also follows later writes to
//          the word being read.
//   rule:  a word must not be written in the cycle in which it is being read
//          (we with waddr equal to the registered read address). Its latches
//          would then be transparent from wdata to rdata. The assertion below
//          checks this rule. Read addresses of R and above read zero. Writes to
//          addresses of R and above are dropped.
//
// Read address flip-flops, as opposed to flip-flops on the output, follow the
// published choice for memories with fewer words than bits. No reset is
// provided. The memory content and the read address register start undefined,
// as in the published schematic.
module scm_latch #(
  parameter int unsigned R  = 88,   // words
  parameter int unsigned C  = 135,  // bits per word
  parameter int unsigned AW = (R > 1) ? $clog2(R) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [C-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [C-1:0]  rdata
);

  // ---------------- write logic ----------------
  logic [R-1:0] wsel;
  logic [R-1:0] row_clk;

  scm_wad #(.R(R), .AW(AW)) u_wad (
    .we      (we),
    .waddr   (waddr),
    .row_sel (wsel)
  );

  for (genvar r = 0; r < R; r++) begin : g_cg
    scm_clock_gate u_cg (
      .clk  (clk),
      .en   (wsel[r]),
      .gclk (row_clk[r])
    );
  end

  // ---------------- storage ----------------
  logic [C-1:0] rows [R];

  scm_latch_array #(.R(R), .C(C)) u_array (
    .row_clk (row_clk),
    .wdata   (wdata),
    .rows    (rows)
  );

  // ---------------- read logic ----------------
  logic [AW-1:0] raddr_q;
  logic [R-1:0]  rsel;

  always_ff @(posedge clk) raddr_q <= raddr;

  scm_rad #(.R(R), .AW(AW)) u_rad (
    .raddr   (raddr_q),
    .row_sel (rsel)
  );

  scm_onehot_mux #(.R(R), .C(C)) u_mux (
    .sel  (rsel),
    .rows (rows),
    .dout (rdata)
  );

  // The word being read must not be open for writing in the same cycle.
  a_no_write_to_read_word: assert property (@(posedge clk)
    !(we && waddr == raddr_q && int'(waddr) < int'(R)))
    else $error("scm_latch: write to word %0d while it is being read", waddr);

endmodule
