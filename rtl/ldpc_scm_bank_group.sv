// ldpc_scm_bank_group: one memory of the LDPC decoder, split into banks of
// latch based standard cell memory that can be switched off separately.
//
// NUM_BANKS instances of scm_latch sit side by side. Bank b holds bits
// [b*C +: C] of every word, so a word is NUM_BANKS*C bits wide. All banks share
// the write address and read address. The bank_on input says which banks are
// powered. Bank 0 is always on. A bank that is off takes no writes, so its row
// clocks stay silent, and its share of rdata is held at zero. This is the
// isolation a power-gated block needs towards logic that stays on.
//
// Timing is that of scm_latch: write latency one, read latency one. The read
// isolation uses bank_on registered together with the read address, so it
// lines up with the word being read.
//
// The banked layout and the fixed always-on bank 0 follow the published memory
// organisation. Joining the banks into one wide word, the isolation value of
// zero, and modelling "off" as gated writes plus isolated reads are this
// design's own choices. Cutting the supply itself happens outside the logic.
// In this model a bank that is switched off keeps its content, but a real
// design must treat that content as lost.
module ldpc_scm_bank_group #(
  parameter int unsigned NUM_BANKS = 3,
  parameter int unsigned R         = 88,   // words per bank
  parameter int unsigned C         = 135,  // bits per bank word
  parameter int unsigned AW        = (R > 1) ? $clog2(R) : 1
) (
  input  logic                   clk,
  input  logic [NUM_BANKS-1:0]   bank_on,  // powered banks, bit 0 ignored (always on)
  input  logic                   we,
  input  logic [AW-1:0]          waddr,
  input  logic [NUM_BANKS*C-1:0] wdata,
  input  logic [AW-1:0]          raddr,
  output logic [NUM_BANKS*C-1:0] rdata
);

  logic [NUM_BANKS-1:0] on;
  logic [NUM_BANKS-1:0] on_q;

  always_comb begin
    on    = bank_on;
    on[0] = 1'b1;
  end

  always_ff @(posedge clk) on_q <= on;

  for (genvar b = 0; b < NUM_BANKS; b++) begin : g_bank
    logic [C-1:0] bank_rdata;

    scm_latch #(.R(R), .C(C), .AW(AW)) u_scm (
      .clk   (clk),
      .we    (we && on[b]),
      .waddr (waddr),
      .wdata (wdata[b*C +: C]),
      .raddr (raddr),
      .rdata (bank_rdata)
    );

    assign rdata[b*C +: C] = bank_rdata & {C{on_q[b]}};
  end

endmodule
