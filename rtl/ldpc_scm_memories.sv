// ldpc_scm_memories: the memories of a low-power IEEE 802.11n LDPC decoder,
// built from latch based standard cell memories (SCMs).
//
// The decoder has three separate memories, Q, T and R. The combinational
// message-processing blocks between them sit outside this module and connect
// through the ports below. Each memory is split into three banks of 135-bit
// words:
//   Q-memory: 3 banks of 24 words  (ldpc_scm_bank_group, R = 24)
//   T-memory: 3 banks of 24 words  (ldpc_scm_bank_group, R = 24)
//   R-memory: 3 banks of 88 words  (ldpc_scm_bank_group, R = 88)
// A memory word is the three banks side by side, 405 bits. Bank 0 of every
// memory is always on. Banks 1 and 2 are switched on or off by the operating
// mode (ldpc_mem_pkg::mode_e): a mode that needs only part of the word
// switches the unused banks off. Their write clocks then stay silent and their
// read data reads zero. bank_pwr_en brings the per-bank power state out for
// the supply switches, which are not logic and are not part of this module.
//
// Every port works like scm_latch: write latency one, read latency one, and a
// word may not be written in the cycle it is being read. Bank sizes and the
// always-on bank follow the published decoder. The 405-bit word, the mode
// encoding, and using one mode for all three memories are this design's own
// choices.
module ldpc_scm_memories
  import ldpc_mem_pkg::*;
#(
  parameter int unsigned C       = BANK_BITS,
  parameter int unsigned R_ROWS  = R_WORDS,
  parameter int unsigned QT_ROWS = QT_WORDS,
  localparam int unsigned W      = NUM_BANKS * C,
  localparam int unsigned RAW    = $clog2(R_ROWS),
  localparam int unsigned QAW    = $clog2(QT_ROWS)
) (
  input  logic                 clk,
  input  mode_e                mode,          // decoder operating mode
  output logic [NUM_BANKS-1:0] bank_pwr_en,   // powered banks, to the supply switches

  // Q-memory
  input  logic                 q_we,
  input  logic [QAW-1:0]       q_waddr,
  input  logic [W-1:0]         q_wdata,
  input  logic [QAW-1:0]       q_raddr,
  output logic [W-1:0]         q_rdata,

  // T-memory
  input  logic                 t_we,
  input  logic [QAW-1:0]       t_waddr,
  input  logic [W-1:0]         t_wdata,
  input  logic [QAW-1:0]       t_raddr,
  output logic [W-1:0]         t_rdata,

  // R-memory
  input  logic                 r_we,
  input  logic [RAW-1:0]       r_waddr,
  input  logic [W-1:0]         r_wdata,
  input  logic [RAW-1:0]       r_raddr,
  output logic [W-1:0]         r_rdata
);

  assign bank_pwr_en = bank_mask(mode);

  ldpc_scm_bank_group #(.NUM_BANKS(NUM_BANKS), .R(QT_ROWS), .C(C), .AW(QAW)) u_qmem (
    .clk     (clk),
    .bank_on (bank_pwr_en),
    .we      (q_we),
    .waddr   (q_waddr),
    .wdata   (q_wdata),
    .raddr   (q_raddr),
    .rdata   (q_rdata)
  );

  ldpc_scm_bank_group #(.NUM_BANKS(NUM_BANKS), .R(QT_ROWS), .C(C), .AW(QAW)) u_tmem (
    .clk     (clk),
    .bank_on (bank_pwr_en),
    .we      (t_we),
    .waddr   (t_waddr),
    .wdata   (t_wdata),
    .raddr   (t_raddr),
    .rdata   (t_rdata)
  );

  ldpc_scm_bank_group #(.NUM_BANKS(NUM_BANKS), .R(R_ROWS), .C(C), .AW(RAW)) u_rmem (
    .clk     (clk),
    .bank_on (bank_pwr_en),
    .we      (r_we),
    .waddr   (r_waddr),
    .wdata   (r_wdata),
    .raddr   (r_raddr),
    .rdata   (r_rdata)
  );

endmodule
