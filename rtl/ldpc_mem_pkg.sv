// ldpc_mem_pkg: sizes and the operating-mode type shared by the memory
// subsystem of the low-power LDPC decoder.
//
// Each of the decoder's three memories (Q, T and R) is split into three
// banks of 135-bit words. The R-memory banks hold 88 words and the Q- and
// T-memory banks hold 24 words; those numbers are the published ones. Bank 0
// is always on. Banks 1 and 2 can be switched off separately, depending on
// the decoder's operating mode.
//
// The mode encoding is this design's own choice. One bank of 135 bits holds
// 27 five-bit messages, so the lifting factors Z = 27, 54 and 81 of IEEE
// 802.11n need one, two or three banks. The mode type below names these three
// cases, and bank_mask() returns the banks each one keeps powered.
package ldpc_mem_pkg;

  localparam int unsigned NUM_BANKS = 3;    // banks per memory
  localparam int unsigned BANK_BITS = 135;  // bits per word of one bank
  localparam int unsigned R_WORDS   = 88;   // words of one R-memory bank
  localparam int unsigned QT_WORDS  = 24;   // words of one Q- or T-memory bank

  // Operating mode: how many banks of every memory are in use.
  typedef enum logic [1:0] {
    MODE_Z27 = 2'd0,  // bank 0 only
    MODE_Z54 = 2'd1,  // banks 0 and 1
    MODE_Z81 = 2'd2   // all three banks
  } mode_e;

  // Powered banks for a mode. Bank 0 is always on. The unused code 2'd3
  // keeps every bank on.
  function automatic logic [NUM_BANKS-1:0] bank_mask(input mode_e mode);
    unique case (mode)
      MODE_Z27: bank_mask = 3'b001;
      MODE_Z54: bank_mask = 3'b011;
      default:  bank_mask = 3'b111;
    endcase
  endfunction

endpackage
