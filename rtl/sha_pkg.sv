// sha_pkg: constants and types shared by the six hash cores and their common
// interface controller. Every core talks to the outside world through a 16-bit
// word interface (din/dout) with FIFO-style handshakes; the message arrives
// already padded, preceded by header words that give its length.
//
// Header word (first word of every segment), W bits:
//   [W-1:1] seg_len_ap : segment length after padding, in 32-bit words
//   [0]     last       : 1 when this is the last (or only) segment
// When last = 1, the next word is seq_len_bp: the length of this final segment
// before padding, in bits. The whole message length before padding is then the
// sum of all earlier segments (32 bits per word) plus seq_len_bp.
package sha_pkg;

  // Interface word width (the document uses w = 16).
  localparam int unsigned IO_W      = 16;
  // All cores compute 256-bit digests.
  localparam int unsigned HASH_BITS = 256;

  typedef struct packed {
    logic [IO_W-2:0] len_ap;  // segment length after padding, 32-bit words
    logic            last;    // last segment flag
  } seg_hdr_t;

  // The six cores of the comparison, in the order the top brings them out.
  localparam int unsigned NUM_CORES = 6;
  typedef enum logic [2:0] {
    CORE_BLAKE256  = 3'd0,
    CORE_GROESTL   = 3'd1,
    CORE_JH42      = 3'd2,
    CORE_KECCAK    = 3'd3,
    CORE_SKEIN     = 3'd4,
    CORE_SHA256    = 3'd5
  } core_id_t;

  // States of the interface controller.
  typedef enum logic [2:0] {
    IO_HDR,     // read a segment header
    IO_LEN_BP,  // read the length-before-padding word of the last segment
    IO_LOAD,    // load message words into the block buffer
    IO_GO,      // hand the full block to the compression engine
    IO_RUN,     // engine is processing (and, for the last block, finalising)
    IO_OUT      // stream the digest out
  } io_state_t;

endpackage
