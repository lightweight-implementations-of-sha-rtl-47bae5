// sha_io: interface and protocol controller shared by every hash core.
//
// The core side of the standard interface is a pair of FIFO ports of IO_W bits:
// din/src_ready/src_read towards the input FIFO and dout/dst_ready/dst_write
// towards the output FIFO. src_ready and dst_ready are active low, as the
// bubbles on the interface symbol show: src_ready = 0 means the input FIFO holds
// a word (it is the FIFO's "empty" flag) and dst_ready = 0 means the output FIFO
// can take one (its "full" flag). The FIFO is first-word-fall-through: din is
// valid while src_ready is low and is consumed in the cycle src_read is high.
//
// Protocol (see sha_pkg): one header word per segment; the last segment's
// header is followed by the length-before-padding word; then the padded message
// follows. Message words are shifted into a BLOCK_BITS buffer, first word at
// the top. When a block is full the controller pulses blk_go and waits for the
// engine's eng_done pulse; loading and processing do not overlap, so hashing N
// blocks takes st + (l + p) * N + end cycles with st = 2 header reads,
// l = BLOCK_BITS / IO_W load cycles, p the engine's block time and end the
// finalisation plus IO_W-bit digest output. After the last block's eng_done the
// digest is latched and written out, most significant word first, and the
// controller returns to wait for the next message.
//
// Segments may split the message anywhere on a 32-bit word boundary; the
// message as a whole must be a whole number of blocks long (the host pads it).
// The length word, the header layout and the active-low ready signals follow the
// document; the block hand-off (blk_go / eng_done) is this design's own.
module sha_io
  import sha_pkg::*;
#(
  parameter int unsigned W          = IO_W,
  parameter int unsigned BLOCK_BITS = 512,
  parameter int unsigned HBITS      = HASH_BITS
) (
  input  logic                  clk,
  input  logic                  rst,
  // input FIFO side
  input  logic [W-1:0]          din,
  input  logic                  src_ready,   // active low: word available
  output logic                  src_read,
  // output FIFO side
  output logic [W-1:0]          dout,
  input  logic                  dst_ready,   // active low: space available
  output logic                  dst_write,
  // engine side
  output logic [BLOCK_BITS-1:0] blk,         // current block, first word at the top
  output logic                  blk_go,      // one-cycle start pulse
  output logic                  blk_first,   // block is the first of its message
  output logic                  blk_last,    // block is the last of its message
  output logic [63:0]           bits_before, // BLOCK_BITS * (index of this block)
  output logic [63:0]           len_bp,      // message length before padding, bits
  output logic                  len_known,   // len_bp is final (last header seen)
  input  logic                  eng_done,    // engine finished the block
  input  logic [HBITS-1:0]      hash         // digest, valid with eng_done on the last block
);

  localparam int unsigned BLK_WORDS = BLOCK_BITS / W;
  localparam int unsigned OUT_WORDS = HBITS / W;
  localparam int unsigned CW        = $clog2(BLK_WORDS + 1);
  localparam int unsigned OW        = $clog2(OUT_WORDS + 1);

  io_state_t           state;
  logic [W:0]          seg_rem;     // IO_W-bit words left in the current segment
  logic                seg_last;    // current segment is the last one
  logic [63:0]         bits_prev;   // bits of all completed (non-last) segments
  logic [CW-1:0]       wcnt;        // words loaded into the block buffer
  logic [OW-1:0]       ocnt;        // digest words written
  logic [HBITS-1:0]    hsr;         // digest shift register
  seg_hdr_t            hdr;

  assign hdr = seg_hdr_t'(din);

  always_comb begin
    src_read = 1'b0;
    unique case (state)
      IO_HDR, IO_LEN_BP: src_read = !src_ready;
      IO_LOAD:           src_read = !src_ready && (seg_rem != '0);
      default:           src_read = 1'b0;
    endcase
  end

  assign blk_go    = (state == IO_GO);
  assign dst_write = (state == IO_OUT) && !dst_ready;
  assign dout      = hsr[HBITS-1 -: W];

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= IO_HDR;
      seg_rem     <= '0;
      seg_last    <= 1'b0;
      bits_prev   <= '0;
      wcnt        <= '0;
      ocnt        <= '0;
      blk_first   <= 1'b1;
      blk_last    <= 1'b0;
      bits_before <= '0;
      len_bp      <= '0;
      len_known   <= 1'b0;
      hsr         <= '0;
      blk         <= '0;
    end else begin
      unique case (state)
        IO_HDR: if (!src_ready) begin
          seg_rem  <= {1'b0, hdr.len_ap, 1'b0};          // two IO words per 32-bit word
          seg_last <= hdr.last;
          // every bit of a non-last segment is a message bit
          if (!hdr.last) bits_prev <= bits_prev + {44'd0, hdr.len_ap, 5'd0};
          state    <= hdr.last ? IO_LEN_BP : IO_LOAD;
        end
        IO_LEN_BP: if (!src_ready) begin
          len_bp    <= bits_prev + 64'(din);
          len_known <= 1'b1;
          state     <= IO_LOAD;
        end
        IO_LOAD: begin
          if (seg_rem == '0) begin
            // segment exhausted in the middle of a block: fetch the next header
            state <= IO_HDR;
          end else if (!src_ready) begin
            blk     <= {blk[BLOCK_BITS-W-1:0], din};
            seg_rem <= seg_rem - 1'b1;
            if (wcnt == CW'(BLK_WORDS - 1)) begin
              wcnt     <= '0;
              blk_last <= seg_last && (seg_rem == (W+1)'(1));
              state    <= IO_GO;
            end else begin
              wcnt <= wcnt + 1'b1;
            end
          end
        end
        IO_GO: state <= IO_RUN;
        IO_RUN: if (eng_done) begin
          blk_first   <= 1'b0;
          bits_before <= bits_before + 64'(BLOCK_BITS);
          if (blk_last) begin
            hsr   <= hash;
            ocnt  <= '0;
            state <= IO_OUT;
          end else if (seg_rem == '0 && !seg_last) begin
            state <= IO_HDR;
          end else begin
            state <= IO_LOAD;
          end
        end
        IO_OUT: if (!dst_ready) begin
          hsr  <= {hsr[HBITS-W-1:0], W'(0)};
          ocnt <= ocnt + 1'b1;
          if (ocnt == OW'(OUT_WORDS - 1)) begin
            // ready for the next message
            state       <= IO_HDR;
            blk_first   <= 1'b1;
            blk_last    <= 1'b0;
            bits_before <= '0;
            bits_prev   <= '0;
            len_known   <= 1'b0;
          end
        end
        default: state <= IO_HDR;
      endcase
    end
  end

endmodule
