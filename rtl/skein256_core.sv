// skein256_core: Skein-512-256 behind the common 16-bit interface.
//
// Skein chains 512-bit UBI (unique block iteration) calls: each message block
// M is encrypted by the Threefish-512 tweakable block cipher, keyed with the
// chaining value and tweaked with the byte position and the block type and
// first/final flags, and the ciphertext is XORed with M to give the next
// chaining value. Threefish-512 runs 72 rounds of four MIX functions (64-bit
// add, rotate by a round-dependent constant, XOR) followed by a fixed word
// permutation, and adds a subkey from the key schedule (Keygen) before the
// first round and after every fourth round (19 subkeys).
//
// The chaining value starts from a precomputed IV (the result of the
// configuration UBI for a 256-bit output), stored as a constant as the
// document's "processed IV" is. After the last message block an
// output UBI (counter 0, type Out) gives the digest, so finalisation costs as
// much as one block, as in the document. Words are little-endian: byte 8*i of a
// block is the least significant byte of word i. The host pads the message with
// zero bytes to a whole number of blocks (one zero block for an empty message);
// the tweak position of the last block is taken from the protocol's length
// word, which must therefore be a whole number of bytes.
//
// Datapath (folded, as in the document's cores, on 64-bit words like its
// logic-only version): one MIX unit (64-bit adder, one rotator whose
// amount is picked from the 8x4 rotation table, XOR) is used four times per
// round; its two outputs are written straight to their permuted places in a
// second bank of eight state words, and the banks swap each round. The key
// generator works one word per clock: word i of subkey s is
// k[(s+i) mod 9] (+ t[s mod 3] for i = 5, + t[(s+1) mod 3] for i = 6, + s for
// i = 7), with k[8] the XOR of the key words and C240, and is added to state
// word i in place (the first injection adds it to the message word instead).
// The feed-forward XOR also runs one word per clock.
//
// Timing: p = 19 subkeys x 8 + 72 rounds x 4 + 8 (feed-forward) + 2 = 450
// cycles per block, and the output UBI costs the same again. The document
// reports 2366 cycles per block for its logic-only core (distributed RAM) and
// 2407 for its block-RAM core (32-bit adder); the register banks and this
// schedule are this design's own.
module skein256_core
  import sha_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic [IO_W-1:0] din,
  input  logic            src_ready,
  output logic            src_read,
  output logic [IO_W-1:0] dout,
  input  logic            dst_ready,
  output logic            dst_write
);

  localparam logic [63:0] C240 = 64'h1BD11BDAA9FC1A22;
  localparam int unsigned ROT [8][4] = '{
    '{46, 36, 19, 37}, '{33, 27, 14, 42}, '{17, 49, 36, 39}, '{44,  9, 54, 56},
    '{39, 30, 34, 24}, '{13, 50, 10, 17}, '{25, 29, 39, 43}, '{ 8, 35, 56, 22}
  };
  localparam logic [5:0] T_MSG = 6'd48, T_OUT = 6'd63;

  function automatic logic [63:0] rotl(input logic [63:0] x, input int unsigned n);
    return (x << n) | (x >> (64 - n));
  endfunction

  // key schedule word 8
  function automatic logic [63:0] k8(input logic [511:0] k);
    logic [63:0] a;
    a = C240;
    for (int i = 0; i < 8; i++) a = a ^ k[64*i +: 64];
    return a;
  endfunction

  // Processed IV: the chaining value after the configuration UBI, i.e.
  // Threefish-512 with key 0 and tweak (position 32, type Cfg, first, final)
  // applied to the configuration block {schema "SHA3", version 1, output
  // length 256, tree parameters 0}, XORed with that block. Word 0 in bits 63:0.
  localparam logic [511:0] IV = {
    64'h3eedba1833edfc13,
    64'hc36fbaf9393ad185,
    64'he7a436cdc4746251,
    64'hec06025e74dd7683,
    64'h2a2767a4ae9b94db,
    64'h55aea0614f816e6f,
    64'he83590301a79a9eb,
    64'hccd044a12fdb3e13
  };

  // Word permutation of Threefish-512 is o[i] = y[PERM[i]] with
  // PERM = {2, 1, 4, 7, 6, 5, 0, 3}; MIX output y[m] is therefore written to
  // the position i with PERM[i] = m
  localparam logic [2:0] PERM_INV [8] = '{6, 1, 0, 7, 2, 5, 4, 3};

  typedef enum logic [1:0] {S_IDLE, S_INJ, S_MIX, S_FF} eng_state_t;

  logic [511:0] blk;
  logic         blk_go, blk_first, blk_last, len_known, eng_done;
  logic [63:0]  bits_before, len_bp;
  logic [255:0] digest;

  sha_io #(.BLOCK_BITS(512)) u_io (
    .clk, .rst, .din, .src_ready, .src_read, .dout, .dst_ready, .dst_write,
    .blk, .blk_go, .blk_first, .blk_last, .bits_before, .len_bp, .len_known,
    .eng_done, .hash(digest)
  );

  eng_state_t  st;
  logic        out_ubi;             // running the output UBI
  logic        bank;                // which state bank holds the current words
  logic [4:0]  s;                   // subkey number 0..18
  logic [6:0]  d;                   // round number 0..71
  logic [2:0]  j;                   // word (injection, feed-forward) or MIX index
  logic [63:0] h  [8];              // chaining value = cipher key
  logic [63:0] x0 [8];              // state bank 0
  logic [63:0] x1 [8];              // state bank 1
  logic [63:0] t0, t1;              // tweak
  logic [511:0] h_flat;

  always_comb
    for (int i = 0; i < 8; i++) h_flat[64*i +: 64] = h[i];

  // message word i of the UBI (zero for the output UBI), little-endian bytes
  function automatic logic [63:0] msg_word(input logic [511:0] b, input logic [2:0] i, input logic zero);
    logic [63:0] w;
    for (int q = 0; q < 8; q++) w[8*q +: 8] = b[511 - 8*(8*int'(i) + q) -: 8];
    return zero ? 64'd0 : w;
  endfunction

  // ---- key generator: word i of subkey s ----
  logic [63:0] kx, inj_key, tw2;
  logic [3:0]  kidx;
  logic [1:0]  tsel5, tsel6;
  always_comb begin
    kx   = k8(h_flat);
    tw2  = t0 ^ t1;
    kidx = 4'((int'(s) + int'(j)) % 9);
    tsel5 = 2'(int'(s) % 3);
    tsel6 = 2'((int'(s) + 1) % 3);
    inj_key = (kidx == 4'd8) ? kx : h[kidx[2:0]];
    if (j == 3'd5) inj_key = inj_key + ((tsel5 == 2'd0) ? t0 : (tsel5 == 2'd1) ? t1 : tw2);
    if (j == 3'd6) inj_key = inj_key + ((tsel6 == 2'd0) ? t0 : (tsel6 == 2'd1) ? t1 : tw2);
    if (j == 3'd7) inj_key = inj_key + 64'(s);
  end

  // ---- one MIX on words 2j, 2j+1 of the current bank ----
  logic [63:0] ma, mb, my0, my1, cur_j, mw;
  always_comb begin
    ma    = bank ? x1[{j[1:0], 1'b0}] : x0[{j[1:0], 1'b0}];
    mb    = bank ? x1[{j[1:0], 1'b1}] : x0[{j[1:0], 1'b1}];
    my0   = ma + mb;
    my1   = rotl(mb, ROT[d[2:0]][j[1:0]]) ^ my0;
    cur_j = bank ? x1[j] : x0[j];
    mw    = msg_word(blk, j, out_ubi);
  end

  always_comb
    for (int q = 0; q < 32; q++) digest[255 - 8*q -: 8] = h[q / 8][8*(q % 8) +: 8];

  always_ff @(posedge clk) begin
    if (rst) begin
      st       <= S_IDLE;
      out_ubi  <= 1'b0;
      bank     <= 1'b0;
      s        <= '0;
      d        <= '0;
      j        <= '0;
      eng_done <= 1'b0;
      t0       <= '0;
      t1       <= '0;
      for (int i = 0; i < 8; i++) begin h[i] <= IV[64*i +: 64]; x0[i] <= '0; x1[i] <= '0; end
    end else begin
      eng_done <= 1'b0;
      unique case (st)
        S_IDLE: if (blk_go) begin
          if (blk_first) for (int i = 0; i < 8; i++) h[i] <= IV[64*i +: 64];
          out_ubi <= 1'b0;
          // tweak: byte position after this block, first/final flags, type Msg
          t0 <= blk_last ? (len_bp >> 3) : ((bits_before >> 3) + 64'd64);
          t1 <= {blk_last, blk_first, T_MSG, 56'd0};
          s  <= '0;
          d  <= '0;
          j  <= '0;
          st <= S_INJ;
        end
        // subkey injection, one word per clock (the first one adds to the plaintext)
        S_INJ: begin
          if (bank) x1[j] <= ((s == 5'd0) ? mw : cur_j) + inj_key;
          else      x0[j] <= ((s == 5'd0) ? mw : cur_j) + inj_key;
          j <= j + 1'b1;
          if (j == 3'd7) st <= (s == 5'd18) ? S_FF : S_MIX;
        end
        // one MIX per clock; results go to the other bank, already permuted
        S_MIX: begin
          if (bank) begin
            x0[PERM_INV[{j[1:0], 1'b0}]] <= my0;
            x0[PERM_INV[{j[1:0], 1'b1}]] <= my1;
          end else begin
            x1[PERM_INV[{j[1:0], 1'b0}]] <= my0;
            x1[PERM_INV[{j[1:0], 1'b1}]] <= my1;
          end
          j <= (j == 3'd3) ? 3'd0 : j + 1'b1;
          if (j == 3'd3) begin
            bank <= ~bank;
            d    <= d + 1'b1;
            if (d[1:0] == 2'd3) begin
              s  <= s + 1'b1;
              st <= S_INJ;
            end
          end
        end
        // feed-forward: h = E(m) ^ m, one word per clock
        S_FF: begin
          h[j] <= cur_j ^ mw;
          j    <= j + 1'b1;
          if (j == 3'd7) begin
            if (blk_last && !out_ubi) begin
              // output UBI: counter 0 as the message, type Out, 8 bytes
              out_ubi <= 1'b1;
              t0      <= 64'd8;
              t1      <= {2'b11, T_OUT, 56'd0};
              s       <= '0;
              d       <= '0;
              st      <= S_INJ;
            end else begin
              eng_done <= 1'b1;
              st       <= S_IDLE;
            end
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
