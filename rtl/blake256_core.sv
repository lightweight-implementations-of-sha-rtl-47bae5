// blake256_core: BLAKE-256 (14 rounds) behind the common 16-bit interface,
// on a folded 32-bit datapath that computes one half G function per clock.
//
// BLAKE-256 keeps a chaining value h (8 x 32 bits) and, while a 512-bit block
// is compressed, a 4x4 state v of 32-bit words. Compression is initialisation
// (v = h, four constants, and the bit counter t XORed into four more
// constants; the salt is zero), 14 rounds of eight G functions (four on the
// columns, then four on the diagonals of v), and finalisation
// h = h ^ v[0..7] ^ v[8..15].
//
// As in the document's BRAM design, the state is kept in four small
// memories, one per row of v (A = v0..v3, B = v4..v7, C = v8..v11,
// D = v12..v15), so one G function reads one word from each. A G function is
// split into two halves that share one datapath:
//   a = a + b + (m[s0] ^ c[s1]); d = (d ^ a) >>> R1; c = c + d; b = (b ^ c) >>> R2
// with (R1, R2) = (16, 12) in the first half and (8, 7) in the second, and
// the message and constant indices swapped. The round's permutation
// sigma(r mod 10) selects the message words. The message block stays in the
// interface buffer; the constants are a 16-word table.
//
// Timing per block: 16 cycles of initialisation (one state word per clock),
// 14 rounds x 16 half-G cycles = 224, 8 cycles of finalisation (one chaining
// word per clock). The document quotes 16 + (14 x 16 + 2) + 16 for its
// quasi-pipelined BRAM datapath, whose extra cycles come from block-RAM read
// latency; this datapath reads its memories combinationally and has none.
// The counter t is the number of message bits hashed up to and including the
// current block, 0 for a final block that holds padding only; it is derived
// from the protocol's length word. The host pads (0x80 ... 0x01, 64-bit length).
module blake256_core
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

  localparam int unsigned ROUNDS = 14;
  localparam logic [31:0] C [16] = '{
    32'h243F6A88, 32'h85A308D3, 32'h13198A2E, 32'h03707344, 32'hA4093822, 32'h299F31D0, 32'h082EFA98, 32'hEC4E6C89,
    32'h452821E6, 32'h38D01377, 32'hBE5466CF, 32'h34E90C6C, 32'hC0AC29B7, 32'hC97C50DD, 32'h3F84D5B5, 32'hB5470917
  };
  localparam logic [255:0] IV =
    256'h6a09e667_bb67ae85_3c6ef372_a54ff53a_510e527f_9b05688c_1f83d9ab_5be0cd19;
  localparam logic [3:0] SIGMA [10][16] = '{
    '{ 0,  1,  2,  3,  4,  5,  6,  7,  8,  9, 10, 11, 12, 13, 14, 15},
    '{14, 10,  4,  8,  9, 15, 13,  6,  1, 12,  0,  2, 11,  7,  5,  3},
    '{11,  8, 12,  0,  5,  2, 15, 13, 10, 14,  3,  6,  7,  1,  9,  4},
    '{ 7,  9,  3,  1, 13, 12, 11, 14,  2,  6,  5, 10,  4,  0, 15,  8},
    '{ 9,  0,  5,  7,  2,  4, 10, 15, 14,  1, 11, 12,  6,  8,  3, 13},
    '{ 2, 12,  6, 10,  0, 11,  8,  3,  4, 13,  7,  5, 15, 14,  1,  9},
    '{12,  5,  1, 15, 14, 13,  4, 10,  0,  7,  6,  3,  9,  2,  8, 11},
    '{13, 11,  7, 14, 12,  1,  3,  9,  5,  0, 15,  4,  8,  6,  2, 10},
    '{ 6, 15, 14,  9, 11,  3,  0,  8, 12,  2, 13,  7,  1,  4, 10,  5},
    '{10,  2,  8,  4,  7,  6,  1,  5, 15, 11,  9, 14,  3, 12, 13,  0}
  };

  typedef enum logic [1:0] {S_IDLE, S_INIT, S_G, S_FIN} eng_state_t;

  logic [511:0] blk;
  logic         blk_go, blk_first, blk_last, len_known, eng_done;
  logic [63:0]  bits_before, len_bp;
  logic [255:0] h_flat;

  sha_io #(.BLOCK_BITS(512)) u_io (
    .clk, .rst, .din, .src_ready, .src_read, .dout, .dst_ready, .dst_write,
    .blk, .blk_go, .blk_first, .blk_last, .bits_before, .len_bp, .len_known,
    .eng_done, .hash(h_flat)
  );

  function automatic logic [31:0] rotr(input logic [31:0] x, input int unsigned n);
    return (x >> n) | (x << (32 - n));
  endfunction

  eng_state_t  st;
  logic [3:0]  cnt;                 // init word / half-G step within a round / final word
  logic [3:0]  rnd;                 // round number, 0..13
  logic [3:0]  rnd10;               // round number mod 10
  logic [31:0] h  [8];              // chaining value
  logic [31:0] va [4];              // state rows A..D (v0..3, v4..7, v8..11, v12..15)
  logic [31:0] vb [4];
  logic [31:0] vc [4];
  logic [31:0] vd [4];
  logic [63:0] t;

  // counter for this block
  always_comb begin
    if (blk_last)
      t = (len_bp > bits_before) ? len_bp : 64'd0;
    else if (len_known && len_bp < bits_before + 64'd512)
      t = len_bp;
    else
      t = bits_before + 64'd512;
  end

  // ---- half-G datapath ----
  // step cnt: G index g = cnt[3:1] (0..3 columns, 4..7 diagonals), half = cnt[0]
  logic [2:0]  g;
  logic        half;
  logic [1:0]  ia, ib, ic, id;      // row-memory addresses
  logic [3:0]  sx, sy;              // message / constant indices
  logic [31:0] a0, b0, c0, d0, a1, b1, c1, d1, mx;

  assign g    = cnt[3:1];
  assign half = cnt[0];

  always_comb begin
    ia = g[1:0];
    ib = g[2] ? g[1:0] + 2'd1 : g[1:0];
    ic = g[2] ? g[1:0] + 2'd2 : g[1:0];
    id = g[2] ? g[1:0] + 2'd3 : g[1:0];
    sx = SIGMA[rnd10][{g, half}];
    sy = SIGMA[rnd10][{g, ~half}];
    a0 = va[ia]; b0 = vb[ib]; c0 = vc[ic]; d0 = vd[id];
    mx = blk[511 - 32*sx -: 32] ^ C[sy];
    a1 = a0 + b0 + mx;
    d1 = half ? rotr(d0 ^ a1, 8) : rotr(d0 ^ a1, 16);
    c1 = c0 + d1;
    b1 = half ? rotr(b0 ^ c1, 7) : rotr(b0 ^ c1, 12);
  end

  // initialisation word k of v
  function automatic logic [31:0] init_word(input logic [3:0] k, input logic [31:0] hk, input logic [63:0] tc);
    unique case (k)
      4'd12, 4'd13: return tc[31:0]  ^ C[k - 4'd8];
      4'd14, 4'd15: return tc[63:32] ^ C[k - 4'd8];
      default:      return (k < 4'd8) ? hk : C[k - 4'd8];
    endcase
  endfunction

  logic [31:0] vinit;
  assign vinit = init_word(cnt, h[cnt[2:0]], t);

  always_comb
    for (int i = 0; i < 8; i++) h_flat[255 - 32*i -: 32] = h[i];

  always_ff @(posedge clk) begin
    if (rst) begin
      st       <= S_IDLE;
      cnt      <= '0;
      rnd      <= '0;
      rnd10    <= '0;
      eng_done <= 1'b0;
      for (int i = 0; i < 8; i++) h[i] <= IV[255 - 32*i -: 32];
      for (int i = 0; i < 4; i++) begin va[i] <= '0; vb[i] <= '0; vc[i] <= '0; vd[i] <= '0; end
    end else begin
      eng_done <= 1'b0;
      unique case (st)
        S_IDLE: if (blk_go) begin
          if (blk_first) for (int i = 0; i < 8; i++) h[i] <= IV[255 - 32*i -: 32];
          cnt <= '0;
          st  <= S_INIT;
        end
        S_INIT: begin
          unique case (cnt[3:2])
            2'd0: va[cnt[1:0]] <= vinit;
            2'd1: vb[cnt[1:0]] <= vinit;
            2'd2: vc[cnt[1:0]] <= vinit;
            default: vd[cnt[1:0]] <= vinit;
          endcase
          cnt <= cnt + 1'b1;
          if (cnt == 4'd15) begin
            rnd   <= '0;
            rnd10 <= '0;
            st    <= S_G;
          end
        end
        S_G: begin
          va[ia] <= a1; vb[ib] <= b1; vc[ic] <= c1; vd[id] <= d1;
          cnt <= cnt + 1'b1;
          if (cnt == 4'd15) begin
            rnd   <= rnd + 1'b1;
            rnd10 <= (rnd10 == 4'd9) ? 4'd0 : rnd10 + 1'b1;
            if (rnd == 4'(ROUNDS - 1)) st <= S_FIN;
          end
        end
        S_FIN: begin
          // cnt runs 0..7: h[i] ^= v[i] ^ v[i+8]
          h[cnt[2:0]] <= h[cnt[2:0]] ^ (cnt[2] ? vb[cnt[1:0]] : va[cnt[1:0]])
                                     ^ (cnt[2] ? vd[cnt[1:0]] : vc[cnt[1:0]]);
          cnt <= cnt + 1'b1;
          if (cnt == 4'd7) begin
            eng_done <= 1'b1;
            st       <= S_IDLE;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
