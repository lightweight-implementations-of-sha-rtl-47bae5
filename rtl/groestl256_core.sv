// groestl256_core: Groestl-256 behind the common 16-bit interface.
//
// Groestl-256 keeps a 512-bit chaining value h, seen as an 8x8 byte matrix
// filled column by column. Each 512-bit message block m gives
//   h' = P(h ^ m) ^ Q(m) ^ h
// where P and Q are 10-round permutations built from AddRoundConstant,
// SubBytes (the AES S-box), ShiftBytes (row shifts 0..7 for P, 1,3,5,7,0,2,4,6
// for Q) and MixBytes (circulant matrix 02 02 03 04 05 03 05 07 over GF(2^8)).
// After the last block the output transformation trunc256(P(h) ^ h) gives the
// digest, so finalisation costs about as much as one block. The initial value
// is all zero except the 64-bit big-endian digest size 256 at its end. The
// host pads (0x80, zeros, 64-bit big-endian block count).
//
// Datapath (column-serial, after the document's logic-only core): four
// S-boxes and one MixBytes column unit. A new 64-bit state column takes two
// clocks: the first passes rows 0..3 of the shifted, constant-added column
// through the S-boxes into a holding register, the second rows 4..7, after
// which MixBytes gives the whole column. P and Q are interleaved column by
// column, so a round of both takes 8 x 2 x 2 = 32 clocks. ShiftBytes reads
// bytes from all eight columns, so new columns go to a second pair of state
// registers (np, nq) that replace the current ones at the end of each round.
//
// Timing: p = 1 (load h ^ m and m) + 10 x 32 + 1 (h' = P ^ Q ^ h) + 2 = 324
// cycles per block; the output transformation runs P alone, 10 x 16 + 1
// cycles. The document's logic-only core takes 357 (10 x 32 + 5, plus 32
// cycles of word-serial XOR); the one-clock chaining XOR, the register banks
// in place of its distributed RAMs and the full-column MixBytes unit (in
// place of its GF multiplier) are this design's own. The S-box table is
// computed at elaboration from its definition (multiplicative inverse, then
// the affine map).
module groestl256_core
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

  localparam int unsigned ROUNDS = 10;
  localparam logic [511:0] IV = 512'h0100;

  function automatic logic [7:0] xt(input logic [7:0] x);
    return {x[6:0], 1'b0} ^ (x[7] ? 8'h1b : 8'h00);
  endfunction

  typedef logic [7:0] sbox_t [256];

  // AES S-box: walk p over all non-zero field elements with generator 03 while
  // q walks over their inverses (multiplying by 03^-1 = f6); apply the affine map.
  function automatic sbox_t gen_sbox();
    sbox_t s;
    logic [7:0] p, q, x;
    p = 8'h01;
    q = 8'h01;
    s[0] = 8'h63;
    for (int n = 0; n < 255; n++) begin
      p = p ^ xt(p);
      q = q ^ {q[6:0], 1'b0};
      q = q ^ {q[5:0], 2'b00};
      q = q ^ {q[3:0], 4'h0};
      if (q[7]) q = q ^ 8'h09;
      x = q ^ {q[6:0], q[7]} ^ {q[5:0], q[7:6]} ^ {q[4:0], q[7:5]} ^ {q[3:0], q[7:4]};
      s[p] = x ^ 8'h63;
    end
    return s;
  endfunction

  localparam sbox_t SBOX = gen_sbox();
  localparam int unsigned SHIFT_P [8] = '{0, 1, 2, 3, 4, 5, 6, 7};
  localparam int unsigned SHIFT_Q [8] = '{1, 3, 5, 7, 0, 2, 4, 6};

  // byte at row i, column j of a 512-bit state
  function automatic logic [7:0] byte_at(input logic [511:0] s, input int unsigned i, input int unsigned j);
    return s[511 - 8*(8*j + i) -: 8];
  endfunction

  // AddRoundConstant and SubBytes of the byte that lands in row i of output
  // column j after ShiftBytes, for P (q = 0) or Q (q = 1) in round r
  function automatic logic [7:0] sub_byte(input logic [511:0] s, input logic [3:0] r, input logic q,
                                          input logic [2:0] i, input logic [2:0] j);
    logic [2:0] c;
    logic [7:0] x;
    c = j + 3'(q ? SHIFT_Q[i] : SHIFT_P[i]);
    x = s[511 - 8*(8*int'(c) + int'(i)) -: 8];
    if (!q && i == 3'd0) x = x ^ {1'b0, c, 4'h0} ^ {4'h0, r};
    if (q)               x = x ^ 8'hff;
    if (q && i == 3'd7)  x = x ^ {1'b0, c, 4'h0} ^ {4'h0, r};
    return SBOX[x];
  endfunction

  // MixBytes of one column: circulant 02 02 03 04 05 03 05 07, row 0 in bits 63:56
  function automatic logic [63:0] mix_col(input logic [63:0] y);
    logic [63:0] o;
    for (int i = 0; i < 8; i++) begin
      logic [7:0] v [8];
      for (int k = 0; k < 8; k++) v[k] = y[63 - 8*((i + k) % 8) -: 8];
      o[63 - 8*i -: 8] = xt(v[0]) ^ xt(v[1]) ^ (xt(v[2]) ^ v[2]) ^ xt(xt(v[3]))
                       ^ (xt(xt(v[4])) ^ v[4]) ^ (xt(v[5]) ^ v[5]) ^ (xt(xt(v[6])) ^ v[6])
                       ^ (xt(xt(v[7])) ^ xt(v[7]) ^ v[7]);
    end
    return o;
  endfunction

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_ROUND, S_COMB, S_FOUT} eng_state_t;

  logic [511:0] blk;
  logic         blk_go, blk_first, blk_last, len_known, eng_done;
  logic [63:0]  bits_before, len_bp;
  logic [255:0] digest;

  sha_io #(.BLOCK_BITS(512)) u_io (
    .clk, .rst, .din, .src_ready, .src_read, .dout, .dst_ready, .dst_write,
    .blk, .blk_go, .blk_first, .blk_last, .bits_before, .len_bp, .len_known,
    .eng_done, .hash(digest)
  );

  eng_state_t   st;
  logic [3:0]   rnd;
  logic [4:0]   cnt;                // {column j, q, half}
  logic         fin;                // output transformation (P only)
  logic [511:0] h, sp, sq, np, nq, np_w, nq_w;
  logic [31:0]  lo;                 // rows 0..3 of the column being built
  logic [7:0]   sb [4];
  logic [63:0]  col;
  logic [2:0]   cj;
  logic         cq, half, rnd_end;

  assign cj   = cnt[4:2];
  assign cq   = cnt[1];
  assign half = cnt[0];

  // four S-boxes: rows 0..3 in the first half of a column, rows 4..7 in the second
  always_comb begin
    for (int u = 0; u < 4; u++)
      sb[u] = sub_byte(cq ? sq : sp, rnd, cq, {half, 2'(u)}, cj);
    col  = mix_col({lo, sb[0], sb[1], sb[2], sb[3]});
    np_w = np;
    nq_w = nq;
    if (cq) nq_w[511 - 64*int'(cj) -: 64] = col;
    else    np_w[511 - 64*int'(cj) -: 64] = col;
    // last column of the round: Q's column 7, or P's in the output transformation
    rnd_end = half && cj == 3'd7 && (fin ? !cq : cq);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st       <= S_IDLE;
      rnd      <= '0;
      cnt      <= '0;
      fin      <= 1'b0;
      eng_done <= 1'b0;
      h        <= IV;
      sp       <= '0;
      sq       <= '0;
      np       <= '0;
      nq       <= '0;
      lo       <= '0;
      digest   <= '0;
    end else begin
      eng_done <= 1'b0;
      unique case (st)
        S_IDLE: if (blk_go) begin
          if (blk_first) h <= IV;
          st <= S_LOAD;
        end
        S_LOAD: begin
          sp  <= h ^ blk;
          sq  <= blk;
          rnd <= '0;
          cnt <= '0;
          fin <= 1'b0;
          st  <= S_ROUND;
        end
        // one new column every two clocks, P and Q interleaved column by column
        S_ROUND: begin
          if (!half) lo <= {sb[0], sb[1], sb[2], sb[3]};
          else begin
            np <= np_w;
            nq <= nq_w;
          end
          // the output transformation skips Q's columns
          cnt <= (fin && half) ? cnt + 5'd3 : cnt + 5'd1;
          if (rnd_end) begin
            sp  <= np_w;
            sq  <= nq_w;
            cnt <= '0;
            rnd <= rnd + 1'b1;
            if (rnd == 4'(ROUNDS - 1)) st <= fin ? S_FOUT : S_COMB;
          end
        end
        S_COMB: begin
          h <= sp ^ sq ^ h;
          if (blk_last) begin
            // output transformation: P(h) ^ h
            sp  <= sp ^ sq ^ h;
            rnd <= '0;
            cnt <= '0;
            fin <= 1'b1;
            st  <= S_ROUND;
          end else begin
            eng_done <= 1'b1;
            st       <= S_IDLE;
          end
        end
        S_FOUT: begin
          digest   <= sp[255:0] ^ h[255:0];
          eng_done <= 1'b1;
          st       <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
