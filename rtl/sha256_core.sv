// sha256_core: SHA-256 behind the common 16-bit interface (the reference core
// the SHA-3 finalists are compared against).
//
// The 512-bit message block is loaded by sha_io (32 words). The compression
// engine then holds the eight working variables a..h and a 16-word message
// schedule window in registers and performs one SHA-256 round per clock: the
// round uses Ch, Maj, Sigma0 and Sigma1, and the next schedule word is formed
// with sigma0 and sigma1 from the window while the round runs, so message
// expansion needs no cycles of its own. After 64 rounds one more cycle adds the
// working variables into the chaining value (hash generation).
//
// Timing: p = 1 (load variables) + 64 rounds + 1 (hash generation) = 66 cycles
// per block; the document's BRAM core takes 563 cycles and its register-based
// "logic only" core 404, because they run 7 cycles per round on a 32-bit
// datapath with the state in block RAM. Keeping all state in registers and
// running a full round per clock is this design's choice. The host pads the
// message (0x80, zeros, 64-bit big-endian bit length).
module sha256_core
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

  localparam logic [31:0] K [64] = '{
    32'h428a2f98, 32'h71374491, 32'hb5c0fbcf, 32'he9b5dba5, 32'h3956c25b, 32'h59f111f1, 32'h923f82a4, 32'hab1c5ed5,
    32'hd807aa98, 32'h12835b01, 32'h243185be, 32'h550c7dc3, 32'h72be5d74, 32'h80deb1fe, 32'h9bdc06a7, 32'hc19bf174,
    32'he49b69c1, 32'hefbe4786, 32'h0fc19dc6, 32'h240ca1cc, 32'h2de92c6f, 32'h4a7484aa, 32'h5cb0a9dc, 32'h76f988da,
    32'h983e5152, 32'ha831c66d, 32'hb00327c8, 32'hbf597fc7, 32'hc6e00bf3, 32'hd5a79147, 32'h06ca6351, 32'h14292967,
    32'h27b70a85, 32'h2e1b2138, 32'h4d2c6dfc, 32'h53380d13, 32'h650a7354, 32'h766a0abb, 32'h81c2c92e, 32'h92722c85,
    32'ha2bfe8a1, 32'ha81a664b, 32'hc24b8b70, 32'hc76c51a3, 32'hd192e819, 32'hd6990624, 32'hf40e3585, 32'h106aa070,
    32'h19a4c116, 32'h1e376c08, 32'h2748774c, 32'h34b0bcb5, 32'h391c0cb3, 32'h4ed8aa4a, 32'h5b9cca4f, 32'h682e6ff3,
    32'h748f82ee, 32'h78a5636f, 32'h84c87814, 32'h8cc70208, 32'h90befffa, 32'ha4506ceb, 32'hbef9a3f7, 32'hc67178f2
  };
  localparam logic [255:0] IV =
    256'h6a09e667_bb67ae85_3c6ef372_a54ff53a_510e527f_9b05688c_1f83d9ab_5be0cd19;

  typedef enum logic [1:0] {S_IDLE, S_ROUND, S_HASH} eng_state_t;

  logic [511:0] blk;
  logic         blk_go, blk_first, blk_last, len_known, eng_done;
  logic [63:0]  bits_before, len_bp;
  logic [255:0] h;                 // chaining value H0..H7, H0 at the top

  sha_io #(.BLOCK_BITS(512)) u_io (
    .clk, .rst, .din, .src_ready, .src_read, .dout, .dst_ready, .dst_write,
    .blk, .blk_go, .blk_first, .blk_last, .bits_before, .len_bp, .len_known,
    .eng_done, .hash(h)
  );

  function automatic logic [31:0] rotr(input logic [31:0] x, input int unsigned n);
    return (x >> n) | (x << (32 - n));
  endfunction

  eng_state_t   st;
  logic [5:0]   t;
  logic [31:0]  a, b, c, d, e, f, g, hh;
  logic [31:0]  w [16];            // schedule window, w[0] = W[t]
  logic [31:0]  t1, t2, s0, s1, wn;

  always_comb begin
    t1 = hh + (rotr(e, 6) ^ rotr(e, 11) ^ rotr(e, 25)) + ((e & f) ^ (~e & g)) + K[t] + w[0];
    t2 = (rotr(a, 2) ^ rotr(a, 13) ^ rotr(a, 22)) + ((a & b) ^ (a & c) ^ (b & c));
    s0 = rotr(w[1], 7) ^ rotr(w[1], 18) ^ (w[1] >> 3);
    s1 = rotr(w[14], 17) ^ rotr(w[14], 19) ^ (w[14] >> 10);
    wn = s1 + w[9] + s0 + w[0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st       <= S_IDLE;
      t        <= '0;
      eng_done <= 1'b0;
      h        <= IV;
      {a, b, c, d, e, f, g, hh} <= '0;
      for (int i = 0; i < 16; i++) w[i] <= '0;
    end else begin
      eng_done <= 1'b0;
      unique case (st)
        S_IDLE: if (blk_go) begin
          for (int i = 0; i < 16; i++) w[i] <= blk[511 - 32*i -: 32];
          {a, b, c, d, e, f, g, hh} <= blk_first ? IV : h;
          if (blk_first) h <= IV;
          t  <= '0;
          st <= S_ROUND;
        end
        S_ROUND: begin
          hh <= g; g <= f; f <= e; e <= d + t1;
          d  <= c; c <= b; b <= a; a <= t1 + t2;
          for (int i = 0; i < 15; i++) w[i] <= w[i+1];
          w[15] <= wn;
          t <= t + 1'b1;
          if (t == 6'd63) st <= S_HASH;
        end
        S_HASH: begin
          h <= {h[255:224] + a, h[223:192] + b, h[191:160] + c, h[159:128] + d,
                h[127:96]  + e, h[95:64]    + f, h[63:32]    + g, h[31:0]     + hh};
          eng_done <= 1'b1;
          st       <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
