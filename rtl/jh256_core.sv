// jh256_core: JH-256 (42 rounds, the round-3 "JH42" tweak) behind the common
// 16-bit interface.
//
// JH keeps a 1024-bit state H. For each 512-bit message block M the
// compression function F8 XORs M into the first half of H, applies the
// bijection E8, and XORs M into the second half. E8 groups the 1024 bits into
// 256 4-bit elements (element 2i takes bits i, i+256, i+512, i+768 and element
// 2i+1 the same bits of i+128), runs 42 rounds R8 and de-groups. Each R8 round
// passes every element through S-box S0 or S1 (chosen by one bit of the 256-bit
// round constant), applies the linear map L to element pairs, and permutes the
// elements (P8 = swap pi, shuffle P', swap phi). The round constants are not
// stored: they are generated on the fly by the smaller round function R6 (64
// elements, S0 only), starting from the fractional part of sqrt(2), as the
// document's R6 branch shows. The digest is the last 256 bits of H.
//
// The initial state is the document's "precomputed S0": F8 applied to the
// digest size 0x0100 followed by zeros, with an all-zero message; like the
// document, the design stores it as a constant rather than computing it. The host pads the
// message (0x80, zeros, 128-bit big-endian bit length; at least 512 bits).
//
// Datapath (folded, after the document's core): the grouped state is
// processed in 16 slices of 16 elements (64 bits), one slice per clock
// through 16 S-boxes and 8 L units; each result element is written straight
// to its place after the permutation P8 in a second 1024-bit state register,
// which replaces the first at the end of the round. R6 updates the 256-bit
// round constant once per round, in the clock that ends it.
//
// Timing: p = 1 (XOR and group) + 42 rounds x 16 + 1 (de-group and XOR) + 2
// = 676 cycles per block. The document's core has the same 16 x 42 = 672
// round cycles but groups and de-groups word-serially (64 cycles each) and
// keeps the state in distributed RAM (737 per block); the one-clock grouping
// and the register banks are this design's own choices.
module jh256_core
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

  localparam int unsigned ROUNDS = 42;
  localparam logic [255:0] C0 =
    256'h6a09e667f3bcc908b2fb1366ea957d3e3adec17512775099da2f590b0667322a;
  localparam logic [3:0] S0 [16] = '{9, 0, 4, 11, 13, 12, 3, 15, 1, 10, 2, 6, 7, 5, 8, 14};
  localparam logic [3:0] S1 [16] = '{3, 12, 6, 13, 5, 7, 1, 9, 15, 2, 0, 4, 11, 10, 14, 8};

  // L: the MDS map on a pair of elements over GF(2^4), x^4 + x + 1
  function automatic logic [3:0] l_mul2(input logic [3:0] a);
    return {a[2:0], 1'b0} ^ {2'b00, a[3], a[3]};
  endfunction

  // S-boxes and L on 16 consecutive elements (8 pairs); rc holds their
  // 16 constant bits, first element in the top bit
  function automatic logic [63:0] sl16(input logic [63:0] a, input logic [15:0] rc);
    logic [3:0] t [16];
    logic [3:0] y, z;
    logic [63:0] r;
    for (int e = 0; e < 16; e++) t[e] = rc[15 - e] ? S1[a[63 - 4*e -: 4]] : S0[a[63 - 4*e -: 4]];
    for (int e = 0; e < 16; e += 2) begin
      y = t[e+1] ^ l_mul2(t[e]);
      z = t[e] ^ l_mul2(y);
      t[e] = z; t[e+1] = y;
    end
    for (int e = 0; e < 16; e++) r[63 - 4*e -: 4] = t[e];
    return r;
  endfunction

  // P8 = phi . P' . pi: the position element s moves to
  function automatic int unsigned p8_dst(input int unsigned s);
    int unsigned p, e;
    p = (s % 4 == 2) ? s + 1 : (s % 4 == 3) ? s - 1 : s;      // pi
    e = (p % 2 == 0) ? p / 2 : p / 2 + 128;                   // P'
    return (e >= 128) ? (e ^ 1) : e;                          // phi
  endfunction

  function automatic logic [255:0] round6(input logic [255:0] a);
    logic [3:0] t [64];
    logic [3:0] o [64];
    logic [3:0] x, y, z;
    logic [255:0] r;
    for (int e = 0; e < 64; e++) t[e] = S0[a[255 - 4*e -: 4]];
    for (int e = 0; e < 64; e += 2) begin
      y = t[e+1] ^ l_mul2(t[e]);
      z = t[e] ^ l_mul2(y);
      t[e] = z; t[e+1] = y;
    end
    for (int e = 0; e < 64; e += 4) begin x = t[e+2]; t[e+2] = t[e+3]; t[e+3] = x; end
    for (int e = 0; e < 32; e++) begin o[e] = t[2*e]; o[e+32] = t[2*e+1]; end
    for (int e = 32; e < 64; e += 2) begin x = o[e]; o[e] = o[e+1]; o[e+1] = x; end
    for (int e = 0; e < 64; e++) r[255 - 4*e -: 4] = o[e];
    return r;
  endfunction

  // bit i of H is h[1023 - i]
  function automatic logic [1023:0] group(input logic [1023:0] h);
    logic [1023:0] a;
    for (int i = 0; i < 128; i++) begin
      a[1023 - 4*(2*i) -: 4]   = {h[1023 - i], h[767 - i], h[511 - i], h[255 - i]};
      a[1023 - 4*(2*i+1) -: 4] = {h[895 - i], h[639 - i], h[383 - i], h[127 - i]};
    end
    return a;
  endfunction

  function automatic logic [1023:0] degroup(input logic [1023:0] a);
    logic [1023:0] h;
    for (int i = 0; i < 128; i++) begin
      {h[1023 - i], h[767 - i], h[511 - i], h[255 - i]} = a[1023 - 4*(2*i) -: 4];
      {h[895 - i], h[639 - i], h[383 - i], h[127 - i]}  = a[1023 - 4*(2*i+1) -: 4];
    end
    return h;
  endfunction

  // Initial state H0 = F8(H(-1), 0) with H(-1) = 0x0100 followed by 1008 zero
  // bits: XOR nothing, group, 42 rounds R8 (constants from R6), de-group.
  localparam logic [1023:0] H0 = {
    256'heb98a3412c20d3eb92cdbe7b9cb245c11c93519160d4c7fa260082d67e508a03,
    256'ha4239e267726b945e0fb1a48d41a9477cdb5ab26026b177a56f024420fff2fa8,
    256'h71a396897f2e4d751d144908f77de262277695f776248f9487d5b6574780296c,
    256'h5c5e272dac8e0d6c518450c657057a0f7be4d367702412ea89e3ab13d31cd769
  };

  typedef enum logic [1:0] {S_IDLE, S_GROUP, S_ROUND, S_DEGROUP} eng_state_t;

  logic [511:0]  blk;
  logic          blk_go, blk_first, blk_last, len_known, eng_done;
  logic [63:0]   bits_before, len_bp;
  logic [255:0]  digest;

  sha_io #(.BLOCK_BITS(512)) u_io (
    .clk, .rst, .din, .src_ready, .src_read, .dout, .dst_ready, .dst_write,
    .blk, .blk_go, .blk_first, .blk_last, .bits_before, .len_bp, .len_known,
    .eng_done, .hash(digest)
  );

  eng_state_t    st;
  logic [5:0]    rnd;
  logic [3:0]    k;                 // slice: elements 16k .. 16k+15
  logic [1023:0] h, a, na, na_w;
  logic [255:0]  rc;
  logic [63:0]   slice_out;

  assign digest = h[255:0];

  // one slice of R8 per clock; results go to their permuted places in na
  always_comb begin
    slice_out = sl16(a[1023 - 64*int'(k) -: 64], rc[255 - 16*int'(k) -: 16]);
    na_w = na;
    for (int s = 0; s < 256; s++)
      if (k == 4'(s / 16)) na_w[1023 - 4*p8_dst(s) -: 4] = slice_out[63 - 4*(s % 16) -: 4];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st       <= S_IDLE;
      rnd      <= '0;
      k        <= '0;
      eng_done <= 1'b0;
      h        <= H0;
      a        <= '0;
      na       <= '0;
      rc       <= C0;
    end else begin
      eng_done <= 1'b0;
      unique case (st)
        S_IDLE: if (blk_go) begin
          if (blk_first) h <= H0;
          st <= S_GROUP;
        end
        S_GROUP: begin
          a   <= group(h ^ {blk, 512'd0});
          rc  <= C0;
          rnd <= '0;
          k   <= '0;
          st  <= S_ROUND;
        end
        S_ROUND: begin
          na <= na_w;
          k  <= k + 1'b1;
          if (k == 4'd15) begin
            a   <= na_w;
            rc  <= round6(rc);
            rnd <= rnd + 1'b1;
            if (rnd == 6'(ROUNDS - 1)) st <= S_DEGROUP;
          end
        end
        S_DEGROUP: begin
          h        <= degroup(a) ^ {512'd0, blk};
          eng_done <= 1'b1;
          st       <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
