// keccak256_core: Keccak-256 (Keccak-f[1600], rate r = 1088, capacity 512,
// 24 rounds) behind the common 16-bit interface, on a 64-bit lane-serial
// datapath.
//
// A 1088-bit message block (68 interface words) is XORed into the first 17
// lanes of the 5x5 state of 64-bit lanes, and the state goes through 24
// rounds of theta, rho & pi, chi and iota. Lanes are little-endian: byte 8*i
// of the block is the least significant byte of lane i. The digest is the
// first 32 bytes of the state. The host pads with the Keccak submission's
// pad10*1 (byte 0x01, zeros, last byte with bit 7 set).
//
// As in the document's logic-only design, the state lives in a 25-lane memory
// (A) and a second 25-lane memory (B) decouples theta from rho & pi, so one
// lane moves per clock and no cycle is spent only on writing back:
//   absorb     25 cycles: A[k] ^= message lane, column parities C[x] built
//   theta/rho/pi 25 cycles: B[pi(k)] = rotl(A[k] ^ D[x], rho[k]) with
//                D[x] = C[x-1] ^ rotl(C[x+1], 1) from the parity registers
//   chi/iota   10 cycles per row: five lanes of B into row registers, then
//                five lanes A[x] = R[x] ^ (~R[x+1] & R[x+2]) (^ RC on lane 0),
//                accumulating the next round's column parities as they are
//                written.
// The rho offsets feed a variable rotator (the fixed rotations of the
// algorithm become a variable rotation on a lane-serial datapath); the round
// constants are a 24-entry table.
//
// Timing: p = 25 + 24 x 75 = 1825 cycles per block plus 2 of hand-off. The
// document's version splits each lane into four 16-bit distributed RAMs and
// takes 58 + 39 cycles per round (2328 per block); the lane-wide memories and
// the chi schedule here are this design's own choices.
module keccak256_core
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

  localparam int unsigned RATE   = 1088;
  localparam int unsigned ROUNDS = 24;

  localparam logic [63:0] RC [24] = '{
    64'h0000000000000001, 64'h0000000000008082, 64'h800000000000808A, 64'h8000000080008000,
    64'h000000000000808B, 64'h0000000080000001, 64'h8000000080008081, 64'h8000000000008009,
    64'h000000000000008A, 64'h0000000000000088, 64'h0000000080008009, 64'h000000008000000A,
    64'h000000008000808B, 64'h800000000000008B, 64'h8000000000008089, 64'h8000000000008003,
    64'h8000000000008002, 64'h8000000000000080, 64'h000000000000800A, 64'h800000008000000A,
    64'h8000000080008081, 64'h8000000000008080, 64'h0000000080000001, 64'h8000000080008008
  };
  // rho offsets, index x + 5*y
  localparam logic [5:0] RHO [25] = '{
     0,  1, 62, 28, 27,
    36, 44,  6, 55, 20,
     3, 10, 43, 25, 39,
    41, 45, 15, 21,  8,
    18,  2, 61, 56, 14
  };
  // pi destination of lane x + 5*y: lane y + 5*((2x + 3y) mod 5)
  function automatic logic [4:0] pi_dst(input int unsigned k);
    return 5'((k / 5) + 5 * ((2 * (k % 5) + 3 * (k / 5)) % 5));
  endfunction

  typedef enum logic [1:0] {S_IDLE, S_ABSORB, S_RHOPI, S_CHI} eng_state_t;

  logic [RATE-1:0] blk;
  logic            blk_go, blk_first, blk_last, len_known, eng_done;
  logic [63:0]     bits_before, len_bp;
  logic [255:0]    digest;

  sha_io #(.BLOCK_BITS(RATE)) u_io (
    .clk, .rst, .din, .src_ready, .src_read, .dout, .dst_ready, .dst_write,
    .blk, .blk_go, .blk_first, .blk_last, .bits_before, .len_bp, .len_known,
    .eng_done, .hash(digest)
  );

  function automatic logic [63:0] rotl(input logic [63:0] x, input logic [5:0] n);
    logic [127:0] d;
    d = {x, x} << n;
    return d[127:64];
  endfunction

  eng_state_t  st;
  logic [4:0]  k;                   // lane counter 0..24
  logic [2:0]  y;                   // chi row
  logic [3:0]  j;                   // chi step within a row, 0..9
  logic [4:0]  rnd;
  logic [63:0] a [25];              // state memory
  logic [63:0] b [25];              // rho & pi memory
  logic [63:0] c [5];               // column parities
  logic [63:0] r [5];               // chi row registers

  // absorb: next value of lane k
  logic [63:0] lane_in, absorb_val;
  always_comb begin
    lane_in = '0;
    for (int q = 0; q < 8; q++)
      lane_in[8*q +: 8] = (k < 5'(RATE / 64)) ? blk[RATE - 1 - 8*(8*int'(k) + q) -: 8] : 8'h00;
    absorb_val = (blk_first ? 64'd0 : a[k]) ^ lane_in;
  end

  // theta + rho & pi for lane k
  logic [2:0]  kx;
  logic [63:0] dcol, rp_val;
  always_comb begin
    kx     = 3'(k % 5);
    dcol   = c[(kx + 3'd4) % 5] ^ rotl(c[(kx + 3'd1) % 5], 6'd1);
    rp_val = rotl(a[k] ^ dcol, RHO[k]);
  end

  // chi + iota for lane x = j - 5 of row y
  logic [2:0]  cx;
  logic [4:0]  cidx;
  logic [63:0] chi_val;
  always_comb begin
    cx      = 3'(j - 4'd5);
    cidx    = 5'(cx + 3'd5 * y);
    chi_val = r[cx] ^ (~r[(cx + 3'd1) % 5] & r[(cx + 3'd2) % 5]);
    if (cidx == 5'd0) chi_val = chi_val ^ RC[rnd];
  end

  always_comb
    for (int q = 0; q < 32; q++) digest[255 - 8*q -: 8] = a[q / 8][8*(q % 8) +: 8];

  always_ff @(posedge clk) begin
    if (rst) begin
      st       <= S_IDLE;
      k        <= '0;
      y        <= '0;
      j        <= '0;
      rnd      <= '0;
      eng_done <= 1'b0;
      for (int i = 0; i < 25; i++) begin a[i] <= '0; b[i] <= '0; end
      for (int i = 0; i < 5; i++)  begin c[i] <= '0; r[i] <= '0; end
    end else begin
      eng_done <= 1'b0;
      unique case (st)
        S_IDLE: if (blk_go) begin
          k  <= '0;
          st <= S_ABSORB;
        end
        S_ABSORB: begin
          a[k] <= absorb_val;
          c[kx] <= (k < 5'd5) ? absorb_val : c[kx] ^ absorb_val;
          k <= (k == 5'd24) ? 5'd0 : k + 1'b1;
          if (k == 5'd24) begin
            rnd <= '0;
            st  <= S_RHOPI;
          end
        end
        S_RHOPI: begin
          b[pi_dst(int'(k))] <= rp_val;
          k <= (k == 5'd24) ? 5'd0 : k + 1'b1;
          if (k == 5'd24) begin
            y  <= '0;
            j  <= '0;
            st <= S_CHI;
          end
        end
        S_CHI: begin
          if (j < 4'd5) begin
            r[j[2:0]] <= b[5'(j) + 5'd5 * 5'(y)];
          end else begin
            a[cidx] <= chi_val;
            c[cx]   <= (y == 3'd0) ? chi_val : c[cx] ^ chi_val;
          end
          j <= (j == 4'd9) ? 4'd0 : j + 1'b1;
          if (j == 4'd9) begin
            y <= (y == 3'd4) ? 3'd0 : y + 1'b1;
            if (y == 3'd4) begin
              rnd <= rnd + 1'b1;
              if (rnd == 5'(ROUNDS - 1)) begin
                eng_done <= 1'b1;
                st       <= S_IDLE;
              end else begin
                k  <= '0;
                st <= S_RHOPI;
              end
            end
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
