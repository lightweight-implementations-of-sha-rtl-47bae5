// sha3_lightweight_top: the five SHA-3 finalists (BLAKE-256, Groestl-256,
// JH-256 with 42 rounds, Keccak-256 and Skein-512-256) and SHA-256 as the
// reference, each a complete hash core behind the same standardised 16-bit
// FIFO interface, side by side.
//
// The cores are independent: each has its own input and output FIFO port,
// indexed by sha_pkg::core_id_t (0 BLAKE-256, 1 Groestl, 2 JH, 3 Keccak,
// 4 Skein, 5 SHA-256), and all share the clock and a synchronous active-high
// reset. Putting them in one top, with identical ports, is what makes their
// area, throughput and power directly comparable; none of them talks to
// another. src_ready and dst_ready are active low (FIFO empty / FIFO full), as
// in every core; see sha_io for the protocol and its timing.
module sha3_lightweight_top
  import sha_pkg::*;
(
  input  logic                            clk,
  input  logic                            rst,
  input  logic [NUM_CORES-1:0][IO_W-1:0]  din,
  input  logic [NUM_CORES-1:0]            src_ready,
  output logic [NUM_CORES-1:0]            src_read,
  output logic [NUM_CORES-1:0][IO_W-1:0]  dout,
  input  logic [NUM_CORES-1:0]            dst_ready,
  output logic [NUM_CORES-1:0]            dst_write
);

  blake256_core u_blake256 (
    .clk, .rst,
    .din(din[CORE_BLAKE256]), .src_ready(src_ready[CORE_BLAKE256]), .src_read(src_read[CORE_BLAKE256]),
    .dout(dout[CORE_BLAKE256]), .dst_ready(dst_ready[CORE_BLAKE256]), .dst_write(dst_write[CORE_BLAKE256])
  );

  groestl256_core u_groestl256 (
    .clk, .rst,
    .din(din[CORE_GROESTL]), .src_ready(src_ready[CORE_GROESTL]), .src_read(src_read[CORE_GROESTL]),
    .dout(dout[CORE_GROESTL]), .dst_ready(dst_ready[CORE_GROESTL]), .dst_write(dst_write[CORE_GROESTL])
  );

  jh256_core u_jh256 (
    .clk, .rst,
    .din(din[CORE_JH42]), .src_ready(src_ready[CORE_JH42]), .src_read(src_read[CORE_JH42]),
    .dout(dout[CORE_JH42]), .dst_ready(dst_ready[CORE_JH42]), .dst_write(dst_write[CORE_JH42])
  );

  keccak256_core u_keccak256 (
    .clk, .rst,
    .din(din[CORE_KECCAK]), .src_ready(src_ready[CORE_KECCAK]), .src_read(src_read[CORE_KECCAK]),
    .dout(dout[CORE_KECCAK]), .dst_ready(dst_ready[CORE_KECCAK]), .dst_write(dst_write[CORE_KECCAK])
  );

  skein256_core u_skein256 (
    .clk, .rst,
    .din(din[CORE_SKEIN]), .src_ready(src_ready[CORE_SKEIN]), .src_read(src_read[CORE_SKEIN]),
    .dout(dout[CORE_SKEIN]), .dst_ready(dst_ready[CORE_SKEIN]), .dst_write(dst_write[CORE_SKEIN])
  );

  sha256_core u_sha256 (
    .clk, .rst,
    .din(din[CORE_SHA256]), .src_ready(src_ready[CORE_SHA256]), .src_read(src_read[CORE_SHA256]),
    .dout(dout[CORE_SHA256]), .dst_ready(dst_ready[CORE_SHA256]), .dst_write(dst_write[CORE_SHA256])
  );

endmodule
