// tb_blake256_core: self-checking testbench for blake256_core.
// Drives the 16-bit FIFO protocol from a queue (random stalls on both FIFOs,
// messages split into several segments) and compares each digest with
// published BLAKE-256 vectors and with a plain software model written here,
// including messages whose last block holds padding only (counter 0).
// Unstalled single-segment runs also check st + (l + p) * N + end with
// l = 32 and p = 250 (16 initialisation, 224 half-G, 8 finalisation cycles
// and 2 cycles of hand-off).
module tb_blake256_core;
  localparam int NRAND = 10;
  localparam int WATCHDOG = 400000;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic [15:0] din = '0;
  logic        src_ready = 1'b1;
  logic        src_read;
  logic [15:0] dout;
  logic        dst_ready = 1'b1;
  logic        dst_write;

  int checks = 0;
  int failures = 0;
  int cycle = 0;
  int stall_pct = 0;
  int first_read_cycle = -1;
  int last_write_cycle = -1;
  int input_stalls = 0;
  int output_stalls = 0;
  int multi_segment_msgs = 0;
  logic [15:0] inq[$];
  logic [15:0] outq[$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Input and output FIFO models: first-word-fall-through, active-low flags.
  always @(negedge clk) begin
    bit stall_in, stall_out;
    stall_in  = ($urandom_range(99) < stall_pct);
    stall_out = ($urandom_range(99) < stall_pct);
    src_ready <= (inq.size() == 0) || stall_in;
    din       <= (inq.size() != 0) ? inq[0] : 16'h0;
    dst_ready <= stall_out;
    if (stall_in && inq.size() != 0) input_stalls++;
    if (stall_out) output_stalls++;
  end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (src_read) begin
      if (src_ready) begin failures++; $display("FAIL: src_read while input FIFO empty"); end
      else begin
        void'(inq.pop_front());
        if (first_read_cycle < 0) first_read_cycle = cycle;
      end
    end
    if (dst_write) begin
      if (dst_ready) begin failures++; $display("FAIL: dst_write while output FIFO full"); end
      outq.push_back(dout);
      last_write_cycle = cycle;
    end
  end

  // Build the word stream for a padded message: nseg segments, split at
  // 32-bit boundaries inside the unpadded message.
  task automatic send_message(input byte unsigned padded[$], input int msg_bytes, input int nseg);
    int total_w32, cut[$], start_w, seg_w;
    total_w32 = padded.size() / 4;
    cut.delete();
    for (int s = 1; s < nseg; s++) begin
      int c;
      c = (msg_bytes / 4 > 0) ? $urandom_range(msg_bytes / 4) : 0;
      cut.push_back(c);
    end
    cut.sort();
    cut.push_back(total_w32);
    start_w = 0;
    for (int s = 0; s < cut.size(); s++) begin
      bit last;
      last  = (s == cut.size() - 1);
      seg_w = cut[s] - start_w;
      inq.push_back({seg_w[14:0], last});
      if (last) inq.push_back(16'(msg_bytes * 8 - start_w * 32));
      for (int i = start_w * 4; i < cut[s] * 4; i += 2) inq.push_back({padded[i], padded[i+1]});
      start_w = cut[s];
    end
    if (nseg > 1) multi_segment_msgs++;
  endtask

  task automatic get_digest(output logic [255:0] dg);
    int guard;
    guard = 0;
    while (outq.size() < 16 && guard < 200000) begin @(posedge clk); guard++; end
    dg = '0;
    for (int i = 0; i < 16; i++) dg = {dg[239:0], outq.pop_front()};
    @(posedge clk);
  endtask

  blake256_core dut (.*);

  // ---- independent reference model (BLAKE-256 specification, plain loops) ----
  function automatic logic [31:0] rr(input logic [31:0] x, input int n);
    return (x >> n) | (x << (32 - n));
  endfunction

  function automatic void pad(input byte unsigned m[$], output byte unsigned p[$]);
    longint unsigned bits;
    bits = 64'(m.size()) * 8;
    p = m;
    p.push_back(8'h80);
    while (p.size() % 64 != 56) p.push_back(8'h00);
    p[p.size()-1] = p[p.size()-1] | 8'h01;
    for (int i = 7; i >= 0; i--) p.push_back(8'(bits >> (8 * i)));
  endfunction

  // message length of the last padded message, needed for the counter
  longint unsigned ref_bits;

  function automatic logic [255:0] ref_hash(input byte unsigned p[$]);
    int sg[10][16] = '{
      '{0,1,2,3,4,5,6,7,8,9,10,11,12,13,14,15}, '{14,10,4,8,9,15,13,6,1,12,0,2,11,7,5,3},
      '{11,8,12,0,5,2,15,13,10,14,3,6,7,1,9,4}, '{7,9,3,1,13,12,11,14,2,6,5,10,4,0,15,8},
      '{9,0,5,7,2,4,10,15,14,1,11,12,6,8,3,13}, '{2,12,6,10,0,11,8,3,4,13,7,5,15,14,1,9},
      '{12,5,1,15,14,13,4,10,0,7,6,3,9,2,8,11}, '{13,11,7,14,12,1,3,9,5,0,15,4,8,6,2,10},
      '{6,15,14,9,11,3,0,8,12,2,13,7,1,4,10,5}, '{10,2,8,4,7,6,1,5,15,11,9,14,3,12,13,0}};
    logic [31:0] cc[16] = '{'h243F6A88,'h85A308D3,'h13198A2E,'h03707344,'hA4093822,'h299F31D0,'h082EFA98,'hEC4E6C89,
                            'h452821E6,'h38D01377,'hBE5466CF,'h34E90C6C,'hC0AC29B7,'hC97C50DD,'h3F84D5B5,'hB5470917};
    logic [31:0] hv[8] = '{'h6a09e667,'hbb67ae85,'h3c6ef372,'ha54ff53a,'h510e527f,'h9b05688c,'h1f83d9ab,'h5be0cd19};
    int gi[8][4] = '{'{0,4,8,12},'{1,5,9,13},'{2,6,10,14},'{3,7,11,15},'{0,5,10,15},'{1,6,11,12},'{2,7,8,13},'{3,4,9,14}};
    logic [31:0] mm[16], v[16];
    logic [255:0] r;
    longint unsigned bits, cnt;
    int nb;
    bits = 0;
    for (int i = 0; i < 8; i++) bits = (bits << 8) | p[p.size()-8+i];
    nb = p.size() / 64;
    for (int blk = 0; blk < nb; blk++) begin
      cnt = 64'(blk + 1) * 512;
      if (cnt > bits) cnt = bits;
      if (bits <= 64'(blk) * 512) cnt = 0;
      for (int t = 0; t < 16; t++)
        mm[t] = {p[blk*64+4*t], p[blk*64+4*t+1], p[blk*64+4*t+2], p[blk*64+4*t+3]};
      for (int i = 0; i < 8; i++) v[i] = hv[i];
      for (int i = 0; i < 8; i++) v[8+i] = cc[i];
      v[12] ^= cnt[31:0]; v[13] ^= cnt[31:0]; v[14] ^= cnt[63:32]; v[15] ^= cnt[63:32];
      for (int rd = 0; rd < 14; rd++)
        for (int g = 0; g < 8; g++) begin
          int a, b, c, d, x, y;
          a = gi[g][0]; b = gi[g][1]; c = gi[g][2]; d = gi[g][3];
          x = sg[rd % 10][2*g]; y = sg[rd % 10][2*g+1];
          v[a] = v[a] + v[b] + (mm[x] ^ cc[y]); v[d] = rr(v[d] ^ v[a], 16);
          v[c] = v[c] + v[d];                   v[b] = rr(v[b] ^ v[c], 12);
          v[a] = v[a] + v[b] + (mm[y] ^ cc[x]); v[d] = rr(v[d] ^ v[a], 8);
          v[c] = v[c] + v[d];                   v[b] = rr(v[b] ^ v[c], 7);
        end
      for (int i = 0; i < 8; i++) hv[i] = hv[i] ^ v[i] ^ v[i+8];
    end
    r = '0;
    for (int i = 0; i < 8; i++) r = {r[223:0], hv[i]};
    return r;
  endfunction

  // Published vectors: the empty message, one zero byte and 72 zero bytes.
  localparam int NKAT = 3;
  int           kat_len [NKAT] = '{0, 1, 72};
  logic [255:0] kat_dig [NKAT] = '{
    256'h716f6e863f744b9ac22c97ec7b76ea5f5908bc5b2f67c61510bfc4751384ea7a,
    256'h0ce8d4ef4dd7cd8d62dfded9d4edb0a774ae6a41929a74da23109e8f11139c87,
    256'hd419bad32d504fb7d44d460c42c5593fe544fa4c135dec31e21bd9abdcc22d41};
  task automatic get_kat(input int k, output byte unsigned m[$]);
    m.delete();
    for (int i = 0; i < kat_len[k]; i++) m.push_back(8'h00);
  endtask

  localparam int BLK_BYTES = 64;
  localparam int LOAD_CYC  = 32;
  localparam int P_CYC     = 250;
  localparam int END_CYC   = 16;

  task automatic run_one(input byte unsigned m[$], input int nseg, input bit use_kat, input logic [255:0] kat, input bit timed);
    byte unsigned p[$];
    logic [255:0] dg, exp_dg;
    int nblk;
    pad(m, p);
    nblk = p.size() / BLK_BYTES;
    exp_dg = use_kat ? kat : ref_hash(p);
    first_read_cycle = -1;
    send_message(p, m.size(), nseg);
    get_digest(dg);
    check(dg === exp_dg, $sformatf("digest of %0d-byte message: got %h expected %h", m.size(), dg, exp_dg));
    if (timed) begin
      int got;
      got = last_write_cycle - first_read_cycle + 1;
      check(got == 2 + (LOAD_CYC + P_CYC) * nblk + END_CYC,
            $sformatf("cycle count for %0d blocks: got %0d expected %0d", nblk, got, 2 + (LOAD_CYC + P_CYC) * nblk + END_CYC));
    end
  endtask

  initial begin
    byte unsigned m[$];
    repeat (3) @(posedge clk);
    rst = 1'b0;
    // published vectors, no stalls, timed
    for (int k = 0; k < NKAT; k++) begin
      get_kat(k, m);
      run_one(m, 1, 1'b1, kat_dig[k], 1'b1);
    end
    // random messages against the reference model, multi-segment, with stalls
    for (int n = 0; n < NRAND; n++) begin
      int len;
      stall_pct = (n % 2) ? 30 : 0;
      // n = 4, 5: the last 8 bytes of a block, so that the length field of
      // 64-bit-length paddings spills into a block of its own
      if (n < 4)       len = BLK_BYTES * n + $urandom_range(BLK_BYTES - 1);
      else if (n < 6)  len = BLK_BYTES * (n - 3) - 8 + $urandom_range(7);
      else             len = $urandom_range(3 * BLK_BYTES);
      m.delete();
      for (int i = 0; i < len; i++) m.push_back(8'($urandom));
      run_one(m, 1 + (n % 3), 1'b0, '0, stall_pct == 0 && (n % 3) == 0);
    end
    check(input_stalls > 0 && output_stalls > 0, "stalls on both FIFOs were exercised");
    check(multi_segment_msgs > 0, "multi-segment messages were exercised");
    $display("input stalls %0d, output stalls %0d, multi-segment messages %0d", input_stalls, output_stalls, multi_segment_msgs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
