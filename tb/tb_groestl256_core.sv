// tb_groestl256_core: self-checking testbench for groestl256_core.
// Drives the 16-bit FIFO protocol from a queue (random stalls on both FIFOs,
// messages split into several segments) and compares each digest with the
// published Groestl-256 vector for the empty message and with a software
// model written here (S-box from log/antilog tables, MixBytes as a matrix
// product). Unstalled single-segment runs also check st + (l + p) * N + end,
// where end includes the output transformation.
// A 400000-cycle watchdog ends a hung run.
module tb_groestl256_core;
  localparam int NRAND = 8;
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

  groestl256_core dut (.*);

  // ---- independent reference model: S-box from log/antilog tables of the
  // generator 03, MixBytes as a general matrix product ----
  byte unsigned sb[256];

  function automatic byte unsigned mul(input byte unsigned a, input byte unsigned b);
    byte unsigned p;
    p = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= a;
      a = {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
    end
    return p;
  endfunction

  function automatic void build_sbox();
    byte unsigned lg[256], alg[256], g, inv, s;
    g = 1;
    for (int i = 0; i < 255; i++) begin alg[i] = g; lg[g] = 8'(i); g = mul(g, 3); end
    for (int x = 0; x < 256; x++) begin
      inv = (x == 0) ? 8'h00 : alg[(255 - lg[x]) % 255];
      s = 8'h63;
      for (int bt = 0; bt < 8; bt++)
        s[bt] = s[bt] ^ inv[bt] ^ inv[(bt+4)%8] ^ inv[(bt+5)%8] ^ inv[(bt+6)%8] ^ inv[(bt+7)%8];
      sb[x] = s;
    end
  endfunction

  function automatic void perm(inout byte unsigned st[8][8], input bit q);
    int sh[8];
    byte unsigned bm[8] = '{2, 2, 3, 4, 5, 3, 5, 7};
    byte unsigned t[8][8];
    for (int r = 0; r < 10; r++) begin
      for (int i = 0; i < 8; i++) sh[i] = q ? ((i < 4) ? 2*i + 1 : 2*(i - 4)) : i;
      for (int j = 0; j < 8; j++) begin
        if (q) begin
          for (int i = 0; i < 7; i++) st[i][j] ^= 8'hff;
          st[7][j] ^= 8'hff ^ 8'(16*j) ^ 8'(r);
        end else st[0][j] ^= 8'(16*j) ^ 8'(r);
      end
      for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++) st[i][j] = sb[st[i][j]];
      for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++) t[i][j] = st[i][(j + sh[i]) % 8];
      for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++) begin
        st[i][j] = 0;
        for (int k = 0; k < 8; k++) st[i][j] ^= mul(t[k][j], bm[(k - i + 8) % 8]);
      end
    end
  endfunction

  function automatic void pad(input byte unsigned m[$], output byte unsigned p[$]);
    longint unsigned nb;
    p = m;
    p.push_back(8'h80);
    while (p.size() % 64 != 56) p.push_back(8'h00);
    nb = 64'(p.size() + 8) / 64;
    for (int i = 7; i >= 0; i--) p.push_back(8'(nb >> (8 * i)));
  endfunction

  function automatic logic [255:0] ref_hash(input byte unsigned p[$]);
    byte unsigned hh[8][8], a[8][8], b[8][8];
    logic [255:0] r;
    build_sbox();
    for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++) hh[i][j] = 0;
    hh[6][7] = 8'h01;
    for (int blk = 0; blk < p.size() / 64; blk++) begin
      for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++) begin
        b[i][j] = p[blk*64 + 8*j + i];
        a[i][j] = b[i][j] ^ hh[i][j];
      end
      perm(a, 0);
      perm(b, 1);
      for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++) hh[i][j] ^= a[i][j] ^ b[i][j];
    end
    a = hh;
    perm(a, 0);
    r = '0;
    for (int j = 4; j < 8; j++) for (int i = 0; i < 8; i++) r = {r[247:0], a[i][j] ^ hh[i][j]};
    return r;
  endfunction

  // Published Groestl-256 vector: the empty message.
  localparam int NKAT = 1;
  logic [255:0] kat_dig [NKAT] = '{
    256'h1a52d11d550039be16107f9c58db9ebcc417f16f736adb2502567119f0083467};
  task automatic get_kat(input int k, output byte unsigned m[$]);
    m.delete();
  endtask

  localparam int BLK_BYTES = 64;
  localparam int LOAD_CYC  = 32;
  localparam int P_CYC     = 324;
  localparam int END_CYC   = 177;

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
