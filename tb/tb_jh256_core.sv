// tb_jh256_core: self-checking testbench for jh256_core.
// Drives the 16-bit FIFO protocol from a queue (random stalls on both FIFOs,
// messages split into several segments) and compares each digest with the
// published JH-256 vector for the empty message and with a software model
// written here over byte and 4-bit element arrays. Unstalled single-segment
// runs also check st + (l + p) * N + end.
// A 400000-cycle watchdog ends a hung run.
module tb_jh256_core;
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

  jh256_core dut (.*);

  // ---- independent reference model: JH written over a byte array H and a
  // 4-bit element array A, the initial state computed from H(-1) ----
  byte unsigned s0t[16] = '{9,0,4,11,13,12,3,15,1,10,2,6,7,5,8,14};
  byte unsigned s1t[16] = '{3,12,6,13,5,7,1,9,15,2,0,4,11,10,14,8};

  function automatic void lmap(inout byte unsigned a, inout byte unsigned b);
    b ^= ((a << 1) ^ (a >> 3) ^ ((a >> 2) & 2)) & 8'hf;
    a ^= ((b << 1) ^ (b >> 3) ^ ((b >> 2) & 2)) & 8'hf;
  endfunction

  // one round on n elements, constants cb (one bit per element)
  function automatic void rnd(inout byte unsigned x[256], input int n, input bit cb[256]);
    byte unsigned t[256], tmp;
    for (int i = 0; i < n; i++) t[i] = cb[i] ? s1t[x[i]] : s0t[x[i]];
    for (int i = 0; i < n; i += 2) lmap(t[i], t[i+1]);
    for (int i = 0; i < n; i += 4) begin tmp = t[i+2]; t[i+2] = t[i+3]; t[i+3] = tmp; end
    for (int i = 0; i < n / 2; i++) begin x[i] = t[2*i]; x[i + n/2] = t[2*i+1]; end
    for (int i = n / 2; i < n; i += 2) begin tmp = x[i]; x[i] = x[i+1]; x[i+1] = tmp; end
  endfunction

  function automatic void f8ref(inout byte unsigned hb[128], input byte unsigned mb[64]);
    byte unsigned aa[256], rc[256], tem[256];
    bit cb[256], zero[256];
    logic [255:0] c0 = 256'h6a09e667f3bcc908b2fb1366ea957d3e3adec17512775099da2f590b0667322a;
    for (int i = 0; i < 64; i++) hb[i] ^= mb[i];
    for (int i = 0; i < 256; i++) begin
      tem[i] = {4'h0, hb[i/8][7 - i%8], hb[(i+256)/8][7 - i%8], hb[(i+512)/8][7 - i%8], hb[(i+768)/8][7 - i%8]};
      zero[i] = 0;
    end
    for (int i = 0; i < 128; i++) begin aa[2*i] = tem[i]; aa[2*i+1] = tem[i+128]; end
    for (int i = 0; i < 64; i++) rc[i] = {4'h0, c0[255 - 4*i -: 4]};
    for (int r = 0; r < 42; r++) begin
      for (int i = 0; i < 256; i++) cb[i] = rc[i/4][3 - i%4];
      rnd(aa, 256, cb);
      rnd(rc, 64, zero);
    end
    for (int i = 0; i < 128; i++) begin tem[i] = aa[2*i]; tem[i+128] = aa[2*i+1]; end
    for (int i = 0; i < 128; i++) hb[i] = 0;
    for (int i = 0; i < 256; i++) begin
      hb[i/8][7 - i%8]         = tem[i][3];
      hb[(i+256)/8][7 - i%8]   = tem[i][2];
      hb[(i+512)/8][7 - i%8]   = tem[i][1];
      hb[(i+768)/8][7 - i%8]   = tem[i][0];
    end
    for (int i = 0; i < 64; i++) hb[64 + i] ^= mb[i];
  endfunction

  function automatic void pad(input byte unsigned m[$], output byte unsigned p[$]);
    longint unsigned bits;
    bits = 64'(m.size()) * 8;
    p = m;
    p.push_back(8'h80);
    // 1, then 383 + (-l mod 512) zero bits, then the 128-bit length
    while (p.size() != ((m.size() + 63) / 64) * 64 + 48) p.push_back(8'h00);
    for (int i = 0; i < 8; i++) p.push_back(8'h00);
    for (int i = 7; i >= 0; i--) p.push_back(8'(bits >> (8 * i)));
  endfunction

  function automatic logic [255:0] ref_hash(input byte unsigned p[$]);
    byte unsigned hb[128], mb[64];
    logic [255:0] r;
    for (int i = 0; i < 128; i++) hb[i] = 0;
    for (int i = 0; i < 64; i++) mb[i] = 0;
    hb[0] = 8'h01; hb[1] = 8'h00;
    f8ref(hb, mb);
    for (int b = 0; b < p.size() / 64; b++) begin
      for (int i = 0; i < 64; i++) mb[i] = p[64*b + i];
      f8ref(hb, mb);
    end
    r = '0;
    for (int i = 96; i < 128; i++) r = {r[247:0], hb[i]};
    return r;
  endfunction

  // Published JH-256 vector: the empty message.
  localparam int NKAT = 1;
  logic [255:0] kat_dig [NKAT] = '{
    256'h46e64619c18bb0a92a5e87185a47eef83ca747b8fcc8e1412921357e326df434};
  task automatic get_kat(input int k, output byte unsigned m[$]);
    m.delete();
  endtask

  localparam int BLK_BYTES = 64;
  localparam int LOAD_CYC  = 32;
  localparam int P_CYC     = 676;
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
