// tb_sha256_core: self-checking testbench for sha256_core.
// Drives the 16-bit FIFO protocol from a queue (with random stalls on both
// FIFOs and messages split into several segments), and compares each digest
// with published FIPS 180-2 vectors and with a straightforward software model
// of SHA-256 written here. Unstalled single-segment runs also check the cycle
// count st + (l + p) * N + end with st = 2, l = 32 load cycles per block.
module tb_sha256_core;
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

  sha256_core dut (.*);

  // ---- independent reference model ----
  function automatic logic [31:0] rr(input logic [31:0] x, input int n);
    return (x >> n) | (x << (32 - n));
  endfunction

  function automatic void pad(input byte unsigned m[$], output byte unsigned p[$]);
    longint unsigned bits;
    bits = 64'(m.size()) * 8;
    p = m;
    p.push_back(8'h80);
    while (p.size() % 64 != 56) p.push_back(8'h00);
    for (int i = 7; i >= 0; i--) p.push_back(8'(bits >> (8 * i)));
  endfunction

  function automatic logic [255:0] ref_hash(input byte unsigned p[$]);
    logic [31:0] kk[64] = '{
      'h428a2f98,'h71374491,'hb5c0fbcf,'he9b5dba5,'h3956c25b,'h59f111f1,'h923f82a4,'hab1c5ed5,
      'hd807aa98,'h12835b01,'h243185be,'h550c7dc3,'h72be5d74,'h80deb1fe,'h9bdc06a7,'hc19bf174,
      'he49b69c1,'hefbe4786,'h0fc19dc6,'h240ca1cc,'h2de92c6f,'h4a7484aa,'h5cb0a9dc,'h76f988da,
      'h983e5152,'ha831c66d,'hb00327c8,'hbf597fc7,'hc6e00bf3,'hd5a79147,'h06ca6351,'h14292967,
      'h27b70a85,'h2e1b2138,'h4d2c6dfc,'h53380d13,'h650a7354,'h766a0abb,'h81c2c92e,'h92722c85,
      'ha2bfe8a1,'ha81a664b,'hc24b8b70,'hc76c51a3,'hd192e819,'hd6990624,'hf40e3585,'h106aa070,
      'h19a4c116,'h1e376c08,'h2748774c,'h34b0bcb5,'h391c0cb3,'h4ed8aa4a,'h5b9cca4f,'h682e6ff3,
      'h748f82ee,'h78a5636f,'h84c87814,'h8cc70208,'h90befffa,'ha4506ceb,'hbef9a3f7,'hc67178f2};
    logic [31:0] hv[8] = '{'h6a09e667,'hbb67ae85,'h3c6ef372,'ha54ff53a,'h510e527f,'h9b05688c,'h1f83d9ab,'h5be0cd19};
    logic [31:0] ww[64], v[8], x1, x2;
    logic [255:0] r;
    for (int blk = 0; blk < p.size() / 64; blk++) begin
      for (int t = 0; t < 16; t++)
        ww[t] = {p[blk*64+4*t], p[blk*64+4*t+1], p[blk*64+4*t+2], p[blk*64+4*t+3]};
      for (int t = 16; t < 64; t++)
        ww[t] = (rr(ww[t-2],17) ^ rr(ww[t-2],19) ^ (ww[t-2] >> 10)) + ww[t-7]
              + (rr(ww[t-15],7) ^ rr(ww[t-15],18) ^ (ww[t-15] >> 3)) + ww[t-16];
      v = hv;
      for (int t = 0; t < 64; t++) begin
        x1 = v[7] + (rr(v[4],6) ^ rr(v[4],11) ^ rr(v[4],25)) + ((v[4] & v[5]) ^ (~v[4] & v[6])) + kk[t] + ww[t];
        x2 = (rr(v[0],2) ^ rr(v[0],13) ^ rr(v[0],22)) + ((v[0] & v[1]) ^ (v[0] & v[2]) ^ (v[1] & v[2]));
        v[7] = v[6]; v[6] = v[5]; v[5] = v[4]; v[4] = v[3] + x1;
        v[3] = v[2]; v[2] = v[1]; v[1] = v[0]; v[0] = x1 + x2;
      end
      for (int i = 0; i < 8; i++) hv[i] += v[i];
    end
    r = '0;
    for (int i = 0; i < 8; i++) r = {r[223:0], hv[i]};
    return r;
  endfunction

  // Published test vectors (FIPS 180-2 examples).
  localparam int NKAT = 3;
  string       kat_msg [NKAT] = '{"", "abc", "abcdbcdecdefdefgefghfghighijhijkijkljklmklmnlmnomnopnopq"};
  logic [255:0] kat_dig [NKAT] = '{
    256'he3b0c44298fc1c149afbf4c8996fb92427ae41e4649b934ca495991b7852b855,
    256'hba7816bf8f01cfea414140de5dae2223b00361a396177a9cb410ff61f20015ad,
    256'h248d6a61d20638b8e5c026930c3e6039a33ce45964ff2167f6ecedd419db06c1};
  task automatic get_kat(input int k, output byte unsigned m[$]);
    m.delete();
    for (int i = 0; i < kat_msg[k].len(); i++) m.push_back(kat_msg[k][i]);
  endtask

  // Per-block time of the engine and the fixed end cost, this design's timing.
  localparam int BLK_BYTES = 64;
  localparam int LOAD_CYC  = 32;
  localparam int P_CYC     = 67;
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
