// tb_keccak256_core: self-checking testbench for keccak256_core.
// Drives the 16-bit FIFO protocol from a queue (random stalls on both FIFOs,
// messages split into several segments) and compares each digest with
// published Keccak-256 vectors and with a software model written here that
// derives the round constants and rotations from their definitions.
// Unstalled single-segment runs also check st + (l + p) * N + end with
// l = 68 and p = 1827 (25 absorb + 24 rounds x 75 cycles + 2 of hand-off).
module tb_keccak256_core;
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

  keccak256_core dut (.*);

  // ---- independent reference model: round constants from the LFSR
  // x^8 + x^6 + x^5 + x^4 + 1 and rho offsets from the (x, y) walk ----
  function automatic logic [63:0] rl(input logic [63:0] x, input int n);
    n = n % 64;
    return (n == 0) ? x : ((x << n) | (x >> (64 - n)));
  endfunction

  function automatic void pad(input byte unsigned m[$], output byte unsigned p[$]);
    p = m;
    p.push_back(8'h01);
    while (p.size() % 136 != 0) p.push_back(8'h00);
    p[p.size()-1] = p[p.size()-1] | 8'h80;
  endfunction

  function automatic logic [255:0] ref_hash(input byte unsigned p[$]);
    logic [63:0] s[5][5], bb[5][5], c[5], d[5], rcs[24];
    int rot[5][5];
    logic [7:0] lfsr;
    logic [255:0] r;
    int x, y, tmp;
    // round constants
    lfsr = 8'h01;
    for (int i = 0; i < 24; i++) begin
      rcs[i] = '0;
      for (int j = 0; j < 7; j++) begin
        if (lfsr[0]) rcs[i][(1 << j) - 1] = 1'b1;
        lfsr = lfsr[7] ? ((lfsr << 1) ^ 8'h71) : (lfsr << 1);
      end
    end
    // rotation offsets
    rot[0][0] = 0; x = 1; y = 0;
    for (int t = 0; t < 24; t++) begin
      rot[x][y] = ((t + 1) * (t + 2) / 2) % 64;
      tmp = y; y = (2 * x + 3 * y) % 5; x = tmp;
    end
    for (int i = 0; i < 5; i++) for (int j = 0; j < 5; j++) s[i][j] = '0;
    for (int blk = 0; blk < p.size() / 136; blk++) begin
      for (int l = 0; l < 17; l++)
        for (int k = 0; k < 8; k++)
          s[l % 5][l / 5][8*k +: 8] ^= p[blk*136 + 8*l + k];
      for (int rd = 0; rd < 24; rd++) begin
        for (int i = 0; i < 5; i++) c[i] = s[i][0] ^ s[i][1] ^ s[i][2] ^ s[i][3] ^ s[i][4];
        for (int i = 0; i < 5; i++) d[i] = c[(i+4)%5] ^ rl(c[(i+1)%5], 1);
        for (int i = 0; i < 5; i++) for (int j = 0; j < 5; j++) s[i][j] ^= d[i];
        for (int i = 0; i < 5; i++) for (int j = 0; j < 5; j++) bb[j][(2*i+3*j)%5] = rl(s[i][j], rot[i][j]);
        for (int i = 0; i < 5; i++) for (int j = 0; j < 5; j++) s[i][j] = bb[i][j] ^ (~bb[(i+1)%5][j] & bb[(i+2)%5][j]);
        s[0][0] ^= rcs[rd];
      end
    end
    r = '0;
    for (int k = 0; k < 32; k++) r = {r[247:0], s[(k/8) % 5][(k/8) / 5][8*(k%8) +: 8]};
    return r;
  endfunction

  // Published Keccak-256 vectors (submission padding): "" and "abc".
  localparam int NKAT = 2;
  string        kat_msg [NKAT] = '{"", "abc"};
  logic [255:0] kat_dig [NKAT] = '{
    256'hc5d2460186f7233c927e7db2dcc703c0e500b653ca82273b7bfad8045d85a470,
    256'h4e03657aea45a94fc7d47ba826c8d667c0d1e6e33a64a036ec44f58fa12d6c45};
  task automatic get_kat(input int k, output byte unsigned m[$]);
    m.delete();
    for (int i = 0; i < kat_msg[k].len(); i++) m.push_back(kat_msg[k][i]);
  endtask

  localparam int BLK_BYTES = 136;
  localparam int LOAD_CYC  = 68;
  localparam int P_CYC     = 1827;
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
