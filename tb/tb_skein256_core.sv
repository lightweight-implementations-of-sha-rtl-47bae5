// tb_skein256_core: self-checking testbench for skein256_core.
// Drives the 16-bit FIFO protocol from a queue (random stalls on both FIFOs,
// messages split into several segments) and compares each digest with the
// published Skein-512-256 vector for the empty message and with a software
// model written here (configuration, message and output UBI calls over
// Threefish-512). Unstalled single-segment runs also check st + (l + p) * N + end.
// A 400000-cycle watchdog ends a hung run.
module tb_skein256_core;
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

  skein256_core dut (.*);

  // ---- independent reference model: Skein-512 UBI chaining with
  // Threefish-512 written as plain loops over word arrays ----
  int rt[8][4] = '{'{46,36,19,37}, '{33,27,14,42}, '{17,49,36,39}, '{44,9,54,56},
                   '{39,30,34,24}, '{13,50,10,17}, '{25,29,39,43}, '{8,35,56,22}};
  int pm[8] = '{2, 1, 4, 7, 6, 5, 0, 3};

  function automatic void tf(input logic [63:0] key[8], input logic [63:0] tw0, input logic [63:0] tw1,
                             input logic [63:0] pt[8], output logic [63:0] ct[8]);
    logic [63:0] k[9], t[3], v[8], f[8];
    k[8] = 64'h1BD11BDAA9FC1A22;
    for (int i = 0; i < 8; i++) begin k[i] = key[i]; k[8] ^= key[i]; end
    t[0] = tw0; t[1] = tw1; t[2] = tw0 ^ tw1;
    v = pt;
    for (int d = 0; d < 72; d++) begin
      if (d % 4 == 0) begin
        int s;
        s = d / 4;
        for (int i = 0; i < 8; i++) v[i] += k[(s + i) % 9];
        v[5] += t[s % 3]; v[6] += t[(s + 1) % 3]; v[7] += 64'(s);
      end
      for (int j = 0; j < 4; j++) begin
        v[2*j] += v[2*j+1];
        v[2*j+1] = ((v[2*j+1] << rt[d%8][j]) | (v[2*j+1] >> (64 - rt[d%8][j]))) ^ v[2*j];
      end
      for (int i = 0; i < 8; i++) f[i] = v[pm[i]];
      v = f;
    end
    for (int i = 0; i < 8; i++) v[i] += k[(18 + i) % 9];
    v[5] += t[18 % 3]; v[6] += t[19 % 3]; v[7] += 64'd18;
    ct = v;
  endfunction

  function automatic void ubi(inout logic [63:0] g[8], input logic [63:0] blkw[8],
                              input longint unsigned pos, input bit first, input bit final_, input int typ);
    logic [63:0] c[8], t1;
    t1 = {final_, first, 6'(typ), 56'd0};
    tf(g, pos, t1, blkw, c);
    for (int i = 0; i < 8; i++) g[i] = c[i] ^ blkw[i];
  endfunction

  int msg_len_bytes;

  function automatic void pad(input byte unsigned m[$], output byte unsigned p[$]);
    p = m;
    if (p.size() == 0) p.push_back(8'h00);
    while (p.size() % 64 != 0) p.push_back(8'h00);
    msg_len_bytes = m.size();
  endfunction

  function automatic logic [255:0] ref_hash(input byte unsigned p[$]);
    logic [63:0] g[8], w[8];
    logic [255:0] r;
    int nb;
    for (int i = 0; i < 8; i++) begin g[i] = 0; w[i] = 0; end
    w[0] = {32'h1, "3", "A", "H", "S"}; w[1] = 64'd256;
    ubi(g, w, 32, 1, 1, 4);
    nb = p.size() / 64;
    for (int b = 0; b < nb; b++) begin
      for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++) w[i][8*j +: 8] = p[64*b + 8*i + j];
      ubi(g, w, (b == nb - 1) ? longint'(msg_len_bytes) : 64'(b + 1) * 64, b == 0, b == nb - 1, 48);
    end
    for (int i = 0; i < 8; i++) w[i] = 0;
    ubi(g, w, 8, 1, 1, 63);
    r = '0;
    for (int k = 0; k < 32; k++) r = {r[247:0], g[k/8][8*(k%8) +: 8]};
    return r;
  endfunction

  // Published Skein-512-256 vector: the empty message.
  localparam int NKAT = 1;
  logic [255:0] kat_dig [NKAT] = '{
    256'h39ccc4554a8b31853b9de7a1fe638a24cce6b35a55f2431009e18780335d2621};
  task automatic get_kat(input int k, output byte unsigned m[$]);
    m.delete();
  endtask

  localparam int BLK_BYTES = 64;
  localparam int LOAD_CYC  = 32;
  localparam int P_CYC     = 450;
  localparam int END_CYC   = 464;

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
