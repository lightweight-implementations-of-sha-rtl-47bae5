// tb_sha3_lightweight_top: end-to-end testbench of the whole design at its
// default (and only) configuration. All six cores hash the same four
// messages at the same time through their own FIFO ports: the empty message,
// "abc", 72 zero bytes, 184 random bytes (whose BLAKE and SHA-256 padding
// fills a block of its own) and a long message of 1088 random bytes (17 or 18
// blocks of 512 bits, 9 Keccak blocks), each padded the way its algorithm
// requires. The long message gives each core's long-message rate, printed
// in message bits per clock. The first pass runs unstalled with one segment
// and checks every published vector known for these messages plus each
// core's cycle count
// st + (l + p) * N + end; the second pass repeats the messages split into three
// segments with random stalls on every FIFO and checks that the digests do
// not change. It counts how often each mechanism of the design occurred (input
// stall, output stall, multi-segment message, multi-block message, a BLAKE
// block with counter 0, a finalisation stage) and fails if one never did.
// A 200000-cycle watchdog counts a failure and ends a hung run.
module tb_sha3_lightweight_top;
  import sha_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic [NUM_CORES-1:0][IO_W-1:0] din;
  logic [NUM_CORES-1:0]           src_ready;
  logic [NUM_CORES-1:0]           src_read;
  logic [NUM_CORES-1:0][IO_W-1:0] dout;
  logic [NUM_CORES-1:0]           dst_ready;
  logic [NUM_CORES-1:0]           dst_write;

  sha3_lightweight_top dut (.*);

  int checks = 0, failures = 0, cycle = 0, stall_pct = 0;
  int input_stalls = 0, output_stalls = 0, multi_seg = 0, multi_blk = 0, blake_zero_ctr = 0, finals = 0;
  logic [15:0] inq  [NUM_CORES][$];
  logic [15:0] outq [NUM_CORES][$];
  int first_rd [NUM_CORES];
  int last_wr  [NUM_CORES];

  // per-core block size (bytes), load, processing and end cycles
  int blk_bytes [NUM_CORES] = '{64, 64, 64, 136, 64, 64};
  int load_cyc  [NUM_CORES] = '{32, 32, 32, 68, 32, 32};
  int p_cyc     [NUM_CORES] = '{250, 324, 676, 1827, 450, 67};
  int end_cyc   [NUM_CORES] = '{16, 177, 16, 16, 464, 16};
  string names  [NUM_CORES] = '{"BLAKE-256", "Groestl-256", "JH-256", "Keccak-256", "Skein-512-256", "SHA-256"};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(negedge clk) begin
    for (int c = 0; c < NUM_CORES; c++) begin
      bit si, so;
      si = ($urandom_range(99) < stall_pct);
      so = ($urandom_range(99) < stall_pct);
      src_ready[c] <= (inq[c].size() == 0) || si;
      din[c]       <= (inq[c].size() != 0) ? inq[c][0] : 16'h0;
      dst_ready[c] <= so;
      if (si && inq[c].size() != 0) input_stalls++;
      if (so) output_stalls++;
    end
  end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    for (int c = 0; c < NUM_CORES; c++) begin
      if (src_read[c]) begin
        if (src_ready[c]) begin failures++; $display("FAIL: %s read an empty FIFO", names[c]); end
        else begin void'(inq[c].pop_front()); if (first_rd[c] < 0) first_rd[c] = cycle; end
      end
      if (dst_write[c]) begin
        if (dst_ready[c]) begin failures++; $display("FAIL: %s wrote a full FIFO", names[c]); end
        outq[c].push_back(dout[c]);
        last_wr[c] = cycle;
      end
    end
  end

  // padding of each algorithm (the host's job)
  function automatic void pad(input int c, input byte unsigned m[$], output byte unsigned p[$]);
    longint unsigned bits, nb;
    bits = 64'(m.size()) * 8;
    p = m;
    unique case (c)
      0, 5: begin  // BLAKE-256, SHA-256
        p.push_back(8'h80);
        while (p.size() % 64 != 56) p.push_back(8'h00);
        if (c == 0) p[p.size()-1] = p[p.size()-1] | 8'h01;
        for (int i = 7; i >= 0; i--) p.push_back(8'(bits >> (8*i)));
      end
      1: begin     // Groestl-256
        p.push_back(8'h80);
        while (p.size() % 64 != 56) p.push_back(8'h00);
        nb = 64'(p.size() + 8) / 64;
        for (int i = 7; i >= 0; i--) p.push_back(8'(nb >> (8*i)));
      end
      2: begin     // JH-256
        p.push_back(8'h80);
        while (p.size() != ((m.size() + 63) / 64) * 64 + 48) p.push_back(8'h00);
        for (int i = 0; i < 8; i++) p.push_back(8'h00);
        for (int i = 7; i >= 0; i--) p.push_back(8'(bits >> (8*i)));
      end
      3: begin     // Keccak-256
        p.push_back(8'h01);
        while (p.size() % 136 != 0) p.push_back(8'h00);
        p[p.size()-1] = p[p.size()-1] | 8'h80;
      end
      default: begin  // Skein-512-256
        if (p.size() == 0) p.push_back(8'h00);
        while (p.size() % 64 != 0) p.push_back(8'h00);
      end
    endcase
  endfunction

  task automatic hash_on(input int c, input byte unsigned m[$], input int nseg, output logic [255:0] dg, output int cyc);
    byte unsigned p[$];
    int cut[$], start, nb;
    pad(c, m, p);
    nb = p.size() / blk_bytes[c];
    if (nb > 1) multi_blk++;
    if (c == 0 && nb > 1 && 64'(m.size()) * 8 <= 64'(nb - 1) * 512) blake_zero_ctr++;
    if (c == 1 || c == 4) finals++;
    cut.delete();
    for (int s = 1; s < nseg; s++) cut.push_back($urandom_range(m.size() / 4));
    cut.sort();
    cut.push_back(p.size() / 4);
    start = 0;
    for (int s = 0; s < cut.size(); s++) begin
      bit last = (s == cut.size() - 1);
      inq[c].push_back({15'(cut[s] - start), last});
      if (last) inq[c].push_back(16'(m.size() * 8 - start * 32));
      for (int i = start * 4; i < cut[s] * 4; i += 2) inq[c].push_back({p[i], p[i+1]});
      start = cut[s];
    end
    if (nseg > 1 && cut.size() > 1) multi_seg++;
    first_rd[c] = -1;
    while (outq[c].size() < 16) @(posedge clk);
    dg = '0;
    for (int i = 0; i < 16; i++) dg = {dg[239:0], outq[c].pop_front()};
    cyc = last_wr[c] - first_rd[c] + 1;
    if (nseg == 1 && stall_pct == 0)
      check(cyc == 2 + (load_cyc[c] + p_cyc[c]) * nb + end_cyc[c],
            $sformatf("%s: %0d cycles for %0d blocks", names[c], cyc, nb));
    @(posedge clk);
  endtask

  localparam int NMSG = 5;
  byte unsigned msgs [NMSG][$];
  logic [255:0] dig1 [NUM_CORES][NMSG];
  int           cyc1 [NUM_CORES][NMSG];

  // published vectors: (core, message) -> digest
  task automatic kat(input int c, input int k, input logic [255:0] d);
    check(dig1[c][k] == d, $sformatf("%s message %0d: got %h expected %h", names[c], k, dig1[c][k], d));
  endtask

  initial begin
    for (int c = 0; c < NUM_CORES; c++) begin first_rd[c] = -1; last_wr[c] = 0; end
    msgs[0] = {};
    msgs[1] = {8'h61, 8'h62, 8'h63};
    for (int i = 0; i < 72; i++) msgs[2].push_back(8'h00);
    for (int i = 0; i < 184; i++) msgs[3].push_back(8'($urandom));
    for (int i = 0; i < 1088; i++) msgs[4].push_back(8'($urandom));
    repeat (3) @(posedge clk);
    rst = 1'b0;

    // pass 1: unstalled, one segment, all cores in parallel
    for (int k = 0; k < NMSG; k++) begin
      for (int c = 0; c < NUM_CORES; c++) begin
        fork
          automatic int cc = c;
          automatic int kk = k;
          hash_on(cc, msgs[kk], 1, dig1[cc][kk], cyc1[cc][kk]);
        join_none
      end
      wait fork;
    end
    kat(0, 0, 256'h716f6e863f744b9ac22c97ec7b76ea5f5908bc5b2f67c61510bfc4751384ea7a);
    kat(0, 2, 256'hd419bad32d504fb7d44d460c42c5593fe544fa4c135dec31e21bd9abdcc22d41);
    kat(1, 0, 256'h1a52d11d550039be16107f9c58db9ebcc417f16f736adb2502567119f0083467);
    kat(2, 0, 256'h46e64619c18bb0a92a5e87185a47eef83ca747b8fcc8e1412921357e326df434);
    kat(3, 0, 256'hc5d2460186f7233c927e7db2dcc703c0e500b653ca82273b7bfad8045d85a470);
    kat(3, 1, 256'h4e03657aea45a94fc7d47ba826c8d667c0d1e6e33a64a036ec44f58fa12d6c45);
    kat(4, 0, 256'h39ccc4554a8b31853b9de7a1fe638a24cce6b35a55f2431009e18780335d2621);
    kat(5, 0, 256'he3b0c44298fc1c149afbf4c8996fb92427ae41e4649b934ca495991b7852b855);
    kat(5, 1, 256'hba7816bf8f01cfea414140de5dae2223b00361a396177a9cb410ff61f20015ad);
    for (int c = 0; c < NUM_CORES; c++)
      $display("%s long message: %0d bits in %0d cycles, %0.3f bits per clock",
               names[c], msgs[4].size() * 8, cyc1[c][4], real'(msgs[4].size() * 8) / real'(cyc1[c][4]));

    // pass 2: three segments, random stalls on every FIFO
    stall_pct = 30;
    for (int k = 1; k < NMSG; k++) begin
      for (int c = 0; c < NUM_CORES; c++) begin
        fork
          automatic int cc = c;
          automatic int kk = k;
          begin
            int cyc;
            logic [255:0] d;
            hash_on(cc, msgs[kk], 3, d, cyc);
            check(d == dig1[cc][kk], $sformatf("%s message %0d changed under stalls/segments", names[cc], kk));
          end
        join_none
      end
      wait fork;
    end

    $display("mechanisms: input stalls %0d, output stalls %0d, multi-segment %0d, multi-block %0d, BLAKE counter-0 blocks %0d, finalisation stages %0d",
             input_stalls, output_stalls, multi_seg, multi_blk, blake_zero_ctr, finals);
    check(input_stalls > 0, "input stall occurred");
    check(output_stalls > 0, "output stall occurred");
    check(multi_seg > 0, "multi-segment message occurred");
    check(multi_blk > 0, "multi-block message occurred");
    check(blake_zero_ctr > 0, "BLAKE counter-0 final block occurred");
    check(finals > 0, "finalisation stage occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
