// tb_sha_io: self-checking testbench for the shared interface controller.
// A small engine model inside the testbench answers every blk_go with
// eng_done after a fixed delay and, on the last block, returns the XOR of all
// blocks' first 256 bits and the block count as the "digest". The testbench
// sends messages of 1..4 blocks split into 1..3 segments with random stalls
// on both FIFO ports, and checks the block contents, the first/last flags,
// the block index, the length before padding, the output words and the
// number of cycles of an unstalled message (2 + (32 + p) * N + 16).
module tb_sha_io;
  localparam int ENG_CYC = 5;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic [15:0]  din = '0;
  logic         src_ready = 1'b1, src_read;
  logic [15:0]  dout;
  logic         dst_ready = 1'b1, dst_write;
  logic [511:0] blk;
  logic         blk_go, blk_first, blk_last, len_known;
  logic [63:0]  bits_before, len_bp;
  logic         eng_done = 1'b0;
  logic [255:0] hash = '0;

  sha_io #(.BLOCK_BITS(512)) dut (.*);

  int checks = 0, failures = 0, cycle = 0, stall_pct = 0;
  int first_read_cycle = -1, last_write_cycle = -1;
  int input_stalls = 0, output_stalls = 0, multi_seg = 0;
  logic [15:0]  inq[$];
  logic [15:0]  outq[$];
  logic [511:0] exp_blocks[$];
  longint       exp_len;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(negedge clk) begin
    bit si, so;
    si = ($urandom_range(99) < stall_pct);
    so = ($urandom_range(99) < stall_pct);
    src_ready <= (inq.size() == 0) || si;
    din       <= (inq.size() != 0) ? inq[0] : 16'h0;
    dst_ready <= so;
    if (si && inq.size() != 0) input_stalls++;
    if (so) output_stalls++;
  end

  // engine model
  int           eng_cnt = -1, blk_idx = 0;
  logic [255:0] acc = '0;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    eng_done <= 1'b0;
    if (src_read) begin
      if (src_ready) begin failures++; $display("FAIL: read from empty FIFO"); end
      else begin void'(inq.pop_front()); if (first_read_cycle < 0) first_read_cycle = cycle; end
    end
    if (dst_write) begin outq.push_back(dout); last_write_cycle = cycle; end
    if (blk_go) begin
      check(exp_blocks.size() > 0 && blk == exp_blocks[0], $sformatf("block %0d contents", blk_idx));
      check(blk_first == (blk_idx == 0), "first flag");
      check(blk_last == (exp_blocks.size() == 1), "last flag");
      check(bits_before == 64'(blk_idx) * 512, "block index");
      if (blk_last) check(len_known && len_bp == 64'(exp_len), $sformatf("length before padding %0d", len_bp));
      void'(exp_blocks.pop_front());
      acc = (blk_idx == 0 ? 256'd0 : acc) ^ blk[511:256];
      blk_idx++;
      eng_cnt = ENG_CYC;
    end else if (eng_cnt > 0) eng_cnt--;
    else if (eng_cnt == 0) begin
      eng_done <= 1'b1;
      hash     <= acc ^ 256'(blk_idx);
      eng_cnt = -1;
    end
  end

  task automatic run(input int nblk, input int msg_words32, input int nseg, input bit timed);
    logic [511:0] b;
    logic [255:0] exp_h, got;
    int cut[$], start;
    logic [15:0] words[$];
    exp_blocks.delete();
    words.delete();
    exp_h = '0;
    for (int i = 0; i < nblk; i++) begin
      for (int j = 0; j < 16; j++) b[511 - 32*j -: 32] = $urandom;
      exp_blocks.push_back(b);
      exp_h ^= b[511:256];
      for (int j = 0; j < 32; j++) words.push_back(b[511 - 16*j -: 16]);
    end
    exp_h ^= 256'(nblk);
    exp_len = msg_words32 * 32 - $urandom_range(31);
    cut.delete();
    for (int s = 1; s < nseg; s++) cut.push_back($urandom_range(msg_words32 - 1));
    cut.sort();
    cut.push_back(nblk * 16);
    start = 0;
    for (int s = 0; s < cut.size(); s++) begin
      bit last = (s == cut.size() - 1);
      inq.push_back({15'(cut[s] - start), last});
      if (last) inq.push_back(16'(exp_len - start * 32));
      for (int i = 2 * start; i < 2 * cut[s]; i++) inq.push_back(words[i]);
      start = cut[s];
    end
    if (nseg > 1) multi_seg++;
    blk_idx = 0;
    first_read_cycle = -1;
    while (outq.size() < 16) @(posedge clk);
    got = '0;
    for (int i = 0; i < 16; i++) got = {got[239:0], outq.pop_front()};
    check(got == exp_h, $sformatf("output words: got %h expected %h", got, exp_h));
    if (timed)
      check(last_write_cycle - first_read_cycle + 1 == 2 + (32 + ENG_CYC + 3) * nblk + 16,
            $sformatf("cycles %0d for %0d blocks", last_write_cycle - first_read_cycle + 1, nblk));
    repeat (3) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b0;
    run(1, 10, 1, 1);
    run(3, 40, 1, 1);
    for (int n = 0; n < 12; n++) begin
      int nb;
      nb = 1 + n % 4;
      stall_pct = (n % 2) ? 35 : 0;
      run(nb, (nb - 1) * 16 + 1 + $urandom_range(14), 1 + n % 3, 0);
    end
    check(input_stalls > 0 && output_stalls > 0 && multi_seg > 0, "stalls and segments exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
