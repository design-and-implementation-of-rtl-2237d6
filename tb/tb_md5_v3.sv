// tb_md5_v3: end-to-end test of the MD5 core at its default configuration.
//
// Hashes the RFC 1321 test strings and a set of random messages of 0 to 300
// bytes, padded in software. Every block's chaining value at done_o is
// compared with the reference model, and the final digests of the test
// strings with their published values. The driver inserts random idle gaps,
// starts blocks back to back in the cycle of done_o, and raises start_i with
// junk data while the core is busy, which must be ignored. Checked timing:
// done_o exactly 16 cycles after each accepted start, and a 12-block message
// sent back to back taking 12 x 16 cycles. Counted mechanisms, each of which
// must occur: first block of a message (initial value), chained block,
// back-to-back start, start after an idle gap, ignored start while busy, and
// use of each of the four round blocks (four cycles per block each).
module tb_md5_v3;
  import md5_pkg::*;
  import md5_ref_pkg::*;

  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, start = 0, init = 0;
  md5_block_t blk;
  logic ready, done;
  md5_state_t digest;

  md5_v3 u_dut (
    .clk(clk), .rst_n(rst_n), .start_i(start), .init_i(init), .block_i(blk),
    .ready_o(ready), .done_o(done), .digest_o(digest));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    rblock_t blk;
    bit      init;
    rstate_t expect_h;
    bit      last;
    string   known;      // published digest of the message, or ""
    bit      timed;      // part of the back-to-back throughput run
  } job_t;

  job_t jobs [$];

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  task automatic add_message(byte unsigned m [$], string known, bit timed);
    rblock_t blocks [$];
    rstate_t h;
    job_t j;
    ref_pad(m, blocks);
    h = ref_iv();
    foreach (blocks[n]) begin
      h = ref_compress(h, blocks[n]);
      j.blk = blocks[n];
      j.init = (n == 0);
      j.expect_h = h;
      j.last = (n == blocks.size() - 1);
      j.known = j.last ? known : "";
      j.timed = timed;
      jobs.push_back(j);
    end
    if (known != "") check(ref_hex(h) == known, $sformatf("reference model gives %s, published %s", ref_hex(h), known));
  endtask

  function automatic md5_block_t to_blk(rblock_t b);
    md5_block_t r;
    for (int k = 0; k < 16; k++) r[k] = b[k];
    return r;
  endfunction

  initial begin
    byte unsigned m [$];
    job_t cur;
    bit   outstanding = 0;
    int   t = 0, start_t = 0, gap = 0;
    int   n_init = 0, n_chain = 0, n_b2b = 0, n_gap = 0, n_ignored = 0;
    int   rf_used [4] = '{0, 0, 0, 0};
    int   timed_first = -1, timed_last = -1, timed_blocks = 0;
    string digests_ok;

    str_bytes("", m);               add_message(m, "d41d8cd98f00b204e9800998ecf8427e", 0);
    str_bytes("a", m);              add_message(m, "0cc175b9c0f1b6a831c399e269772661", 0);
    str_bytes("abc", m);            add_message(m, "900150983cd24fb0d6963f7d28e17f72", 0);
    str_bytes("message digest", m); add_message(m, "f96b697d7cb7938d525a2f31aaf161d0", 0);
    str_bytes("abcdefghijklmnopqrstuvwxyz", m);
    add_message(m, "c3fcd3d76192e4007dfb496cca67e13b", 0);
    str_bytes("The quick brown fox jumps over the lazy dog", m);
    add_message(m, "9e107d9d372bb6826bd81d3542a419d6", 0);
    str_bytes("12345678901234567890123456789012345678901234567890123456789012345678901234567890", m);
    add_message(m, "57edf4a22be3c955ac49da2e2107b67a", 0);
    for (int n = 0; n < 40; n++) begin
      int len;
      len = (n < 10) ? 50 + n : $urandom % 301;   // 50..59 cover the padding boundary
      m = {};
      for (int i = 0; i < len; i++) m.push_back(8'($urandom));
      add_message(m, "", 0);
    end
    // 700 bytes pad to 12 blocks, sent back to back to measure the rate
    m = {};
    for (int i = 0; i < 700; i++) m.push_back(8'($urandom));
    add_message(m, "", 1);

    repeat (3) @(posedge clk);
    rst_n <= 1;

    while (jobs.size() > 0 || outstanding) begin
      @(negedge clk);
      t++;
      // --- results ---
      if (done) begin
        check(outstanding, "done without a block in flight");
        check(t - start_t == CYCLES_PER_BLOCK, $sformatf("latency %0d cycles, expected 16", t - start_t));
        check(digest == {cur.expect_h[0], cur.expect_h[1], cur.expect_h[2], cur.expect_h[3]},
              $sformatf("chaining value %h expected %s", digest, ref_hex(cur.expect_h)));
        if (cur.known != "") begin
          digests_ok = ref_hex('{digest.a, digest.b, digest.c, digest.d});
          check(digests_ok == cur.known, $sformatf("digest %s expected %s", digests_ok, cur.known));
        end
        if (cur.timed) begin
          timed_last = t;
          timed_blocks++;
        end
        outstanding = 0;
      end else if (outstanding && t - start_t > CYCLES_PER_BLOCK) begin
        check(0, "done_o missing");
        outstanding = 0;
      end
      // --- stimulus ---
      start = 0;
      if (!outstanding && jobs.size() > 0) begin
        check(ready, "core not ready after done");
        if (gap > 0 && !jobs[0].timed) begin
          gap--;
        end else begin
          cur = jobs.pop_front();
          start = 1;
          init = cur.init;
          blk = to_blk(cur.blk);
          start_t = t;
          outstanding = 1;
          if (cur.init) n_init++; else n_chain++;
          if (done) n_b2b++; else n_gap++;
          if (cur.timed && timed_first < 0) timed_first = t;
          gap = ($urandom % 2) ? 0 : $urandom % 4;
        end
      end else if (outstanding && ($urandom % 4) == 0) begin
        // junk request while busy: must be ignored
        check(!ready, "ready while a block is in flight");
        start = 1;
        init = $urandom % 2;
        for (int k = 0; k < 16; k++) blk[k] = $urandom;
        n_ignored++;
      end
      #1;
      if (u_dut.active) rf_used[u_dut.cycle[3:2]]++;
    end

    check(timed_last - timed_first == timed_blocks * CYCLES_PER_BLOCK,
          $sformatf("%0d back-to-back blocks took %0d cycles", timed_blocks, timed_last - timed_first));
    $display("blocks: first %0d chained %0d; starts: back-to-back %0d after gap %0d; ignored %0d",
             n_init, n_chain, n_b2b, n_gap, n_ignored);
    $display("round block cycles: RF1 %0d RF2 %0d RF3 %0d RF4 %0d", rf_used[0], rf_used[1], rf_used[2], rf_used[3]);
    $display("back-to-back run: %0d blocks in %0d cycles", timed_blocks, timed_last - timed_first);
    check(n_init > 0, "no first block");
    check(n_chain > 0, "no chained block");
    check(n_b2b > 0, "no back-to-back start");
    check(n_gap > 0, "no start after an idle gap");
    check(n_ignored > 0, "no ignored start");
    for (int r = 0; r < 4; r++)
      check(rf_used[r] == 4 * (n_init + n_chain), $sformatf("RF%0d used %0d cycles", r + 1, rf_used[r]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
