// tb_sha1_core: end-to-end test of the SHA-1 unit through its pins.
//
// Drives the unit exactly as a host would: reset, load 16-word blocks
// through the shared data bus, request the digest, read five words. Every
// digest is compared with a behavioural SHA-1 compression function written
// here from the SHA-1 definition (FIPS 180), independent of the RTL.
// Cases:
//   * digest request right after reset returns the SHA-1 initial values
//   * the single-block test vector 8A921FC4 452C45D2 ... -> FC258E41 ...
//   * the padded message "abc" -> A9993E36 4706816A BA3E2571 7850C26C 9CD0D89D
//   * the padded empty message -> DA39A3EE 5E6B4B0D 3255BFEF 95601890 AFD80709
//   * random multi-block messages (chaining of H across blocks)
//   * Block and Hash requested together: Hash wins
//   * reset in the middle of a block, then a fresh correct hash
// Timing checks: 5 cycles from reset release to Ready, 16 Ready cycles of
// block input, 1539 busy cycles per block, 5 output cycles per digest.
// Mechanism coverage (counted from the controller state): each of the four
// round classes, the T2 scratch write of the Maj class, message-schedule
// write-backs, round-class changes, hash output, Hash priority, multi-block
// chaining and a mid-block reset must each occur at least once.
// Runs the unit at its only configuration (no parameters).
module tb_sha1_core;
  import sha1_pkg::*;

  // Cycles with Ready low after the 16th word: block init (5), then per round
  // 1 dispatch + f steps (5/4/7/4) + 8 update + 5 schedule, 20 rounds per
  // class; 4 class changes; 10 cycles of final addition.
  localparam int unsigned BUSY_CYCLES = 5 + 20 * ((1 + 5 + 13) + (1 + 4 + 13) + (1 + 7 + 13)
                                                  + (1 + 4 + 13)) + 4 + 10;

  logic       clk = 1'b0;
  logic       rst, block, hash_req, ready, io_oe;
  word_t      io_in, io_out;
  logic [5:0] state;

  int checks = 0, failures = 0;

  sha1_core dut (
    .clk, .rst, .block, .hash_req, .ready, .io_in, .io_out, .io_oe, .state
  );

  always #5 clk = ~clk;

  // ------------------------------------------------ reference SHA-1
  typedef word_t blk_t [16];
  typedef word_t dig_t [5];

  function automatic word_t rl(word_t x, int n);
    return (x << n) | (x >> (32 - n));
  endfunction

  function automatic dig_t ref_compress(dig_t h, blk_t m);
    word_t w [80];
    word_t a, b, c, d, e, f, k, t;
    dig_t  r;
    for (int i = 0; i < 16; i++) w[i] = m[i];
    for (int i = 16; i < 80; i++) w[i] = rl(w[i-3] ^ w[i-8] ^ w[i-14] ^ w[i-16], 1);
    a = h[0]; b = h[1]; c = h[2]; d = h[3]; e = h[4];
    for (int i = 0; i < 80; i++) begin
      if (i < 20)      begin f = (b & c) | (~b & d);          k = 32'h5A827999; end
      else if (i < 40) begin f = b ^ c ^ d;                   k = 32'h6ED9EBA1; end
      else if (i < 60) begin f = (b & c) | (b & d) | (c & d); k = 32'h8F1BBCDC; end
      else             begin f = b ^ c ^ d;                   k = 32'hCA62C1D6; end
      t = rl(a, 5) + f + e + k + w[i];
      e = d; d = c; c = rl(b, 30); b = a; a = t;
    end
    r[0] = h[0] + a; r[1] = h[1] + b; r[2] = h[2] + c; r[3] = h[3] + d; r[4] = h[4] + e;
    return r;
  endfunction

  const dig_t H_INIT = '{32'h67452301, 32'hEFCDAB89, 32'h98BADCFE, 32'h10325476, 32'hC3D2E1F0};

  // ------------------------------------------------ checking helpers
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic check_digest(dig_t got, dig_t exp, string what);
    for (int i = 0; i < 5; i++)
      check(got[i] == exp[i], $sformatf("%s word %0d: got %08h expected %08h",
                                         what, i, got[i], exp[i]));
  endtask

  // ------------------------------------------------ pin-level host tasks
  task automatic do_reset();
    int n;
    @(negedge clk);
    rst = 1'b1; block = 1'b0; hash_req = 1'b0; io_in = '0;
    @(negedge clk);
    @(negedge clk);
    rst = 1'b0;
    n = 0;
    while (!ready) begin
      @(negedge clk);
      n++;
    end
    check(n == 5, $sformatf("reset to ready took %0d cycles, expected 5", n));
  endtask

  task automatic send_block(blk_t m);
    int n;
    check(ready == 1'b1 && state == ST_READY, "unit idle before block");
    block = 1'b1;
    @(negedge clk);
    block = 1'b0;
    for (int i = 0; i < 16; i++) begin
      check(ready == 1'b1 && io_oe == 1'b0, $sformatf("ready/input mode for word %0d", i));
      io_in = m[i];
      @(negedge clk);
    end
    io_in = $urandom;   // the bus is not sampled any more
    n = 0;
    while (!ready && n < 5000) begin
      @(negedge clk);
      n++;
    end
    check(n == BUSY_CYCLES, $sformatf("block busy for %0d cycles, expected %0d", n, BUSY_CYCLES));
  endtask

  task automatic read_digest(output dig_t d, input bit with_block = 1'b0);
    check(ready == 1'b1 && state == ST_READY, "unit idle before hash request");
    hash_req = 1'b1;
    block    = with_block;
    @(negedge clk);
    hash_req = 1'b0;
    block    = 1'b0;
    for (int i = 0; i < 5; i++) begin
      check(ready == 1'b0 && io_oe == 1'b1, $sformatf("output mode for digest word %0d", i));
      d[i] = io_out;
      @(negedge clk);
    end
    check(ready == 1'b1, "ready again after digest output");
  endtask

  // ------------------------------------------------ mechanism coverage
  int n_class [4] = '{0, 0, 0, 0};
  int n_t2 = 0, n_ext = 0, n_next_class = 0, n_hash_out = 0;
  int n_priority = 0, n_chained = 0, n_mid_reset = 0, n_blocks = 0;

  always @(posedge clk) if (!rst) begin
    case (state)
      ST_ROUND_A:    n_class[0]++;
      ST_ROUND_B:    n_class[1]++;
      ST_ROUND_C:    n_class[2]++;
      ST_ROUND_D:    n_class[3]++;
      6'd23:         n_t2++;
      ST_MSG_EXT_WR: n_ext++;
      ST_NEXT_CLASS: n_next_class++;
      ST_HASH0:      n_hash_out++;
      6'd7:          n_blocks++;
      default: ;
    endcase
  end

  // ------------------------------------------------ watchdog
  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------ stimulus
  initial begin
    blk_t m;
    dig_t got, exp, h;
    int   blocks_before;

    rst = 1'b1; block = 1'b0; hash_req = 1'b0; io_in = '0;
    do_reset();

    // 1. digest of no block at all is the initial value
    read_digest(got);
    check_digest(got, H_INIT, "initial value");

    // 2. single-block test vector
    m = '{32'h8A921FC4, 32'h452C45D2, 32'hABC243FE, 32'hEC429CBD,
          32'h452C45D2, 32'hEC429CBD, 32'h452C45D2, 32'hEC429CBD,
          32'h8A921FC4, 32'h452C45D2, 32'hABC243FE, 32'h452C45D2,
          32'hEC429CBD, 32'h452C45D2, 32'h8A921FC4, 32'h452C45D2};
    send_block(m);
    read_digest(got);
    exp = '{32'hFC258E41, 32'hDFE90802, 32'h64C65A1F, 32'hDCB36023, 32'h9FAEA24E};
    check_digest(got, exp, "test vector");
    check_digest(ref_compress(H_INIT, m), exp, "reference model self-check");

    // 3. "abc", padded to one block
    do_reset();
    m = '{default: '0};
    m[0]  = 32'h61626380;
    m[15] = 32'h00000018;
    send_block(m);
    read_digest(got);
    exp = '{32'hA9993E36, 32'h4706816A, 32'hBA3E2571, 32'h7850C26C, 32'h9CD0D89D};
    check_digest(got, exp, "abc");

    // 4. empty message, padded; Block and Hash raised together first
    do_reset();
    read_digest(got, 1'b1);
    check_digest(got, H_INIT, "hash has priority over block");
    if (got == H_INIT && state == ST_READY) n_priority++;
    m = '{default: '0};
    m[0] = 32'h80000000;
    send_block(m);
    read_digest(got);
    exp = '{32'hDA39A3EE, 32'h5E6B4B0D, 32'h3255BFEF, 32'h95601890, 32'hAFD80709};
    check_digest(got, exp, "empty message");

    // 5. random multi-block messages, digest read between blocks too
    for (int msg = 0; msg < 2; msg++) begin
      do_reset();
      h = H_INIT;
      for (int blk = 0; blk < 3; blk++) begin
        foreach (m[i]) m[i] = $urandom;
        send_block(m);
        h = ref_compress(h, m);
        if (blk > 0) n_chained++;
        read_digest(got);
        check_digest(got, h, $sformatf("random message %0d after block %0d", msg, blk));
      end
    end

    // 6. reset while a block is being hashed, then a clean hash
    do_reset();
    foreach (m[i]) m[i] = $urandom;
    block = 1'b1;
    @(negedge clk);
    block = 1'b0;
    for (int i = 0; i < 16; i++) begin io_in = m[i]; @(negedge clk); end
    repeat (700) @(negedge clk);
    check(ready == 1'b0, "busy in the middle of a block");
    blocks_before = n_blocks;
    do_reset();
    n_mid_reset++;
    foreach (m[i]) m[i] = $urandom;
    send_block(m);
    read_digest(got);
    check_digest(got, ref_compress(H_INIT, m), "hash after mid-block reset");

    // ---- coverage of the mechanisms
    for (int c = 0; c < 4; c++)
      check(n_class[c] >= 20, $sformatf("round class %0d ran %0d rounds", c, n_class[c]));
    check(n_t2 > 0,         $sformatf("Maj scratch writes: %0d", n_t2));
    check(n_ext >= 80,      $sformatf("message schedule write-backs: %0d", n_ext));
    check(n_next_class > 0, $sformatf("round-class changes: %0d", n_next_class));
    check(n_hash_out > 0,   $sformatf("digest outputs: %0d", n_hash_out));
    check(n_priority > 0,   $sformatf("hash-over-block priority: %0d", n_priority));
    check(n_chained > 0,    $sformatf("chained blocks: %0d", n_chained));
    check(n_mid_reset > 0 && n_blocks > blocks_before,
                            $sformatf("mid-block resets: %0d", n_mid_reset));
    $display("coverage: class0=%0d class1=%0d class2=%0d class3=%0d t2=%0d ext=%0d next_class=%0d",
             n_class[0], n_class[1], n_class[2], n_class[3], n_t2, n_ext, n_next_class);
    $display("coverage: hash_out=%0d priority=%0d chained=%0d mid_reset=%0d blocks=%0d",
             n_hash_out, n_priority, n_chained, n_mid_reset, n_blocks);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
