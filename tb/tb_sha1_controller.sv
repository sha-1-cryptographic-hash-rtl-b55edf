// tb_sha1_controller: tests the controller's sequencing by letting it run
// SHA-1 on a behavioural datapath.
//
// The controller is instantiated alone. Its counter bank and its datapath are
// modelled here from their definitions: three counters with clear-over-
// increment, and storage (T, 16 message words, 11 state words, the constant
// ROM) updated from each cycle's control word. If every control word is
// right, the digest the model holds matches a reference SHA-1; any wrong
// address, rotation, function or sequencing step changes it. Also checked:
// 5 cycles from reset to Ready, 16 input cycles, 1539 busy cycles per block,
// 5 digest-output cycles, Hash priority over Block, and the number of
// message-memory writes per block (16 loads + 80 schedule words).
module tb_sha1_controller;
  import sha1_pkg::*;

  logic       clk = 1'b0, rst, block, hash, ready;
  dp_ctrl_t   ctrl;
  logic       a_clr, a_inc, b_clr, b_inc, c_clr, c_inc;
  logic [4:0] cnt_a;
  logic [1:0] cnt_b;
  logic [3:0] cnt_c;
  logic [5:0] state;
  word_t      pin_in;
  word_t      mt, mw [16], mr [11];
  int checks = 0, failures = 0, n_wen = 0;

  const word_t ROM [10] = '{32'h67452301, 32'hEFCDAB89, 32'h98BADCFE, 32'h10325476,
                            32'hC3D2E1F0, 32'h5A827999, 32'h6ED9EBA1, 32'h8F1BBCDC,
                            32'hCA62C1D6, 32'h00000000};

  sha1_controller dut (
    .clk, .rst, .block, .hash, .ready, .ctrl,
    .cnt_a_clr(a_clr), .cnt_a_inc(a_inc), .cnt_a,
    .cnt_b_clr(b_clr), .cnt_b_inc(b_inc), .cnt_b,
    .cnt_c_clr(c_clr), .cnt_c_inc(c_inc), .cnt_c,
    .state
  );

  always #5 clk = ~clk;

  function automatic word_t rl(word_t x, int n);
    return (n == 0) ? x : ((x << n) | (x >> (32 - n)));
  endfunction

  // behavioural datapath: ALU result for the current control word
  function automatic word_t alu_y();
    word_t a = mt, b;
    b = (ctrl.srcb == SRCB_WMEM) ? mw[ctrl.waddr]
      : (ctrl.raddr[4] ? ROM[ctrl.raddr[3:0]] : mr[ctrl.raddr[3:0]]);
    case (ctrl.shift)
      SH_FIVE_B:   b = rl(b, 5);
      SH_THIRTY_B: b = rl(b, 30);
      SH_ONE_A:    a = rl(a, 1);
      default: ;
    endcase
    case (ctrl.op)
      OP_PASS: return b;
      OP_XOR:  return a ^ b;
      OP_ADD:  return a + b;
      default: return a & b;
    endcase
  endfunction

  // behavioural counter bank and storage, updated at each rising edge
  always @(posedge clk) begin
    word_t wd;
    wd = ctrl.in_mode ? pin_in : alu_y();
    if (ctrl.temp_we) mt <= wd;
    if (ctrl.wen) begin mw[ctrl.waddr] <= wd; n_wen <= n_wen + 1; end
    if (ctrl.rwe && 32'(ctrl.rwaddr) < 11) mr[ctrl.rwaddr] <= wd;
    cnt_a <= a_clr ? '0 : cnt_a + 5'(a_inc);
    cnt_b <= b_clr ? '0 : cnt_b + 2'(b_inc);
    cnt_c <= c_clr ? '0 : cnt_c + 4'(c_inc);
  end

  typedef word_t blk_t [16];
  typedef word_t dig_t [5];

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
    for (int i = 0; i < 5; i++) r[i] = h[i] + ((i == 0) ? a : (i == 1) ? b : (i == 2) ? c
                                               : (i == 3) ? d : e);
    return r;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (50_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    blk_t m;
    dig_t h, got;
    int   n, wen0;
    rst = 1'b1; block = 1'b0; hash = 1'b0; pin_in = '0;
    @(negedge clk); @(negedge clk);
    rst = 1'b0;
    n = 0;
    while (!ready) begin @(negedge clk); n++; end
    check(n == 5, $sformatf("reset to ready %0d cycles", n));
    h = '{ROM[0], ROM[1], ROM[2], ROM[3], ROM[4]};
    for (int blk = 0; blk < 3; blk++) begin
      foreach (m[i]) m[i] = $urandom;
      wen0 = n_wen;
      block = 1'b1;
      @(negedge clk);
      block = 1'b0;
      for (int i = 0; i < 16; i++) begin
        check(ready && state == ST_READ_BLOCK, "input cycle");
        pin_in = m[i];
        @(negedge clk);
      end
      n = 0;
      while (!ready && n < 3000) begin @(negedge clk); n++; end
      check(n == 1539, $sformatf("busy %0d cycles, expected 1539", n));
      check(n_wen - wen0 == 96, $sformatf("%0d message writes, expected 96", n_wen - wen0));
      h = ref_compress(h, m);
      // digest output; in block 1 Block is raised too and must lose
      hash  = 1'b1;
      block = (blk == 1);
      @(negedge clk);
      hash = 1'b0; block = 1'b0;
      for (int i = 0; i < 5; i++) begin
        check(!ready && state == 6'(ST_HASH0 + i), "output cycle");
        got[i] = alu_y();
        @(negedge clk);
      end
      for (int i = 0; i < 5; i++)
        check(got[i] == h[i], $sformatf("block %0d digest word %0d %08h expected %08h",
                                        blk, i, got[i], h[i]));
      check(ready && state == ST_READY, "ready after digest");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
