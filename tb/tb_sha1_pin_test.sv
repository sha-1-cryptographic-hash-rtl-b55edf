// tb_sha1_pin_test: the single-message production test of the SHA-1 unit.
//
// The unit has no self-test logic; it is tested by loading one message block
// and comparing the digest with a known value. Such a test also finds stuck
// data pins if the message is chosen so that every one of the 32 bus bits is
// seen both high and low while the 16 words go in, and again while the five
// digest words come out. This testbench builds such a message: word 0 is all
// ones, word 1 all zeros, and the other 14 words are drawn at random until
// the reference digest (computed here from the SHA-1 definition) drives every
// bit both ways. It then runs the unit on that message from reset, checks
// the digest, and checks from the observed pin values that every bit toggled
// in both directions of use. Controller pins are covered by the fact that the
// unit must reach Ready and return the digest at all.
module tb_sha1_pin_test;
  import sha1_pkg::*;

  logic       clk = 1'b0;
  logic       rst, block, hash_req, ready, io_oe;
  word_t      io_in, io_out;
  logic [5:0] state;
  int checks = 0, failures = 0;

  sha1_core dut (
    .clk, .rst, .block, .hash_req, .ready, .io_in, .io_out, .io_oe, .state
  );

  always #5 clk = ~clk;

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

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    blk_t  m;
    dig_t  exp, got;
    word_t or_acc, and_acc, in_hi, in_lo, out_hi, out_lo;
    int    tries, n;

    // choose the test message
    tries = 0;
    do begin
      m[0] = '1;
      m[1] = '0;
      for (int i = 2; i < 16; i++) m[i] = $urandom;
      exp = ref_compress(H_INIT, m);
      or_acc = '0; and_acc = '1;
      foreach (exp[i]) begin or_acc |= exp[i]; and_acc &= exp[i]; end
      tries++;
    end while ((or_acc != '1 || and_acc != '0) && tries < 1000);
    check(tries < 1000, "found a message whose digest toggles every pin");
    $display("test message chosen after %0d draws; expected digest %08h %08h %08h %08h %08h",
             tries, exp[0], exp[1], exp[2], exp[3], exp[4]);

    // reset
    rst = 1'b1; block = 1'b0; hash_req = 1'b0; io_in = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    n = 0;
    while (!ready && n < 100) begin @(negedge clk); n++; end
    check(ready, "unit reaches Ready after reset");

    // load the block, recording what the pins carried into the unit
    in_hi = '0; in_lo = '0;
    block = 1'b1;
    @(negedge clk);
    block = 1'b0;
    for (int i = 0; i < 16; i++) begin
      io_in = m[i];
      check(ready && !io_oe, $sformatf("bus is an input for word %0d", i));
      in_hi |= io_in; in_lo |= ~io_in;
      @(negedge clk);
    end
    n = 0;
    while (!ready && n < 5000) begin @(negedge clk); n++; end
    check(ready, "unit returns to Ready after the block");

    // read the digest, recording what the pins carried out of the unit
    out_hi = '0; out_lo = '0;
    hash_req = 1'b1;
    @(negedge clk);
    hash_req = 1'b0;
    for (int i = 0; i < 5; i++) begin
      check(!ready && io_oe, $sformatf("bus is an output for digest word %0d", i));
      got[i] = io_out;
      out_hi |= io_out; out_lo |= ~io_out;
      @(negedge clk);
    end

    for (int i = 0; i < 5; i++)
      check(got[i] == exp[i], $sformatf("digest word %0d %08h expected %08h", i, got[i], exp[i]));
    check(in_hi == '1 && in_lo == '1, $sformatf("input pins seen high %08h / low %08h", in_hi, in_lo));
    check(out_hi == '1 && out_lo == '1, $sformatf("output pins seen high %08h / low %08h", out_hi, out_lo));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
