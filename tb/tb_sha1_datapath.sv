// tb_sha1_datapath: random control-word test of the datapath.
//
// Every cycle applies a random, legal control word to the datapath and
// predicts its behaviour from a model of the storage kept here: the
// temporary register T, the 16 message words and the 11 state words, plus
// the constant ROM. The model computes the ALU operand B (message word or
// bank word), the rotation, the function and the write data (pin input when
// in_mode, ALU result otherwise); the test checks io_out and io_oe before
// the edge and updates the model after it. After 20 warm-up cycles that
// load all storage from the pins, 5000 random cycles follow.
module tb_sha1_datapath;
  import sha1_pkg::*;

  logic     clk = 1'b0;
  dp_ctrl_t ctrl;
  word_t    io_in, io_out;
  logic     io_oe;
  word_t    mt, mw [16], mr [11];
  int checks = 0, failures = 0;

  const word_t ROM [10] = '{32'h67452301, 32'hEFCDAB89, 32'h98BADCFE, 32'h10325476,
                            32'hC3D2E1F0, 32'h5A827999, 32'h6ED9EBA1, 32'h8F1BBCDC,
                            32'hCA62C1D6, 32'h00000000};

  sha1_datapath dut (.clk, .ctrl, .io_in, .io_out, .io_oe);

  always #5 clk = ~clk;

  function automatic word_t rl(word_t x, int n);
    return (n == 0) ? x : ((x << n) | (x >> (32 - n)));
  endfunction

  function automatic word_t model_y(dp_ctrl_t c);
    word_t a = mt, b;
    b = (c.srcb == SRCB_WMEM) ? mw[c.waddr]
      : (c.raddr[4] ? ROM[c.raddr[3:0]] : mr[c.raddr[3:0]]);
    case (c.shift)
      SH_FIVE_B:   b = rl(b, 5);
      SH_THIRTY_B: b = rl(b, 30);
      SH_ONE_A:    a = rl(a, 1);
      default: ;
    endcase
    case (c.op)
      OP_PASS: return b;
      OP_XOR:  return a ^ b;
      OP_ADD:  return a + b;
      default: return a & b;
    endcase
  endfunction

  task automatic step(dp_ctrl_t c, word_t pin);
    word_t y, wd;
    ctrl  = c;
    io_in = pin;
    #1;
    y  = model_y(c);
    wd = c.in_mode ? pin : y;
    checks++;
    if (io_oe !== !c.in_mode || (!c.in_mode && io_out !== y)) begin
      failures++;
      if (failures < 10)
        $display("FAIL: ctrl=%p io_out=%08h io_oe=%0b expected %08h", c, io_out, io_oe, y);
    end
    @(negedge clk);
    if (c.temp_we) mt = wd;
    if (c.wen) mw[c.waddr] = wd;
    if (c.rwe) mr[c.rwaddr] = wd;
  endtask

  function automatic dp_ctrl_t rand_ctrl();
    dp_ctrl_t c;
    c.waddr   = 4'($urandom);
    c.wen     = ($urandom % 4) == 0;
    c.raddr   = ($urandom % 2 == 1) ? reg_raddr_e'(5'(16 + $urandom % 10))
                               : reg_raddr_e'(5'($urandom % 11));
    c.rwaddr  = reg_waddr_e'(4'($urandom % 11));
    c.rwe     = ($urandom % 4) == 0;
    c.temp_we = ($urandom % 2) == 0;
    c.srcb    = srcb_e'($urandom % 2);
    c.shift   = alu_shift_e'($urandom % 4);
    c.op      = alu_op_e'($urandom % 4);
    c.in_mode = ($urandom % 5) == 0;
    return c;
  endfunction

  initial begin
    repeat (20_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dp_ctrl_t c;
    @(negedge clk);
    // load every storage word from the pins
    for (int i = 0; i < 16; i++) begin
      c = '0; c.in_mode = 1'b1; c.wen = 1'b1; c.waddr = 4'(i);
      c.rwe = (i < 11); c.rwaddr = reg_waddr_e'(4'(i)); c.temp_we = 1'b1;
      step(c, $urandom);
    end
    for (int i = 0; i < 5000; i++) step(rand_ctrl(), $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
