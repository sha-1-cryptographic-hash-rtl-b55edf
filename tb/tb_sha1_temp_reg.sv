// tb_sha1_temp_reg: random load/hold test of the temporary register.
// Each cycle drives a random enable and data word and checks, after the
// edge, that the register loaded the word when enabled and held otherwise.
module tb_sha1_temp_reg;
  logic        clk = 1'b0, en;
  logic [31:0] d, q, exp_q;
  int checks = 0, failures = 0;

  sha1_temp_reg dut (.clk, .en, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (10_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    en = 1'b1; d = 32'h1234_5678;
    @(negedge clk);
    exp_q = 32'h1234_5678;
    for (int i = 0; i < 1000; i++) begin
      en = ($urandom % 3) == 0;
      d  = $urandom;
      @(negedge clk);
      if (en) exp_q = d;
      checks++;
      if (q !== exp_q) begin
        failures++;
        $display("FAIL: cycle %0d q=%08h expected %08h", i, q, exp_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
