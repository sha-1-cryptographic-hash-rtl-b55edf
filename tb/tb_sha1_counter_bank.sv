// tb_sha1_counter_bank: random clear/increment test of the three counters.
// Each cycle drives random clear and increment requests to counters A (5 bit),
// B (2 bit) and C (4 bit) and compares all three with a model in which clear
// wins over increment and each counter wraps at its width.
module tb_sha1_counter_bank;
  logic       clk = 1'b0;
  logic       a_clr, a_inc, b_clr, b_inc, c_clr, c_inc;
  logic [4:0] a_count, ea;
  logic [1:0] b_count, eb;
  logic [3:0] c_count, ec;
  int checks = 0, failures = 0;

  sha1_counter_bank dut (
    .clk, .a_clr, .a_inc, .a_count, .b_clr, .b_inc, .b_count, .c_clr, .c_inc, .c_count
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    {a_clr, b_clr, c_clr} = 3'b111; {a_inc, b_inc, c_inc} = 3'b111;
    @(negedge clk);
    ea = '0; eb = '0; ec = '0;
    for (int i = 0; i < 3000; i++) begin
      // mostly counting, so that every counter wraps
      a_clr = ($urandom % 40) == 0; a_inc = ($urandom % 4) != 0;
      b_clr = ($urandom % 40) == 0; b_inc = ($urandom % 4) != 0;
      c_clr = ($urandom % 40) == 0; c_inc = ($urandom % 4) != 0;
      @(negedge clk);
      ea = a_clr ? '0 : ea + 5'(a_inc);
      eb = b_clr ? '0 : eb + 2'(b_inc);
      ec = c_clr ? '0 : ec + 4'(c_inc);
      checks++;
      if (a_count !== ea || b_count !== eb || c_count !== ec) begin
        failures++;
        $display("FAIL: cycle %0d got %0d/%0d/%0d expected %0d/%0d/%0d",
                 i, a_count, b_count, c_count, ea, eb, ec);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
