// tb_sha1_sram16: random read/write test of the 16-word message memory.
// First fills all 16 words, then runs random cycles of write (random enable)
// and combinational read at random addresses, comparing every read with a
// model array. Also checks that a write is visible in the following cycle.
module tb_sha1_sram16;
  logic        clk = 1'b0, we;
  logic [3:0]  addr;
  logic [31:0] wdata, rdata;
  logic [31:0] model [16];
  int checks = 0, failures = 0;

  sha1_sram16 dut (.clk, .addr, .we, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (20_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      addr = 4'(i); we = 1'b1; wdata = $urandom; model[i] = wdata;
    end
    @(negedge clk);
    we = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      addr = 4'($urandom);
      #1;
      checks++;
      if (rdata !== model[addr]) begin
        failures++;
        $display("FAIL: read addr %0d got %08h expected %08h", addr, rdata, model[addr]);
      end
      we    = 1'($urandom % 2);
      wdata = $urandom;
      @(negedge clk);
      if (we) begin
        model[addr] = wdata;
        checks++;
        if (rdata !== wdata) begin
          failures++;
          $display("FAIL: write-then-read addr %0d got %08h expected %08h", addr, rdata, wdata);
        end
      end
      we = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
