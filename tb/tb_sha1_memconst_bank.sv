// tb_sha1_memconst_bank: test of the state RAM and constant ROM.
//   * every ROM address returns the SHA-1 constant listed here from FIPS 180
//     (initial values H0..H4, K for rounds 0-19/20-39/40-59/60-79, zero);
//   * random writes and reads of the 11 RAM words against a model, including
//     reading and writing the same word in one cycle (read sees the old value,
//     the write lands at the edge);
//   * unused RAM and ROM addresses read as zero.
module tb_sha1_memconst_bank;
  import sha1_pkg::*;

  logic       clk = 1'b0, we;
  reg_raddr_e raddr;
  reg_waddr_e waddr;
  word_t      wdata, rdata;
  word_t      model [11];
  int checks = 0, failures = 0;

  const word_t FIPS [10] = '{32'h67452301, 32'hEFCDAB89, 32'h98BADCFE, 32'h10325476,
                             32'hC3D2E1F0, 32'h5A827999, 32'h6ED9EBA1, 32'h8F1BBCDC,
                             32'hCA62C1D6, 32'h00000000};

  sha1_memconst_bank dut (.clk, .raddr, .waddr, .we, .wdata, .rdata);

  always #5 clk = ~clk;

  task automatic expect_eq(word_t got, word_t exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL: %s got %08h expected %08h", what, got, exp);
    end
  endtask

  initial begin
    repeat (20_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1'b0; waddr = WR_H0; wdata = '0;
    // ROM
    for (int i = 0; i < 16; i++) begin
      raddr = reg_raddr_e'(5'(16 + i));
      #1;
      expect_eq(rdata, (i < 10) ? FIPS[i] : '0, $sformatf("ROM word %0d", i));
    end
    // fill RAM
    for (int i = 0; i < 11; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = reg_waddr_e'(4'(i)); wdata = $urandom; model[i] = wdata;
    end
    @(negedge clk);
    we = 1'b0;
    // random traffic
    for (int i = 0; i < 2000; i++) begin
      int ra, wa;
      ra = $urandom % 11;
      wa = (i % 3 == 0) ? ra : $urandom % 11;   // every third cycle: same word
      raddr = reg_raddr_e'(5'(ra));
      waddr = reg_waddr_e'(4'(wa));
      we    = 1'($urandom % 2);
      wdata = $urandom;
      #1;
      expect_eq(rdata, model[ra], $sformatf("RAM read %0d", ra));
      @(negedge clk);
      if (we) model[wa] = wdata;
      if (we && wa == ra) expect_eq(rdata, wdata, "RAM read after same-word write");
      we = 1'b0;
    end
    // unused RAM addresses
    for (int i = 11; i < 16; i++) begin
      raddr = reg_raddr_e'(5'(i));
      #1;
      expect_eq(rdata, '0, $sformatf("unused RAM address %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
