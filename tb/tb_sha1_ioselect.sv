// tb_sha1_ioselect: random test of the data-pin direction selection.
// With in_mode high the write data must be the pin input and the driver off;
// with in_mode low the write data and the pin output must be the ALU result
// and the driver on.
module tb_sha1_ioselect;
  logic        in_mode, io_oe;
  logic [31:0] alu_y, io_in, wdata, io_out;
  int checks = 0, failures = 0;

  sha1_ioselect dut (.in_mode, .alu_y, .io_in, .wdata, .io_out, .io_oe);

  initial begin
    #100_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      in_mode = 1'($urandom % 2); alu_y = $urandom; io_in = $urandom;
      #1;
      checks++;
      if (in_mode ? (wdata !== io_in || io_oe !== 1'b0)
                  : (wdata !== alu_y || io_out !== alu_y || io_oe !== 1'b1)) begin
        failures++;
        $display("FAIL: in_mode=%0b wdata=%08h io_out=%08h io_oe=%0b", in_mode, wdata, io_out, io_oe);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
