// tb_sha1_alu: exhaustive-over-controls, random-over-data test of sha1_alu.
//
// For every rotation select and every function, 500 random operand pairs plus
// corner values are applied and the result is compared with a model written
// from the SHA-1 operations: B rotated left by 0/5/30 or A rotated left by 1,
// then pass-B, XOR, ADD (mod 2^32) or AND. Combinational, so each vector is
// checked after a 1 ns settle.
module tb_sha1_alu;
  import sha1_pkg::*;

  logic [31:0] a, b, y;
  alu_shift_e  shift;
  alu_op_e     op;
  int checks = 0, failures = 0;

  sha1_alu dut (.a, .b, .shift, .op, .y);

  function automatic logic [31:0] model(logic [31:0] ma, logic [31:0] mb,
                                        alu_shift_e s, alu_op_e o);
    logic [31:0] ra = ma, rb = mb;
    case (s)
      SH_FIVE_B:   rb = {mb[26:0], mb[31:27]};
      SH_THIRTY_B: rb = {mb[1:0], mb[31:2]};
      SH_ONE_A:    ra = {ma[30:0], ma[31]};
      default: ;
    endcase
    case (o)
      OP_PASS: return rb;
      OP_XOR:  return ra ^ rb;
      OP_ADD:  return ra + rb;
      default: return ra & rb;
    endcase
  endfunction

  initial begin
    #100_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic logic [31:0] corner [4] = '{32'h0, 32'hFFFF_FFFF, 32'h8000_0001, 32'h7FFF_FFFE};
    for (int s = 0; s < 4; s++)
      for (int o = 0; o < 4; o++)
        for (int i = 0; i < 516; i++) begin
          shift = alu_shift_e'(s);
          op    = alu_op_e'(o);
          if (i < 16) begin a = corner[i % 4]; b = corner[i / 4]; end
          else begin a = $urandom; b = $urandom; end
          #1;
          checks++;
          if (y !== model(a, b, shift, op)) begin
            failures++;
            if (failures < 10)
              $display("FAIL: shift=%s op=%s a=%08h b=%08h y=%08h expected %08h",
                       shift.name(), op.name(), a, b, y, model(a, b, shift, op));
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
