// sha1_datapath: the 32-bit word-serial datapath of the SHA-1 unit.
//
// Structure (one word moves per clock):
//
//   io_in ──┐
//           ├─ ioselect ── wdata ──┬─> message memory (16 words, W[t])
//   ALU y ──┘      │               ├─> state/constant bank RAM (H, A..E, T2)
//                  └─> io_out      └─> temporary register T
//
//   ALU a = T;  ALU b = message memory word  or  state/constant bank word
//
// Every SHA-1 operation is built from steps of the form
// "T or a state word <= T op (rotated) operand". The controller supplies the
// control word `ctrl` each cycle; writes to all three storage elements take
// effect on the rising clock edge, and all reads are combinational, so a
// value written in one cycle is available in the next. While
// `ctrl.in_mode` is high the write data comes from the pins (block loading);
// otherwise from the ALU, whose result is also presented on `io_out` with
// `io_oe` high.
//
// The composition and the single-ALU, single-temporary organisation follow
// the original datapath.
module sha1_datapath
  import sha1_pkg::*;
(
  input  logic     clk,
  input  dp_ctrl_t ctrl,
  input  word_t    io_in,
  output word_t    io_out,
  output logic     io_oe
);

  word_t t_q, w_q, reg_q, b_op, alu_y, wdata;

  assign b_op = (ctrl.srcb == SRCB_WMEM) ? w_q : reg_q;

  sha1_temp_reg #(.WIDTH(WORD_W)) u_temp (
    .clk, .en(ctrl.temp_we), .d(wdata), .q(t_q)
  );

  sha1_alu #(.WIDTH(WORD_W)) u_alu (
    .a(t_q), .b(b_op), .shift(ctrl.shift), .op(ctrl.op), .y(alu_y)
  );

  sha1_sram16 #(.WIDTH(WORD_W), .DEPTH(MSG_WORDS)) u_wmem (
    .clk, .addr(ctrl.waddr), .we(ctrl.wen), .wdata(wdata), .rdata(w_q)
  );

  sha1_memconst_bank u_bank (
    .clk, .raddr(ctrl.raddr), .waddr(ctrl.rwaddr), .we(ctrl.rwe),
    .wdata(wdata), .rdata(reg_q)
  );

  sha1_ioselect #(.WIDTH(WORD_W)) u_iosel (
    .in_mode(ctrl.in_mode), .alu_y, .io_in, .wdata, .io_out, .io_oe
  );

endmodule
