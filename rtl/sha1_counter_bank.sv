// sha1_counter_bank: the three loop counters the SHA-1 controller uses.
//
//   counter A (A_WIDTH = 5): round within a round class (0..19) during
//                            hashing, and word number (0..15) while a block
//                            is being read in;
//   counter B (B_WIDTH = 2): round class (0..3: f = Ch, Parity, Maj, Parity);
//   counter C (C_WIDTH = 4): message-memory base address, i.e. t mod 16. It
//                            counts every message-memory write, so it runs
//                            over the block load and over each extended word.
// Each counter clears and counts on the rising clock edge under the
// controller's control (clear wins). Counter outputs are registered.
// The widths are those of the original counter-bank cell's pins.
module sha1_counter_bank #(
  parameter int unsigned A_WIDTH = 5,
  parameter int unsigned B_WIDTH = 2,
  parameter int unsigned C_WIDTH = 4
) (
  input  logic               clk,
  input  logic               a_clr,
  input  logic               a_inc,
  output logic [A_WIDTH-1:0] a_count,
  input  logic               b_clr,
  input  logic               b_inc,
  output logic [B_WIDTH-1:0] b_count,
  input  logic               c_clr,
  input  logic               c_inc,
  output logic [C_WIDTH-1:0] c_count
);

  sha1_counter #(.WIDTH(A_WIDTH)) u_cnt_a (.clk, .clr(a_clr), .inc(a_inc), .count(a_count));
  sha1_counter #(.WIDTH(B_WIDTH)) u_cnt_b (.clk, .clr(b_clr), .inc(b_inc), .count(b_count));
  sha1_counter #(.WIDTH(C_WIDTH)) u_cnt_c (.clk, .clr(c_clr), .inc(c_inc), .count(c_count));

endmodule
