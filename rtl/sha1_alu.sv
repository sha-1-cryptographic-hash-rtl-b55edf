// sha1_alu: the single ALU of the word-serial SHA-1 datapath.
//
// Operand A always comes from the temporary register; operand B comes from
// either the message memory or the state/constant bank. Before the function
// is applied, one rotation stage is selected by `shift`:
//   SH_NONE     - no rotation,
//   SH_FIVE_B   - B rotated left by 5   (the a<<<5 term of the round),
//   SH_THIRTY_B - B rotated left by 30  (the c = b<<<30 state update),
//   SH_ONE_A    - A rotated left by 1   (the message-schedule rotation).
// The function stage then yields B (pass), A^B, A+B (mod 2^32) or A&B.
// As in the original cell, the result is formed from inverted NAND, XNOR,
// inverted-sum and inverted-pass terms selected by inverting multiplexers;
// the two inversions cancel, so the outputs are the true functions.
//
// Purely combinational; no clock. The rotation set and the operation
// encoding follow the original design; the inverted-term structure is kept
// to mirror its cells, and is logically identical to a plain case statement.
module sha1_alu
  import sha1_pkg::*;
#(
  parameter int unsigned WIDTH = WORD_W
) (
  input  logic [WIDTH-1:0] a,      // temporary register
  input  logic [WIDTH-1:0] b,      // message memory or state/constant bank
  input  alu_shift_e       shift,
  input  alu_op_e          op,
  output logic [WIDTH-1:0] y
);

  logic [WIDTH-1:0] a_rot, b_rot;
  logic [WIDTH-1:0] n_and, n_xor, n_sum, n_pass;
  logic [WIDTH-1:0] sum_or_and, pass_or_xor;

  // Shift A: rotate left by one for the message schedule.
  assign a_rot = (shift == SH_ONE_A) ? {a[WIDTH-2:0], a[WIDTH-1]} : a;

  // Shift B: rotate left by 5 or by 30 (a right rotation by 2).
  always_comb begin
    case (shift)
      SH_FIVE_B:   b_rot = {b[WIDTH-6:0], b[WIDTH-1:WIDTH-5]};
      SH_THIRTY_B: b_rot = {b[1:0], b[WIDTH-1:2]};
      default:     b_rot = b;
    endcase
  end

  // Inverting function cells.
  assign n_and  = ~(a_rot & b_rot);
  assign n_xor  = ~(a_rot ^ b_rot);
  assign n_sum  = ~(a_rot + b_rot);
  assign n_pass = ~b_rot;

  // Inverting output multiplexers; op[0] picks within a pair, op[1] the pair.
  assign sum_or_and  = ~(op[0] ? n_and : n_sum);
  assign pass_or_xor = ~(op[0] ? n_xor : n_pass);
  assign y           = op[1] ? sum_or_and : pass_or_xor;

endmodule
