// sha1_core: word-serial SHA-1 hash unit (controller, counter bank, datapath).
//
// The unit hashes pre-padded 512-bit message blocks with a single 32-bit ALU,
// one temporary register and two small memories, trading speed for area: one
// block takes 1555 clock cycles. The running hash H0..H4 persists across
// blocks, so a message of any number of blocks is hashed by loading its
// blocks one after another; padding and the length field are the host's job.
//
// Pin protocol (all sampled/changed on the rising edge of clk):
//   * rst (synchronous, at least one cycle): the next five cycles load the
//     SHA-1 initial values into H0..H4, then `ready` goes high.
//   * In a cycle with `ready` high and the unit idle, `hash_req` high starts
//     hash output (it wins over `block`); else `block` high starts a block.
//   * Block: on the next 16 cycles `ready` stays high and the unit takes
//     message word 0..15 (big-endian words of the block) from `io_in`, one
//     per cycle. `ready` then stays low for 1539 cycles while the block is
//     processed, and rises when the unit is idle again.
//   * Hash: on the next five cycles `ready` is low, `io_oe` is high and
//     `io_out` carries H0, H1, H2, H3, H4; then `ready` rises.
// `io_out`/`io_oe` with `io_in` form the shared 32-bit bidirectional bus:
// `io_oe` is the inverse of `ready`, and while it is high `io_out` shows the
// ALU result (intermediate values outside the hash-output cycles).
// `state` exposes the controller state for debug, as the original did.
//
// The organisation follows the original design. A single rising-edge clock
// replaces its two-phase non-overlapping clocks, and the tristate pins are
// split into io_in/io_out/io_oe, to be joined by an I/O pad outside the core.
module sha1_core
  import sha1_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       block,
  input  logic       hash_req,
  output logic       ready,
  input  word_t      io_in,
  output word_t      io_out,
  output logic       io_oe,
  output logic [5:0] state
);

  dp_ctrl_t   ctrl;
  logic       a_clr, a_inc, b_clr, b_inc, c_clr, c_inc;
  logic [4:0] cnt_a;
  logic [1:0] cnt_b;
  logic [3:0] cnt_c;

  sha1_controller u_ctrl (
    .clk, .rst, .block, .hash(hash_req), .ready, .ctrl,
    .cnt_a_clr(a_clr), .cnt_a_inc(a_inc), .cnt_a,
    .cnt_b_clr(b_clr), .cnt_b_inc(b_inc), .cnt_b,
    .cnt_c_clr(c_clr), .cnt_c_inc(c_inc), .cnt_c,
    .state
  );

  sha1_counter_bank #(.A_WIDTH(5), .B_WIDTH(2), .C_WIDTH(4)) u_cnt (
    .clk,
    .a_clr, .a_inc, .a_count(cnt_a),
    .b_clr, .b_inc, .b_count(cnt_b),
    .c_clr, .c_inc, .c_count(cnt_c)
  );

  sha1_datapath u_dp (
    .clk, .ctrl, .io_in, .io_out, .io_oe
  );

endmodule
