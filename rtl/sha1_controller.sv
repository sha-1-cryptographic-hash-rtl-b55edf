// sha1_controller: the sequencer of the word-serial SHA-1 unit.
//
// A Moore machine of 62 states (numbers 0..61) issues one datapath control
// word per clock. Its phases:
//   0..4    after reset: copy the five initial hash values from ROM into H0..H4
//   5       Ready: pins are inputs; Hash (priority) or Block is sampled
//   6       Read Block: 16 cycles, one message word per cycle into the message
//           memory; counter A counts the words
//   7..11   Block Init: A..E <= H0..H4; counters A and B cleared
//   12      Round Init: branch on counter B (the round class)
//   13..17  class 0: T = ((D ^ C) & B) ^ D + K1                  (Ch)
//   18..21  class 1: T = B ^ C ^ D + K2                          (Parity)
//   22..28  class 2: T2 = C & D; T = ((C ^ D) & B) ^ T2 + K3     (Maj)
//   29..32  class 3: T = B ^ C ^ D + K4                          (Parity)
//   33..40  Round Cleanup: T += E, T += A<<<5, T += W[t];
//           E <= D, D <= C, C <= B<<<30, B <= A, A <= T
//   41..45  Message Extension: T = (W[t] ^ W[t+2] ^ W[t+8] ^ W[t+13]) <<< 1,
//           written over W[t]; counters A and C advance
//   46      Next Round Class after 20 rounds: counter B advances
//   47..56  Block Cleanup: Hi <= Hi + {A..E}
//   57..61  Output Hash: H0..H4 driven on the pins, one per cycle
// Message words are addressed as counter C plus an offset of 0, 2, 8 or 13,
// modulo 16, so the 16-word memory acts as the circular schedule buffer.
//
// Interface: `block` and `hash` are sampled on the rising edge in state 5;
// the words of a block are then taken on the next 16 edges, and the five
// digest words are driven on the data pins during the next five cycles.
// `ready` (= ctrl.in_mode) is high in states 5 and 6. `rst` is synchronous and sends the machine to state 0. One block takes 1555 cycles
// from the Block sample to the return to Ready.
//
// The state numbering, the per-state micro-operations and the sequencing
// follow the original controller. Differences: a single rising-edge clock
// replaces the two-phase non-overlapping clock, and the control outputs are
// gathered into one struct.
module sha1_controller
  import sha1_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       block,
  input  logic       hash,
  output logic       ready,
  output dp_ctrl_t   ctrl,
  // counter bank
  output logic       cnt_a_clr,
  output logic       cnt_a_inc,
  input  logic [4:0] cnt_a,
  output logic       cnt_b_clr,
  output logic       cnt_b_inc,
  input  logic [1:0] cnt_b,
  output logic       cnt_c_clr,
  output logic       cnt_c_inc,
  input  logic [3:0] cnt_c,
  output logic [5:0] state
);

  logic [5:0] state_d;
  logic [1:0] w_sel;      // message offset select: 0, 2, 8, 13
  logic [3:0] w_off;

  // ---------------------------------------------------------------- state
  always_ff @(posedge clk)
    state <= state_d;

  always_comb begin
    state_d = state + 6'd1;
    if (rst) begin
      state_d = ST_INIT0;
    end else begin
      unique case (state)
        ST_READY:      state_d = hash ? ST_HASH0 : (block ? ST_READ_BLOCK : ST_READY);
        ST_READ_BLOCK: state_d = (cnt_a == 5'd15) ? 6'd7 : ST_READ_BLOCK;
        ST_ROUND_INIT: begin
          unique case (cnt_b)
            2'd0: state_d = ST_ROUND_A;
            2'd1: state_d = ST_ROUND_B;
            2'd2: state_d = ST_ROUND_C;
            2'd3: state_d = ST_ROUND_D;
          endcase
        end
        6'd17, 6'd21, 6'd28, 6'd32:
                       state_d = ST_CLEANUP;
        ST_MSG_EXT_WR: state_d = (cnt_a == 5'(ROUNDS_PER_CLASS - 1)) ? ST_NEXT_CLASS
                                                                      : ST_ROUND_INIT;
        ST_NEXT_CLASS: state_d = (cnt_b == 2'd3) ? ST_BLOCK_DONE : ST_ROUND_INIT;
        6'd56, 6'd61:  state_d = ST_READY;
        default:       state_d = state + 6'd1;
      endcase
    end
  end

  // ------------------------------------------------- message word address
  always_comb begin
    unique case (w_sel)
      2'd0: w_off = 4'd0;
      2'd1: w_off = 4'd2;
      2'd2: w_off = 4'd8;
      2'd3: w_off = 4'd13;
    endcase
  end
  assign ctrl.waddr = cnt_c + w_off;   // wraps modulo 16

  // -------------------------------------------------------------- outputs
  // Each step either accumulates into the temporary register
  // (T <= T op operand) or writes a state word (RAM[w] <= T op bank word).
  always_comb begin
    w_sel         = 2'd0;
    ctrl.wen      = 1'b0;
    ctrl.raddr    = RD_H0;
    ctrl.rwaddr   = WR_H0;
    ctrl.rwe      = 1'b0;
    ctrl.temp_we  = 1'b0;
    ctrl.srcb     = SRCB_REG;
    ctrl.shift    = SH_NONE;
    ctrl.op       = OP_PASS;
    ctrl.in_mode  = 1'b0;
    cnt_a_clr     = 1'b0;
    cnt_a_inc     = 1'b0;
    cnt_b_clr     = 1'b0;
    cnt_b_inc     = 1'b0;
    cnt_c_clr     = 1'b0;

    unique case (state)
      // --- load initial hash values from ROM: H[i] <= ROM[i]
      6'd0, 6'd1, 6'd2, 6'd3, 6'd4: begin
        ctrl.raddr  = reg_raddr_e'({1'b1, state[3:0]});
        ctrl.rwaddr = reg_waddr_e'(state[3:0]);
        ctrl.rwe    = 1'b1;
      end
      // --- Ready: wait for Block or Hash
      ST_READY: begin
        ctrl.in_mode = 1'b1;
        cnt_a_clr    = 1'b1;
        cnt_c_clr    = 1'b1;
      end
      // --- Read Block: W[cnt_c] <= pins
      ST_READ_BLOCK: begin
        ctrl.in_mode = 1'b1;
        ctrl.wen     = 1'b1;
        cnt_a_inc    = 1'b1;
      end
      // --- Block Init: A..E <= H0..H4
      6'd7, 6'd8, 6'd9, 6'd10, 6'd11: begin
        ctrl.raddr  = reg_raddr_e'(5'(state - 6'd7));
        ctrl.rwaddr = reg_waddr_e'(4'(state - 6'd2));
        ctrl.rwe    = 1'b1;
        if (state == 6'd11) begin
          cnt_a_clr = 1'b1;
          cnt_b_clr = 1'b1;
        end
      end
      // --- class 0: f = Ch(B,C,D) = ((D ^ C) & B) ^ D
      6'd13: begin ctrl.temp_we = 1'b1; ctrl.raddr = RD_D;                      end
      6'd14: begin ctrl.temp_we = 1'b1; ctrl.raddr = RD_C;  ctrl.op = OP_XOR;   end
      6'd15: begin ctrl.temp_we = 1'b1; ctrl.raddr = RD_B;  ctrl.op = OP_AND;   end
      6'd16: begin ctrl.temp_we = 1'b1; ctrl.raddr = RD_D;  ctrl.op = OP_XOR;   end
      6'd17: begin ctrl.temp_we = 1'b1; ctrl.raddr = RD_K1; ctrl.op = OP_ADD;   end
      // --- class 1: f = B ^ C ^ D
      6'd18: begin ctrl.temp_we = 1'b1; ctrl.raddr = RD_B;                      end
      6'd19: begin ctrl.temp_we = 1'b1; ctrl.raddr = RD_C;  ctrl.op = OP_XOR;   end
      6'd20: begin ctrl.temp_we = 1'b1; ctrl.raddr = RD_D;  ctrl.op = OP_XOR;   end
      6'd21: begin ctrl.temp_we = 1'b1; ctrl.raddr = RD_K2; ctrl.op = OP_ADD;   end
      // --- class 2: f = Maj(B,C,D) = ((C ^ D) & B) ^ (C & D)
      6'd22: begin ctrl.temp_we = 1'b1; ctrl.raddr = RD_C;                      end
      6'd23: begin ctrl.rwe = 1'b1; ctrl.rwaddr = WR_T2; ctrl.raddr = RD_D; ctrl.op = OP_AND; end
      6'd24: begin ctrl.temp_we = 1'b1; ctrl.raddr = RD_C;                      end
      6'd25: begin ctrl.temp_we = 1'b1; ctrl.raddr = RD_D;  ctrl.op = OP_XOR;   end
      6'd26: begin ctrl.temp_we = 1'b1; ctrl.raddr = RD_B;  ctrl.op = OP_AND;   end
      6'd27: begin ctrl.temp_we = 1'b1; ctrl.raddr = RD_T2; ctrl.op = OP_XOR;   end
      6'd28: begin ctrl.temp_we = 1'b1; ctrl.raddr = RD_K3; ctrl.op = OP_ADD;   end
      // --- class 3: f = B ^ C ^ D
      6'd29: begin ctrl.temp_we = 1'b1; ctrl.raddr = RD_B;                      end
      6'd30: begin ctrl.temp_we = 1'b1; ctrl.raddr = RD_C;  ctrl.op = OP_XOR;   end
      6'd31: begin ctrl.temp_we = 1'b1; ctrl.raddr = RD_D;  ctrl.op = OP_XOR;   end
      6'd32: begin ctrl.temp_we = 1'b1; ctrl.raddr = RD_K4; ctrl.op = OP_ADD;   end
      // --- Round Cleanup: T += E + (A <<< 5) + W[t], then shift the state
      6'd33: begin ctrl.temp_we = 1'b1; ctrl.raddr = RD_E; ctrl.op = OP_ADD; end
      6'd34: begin
        ctrl.temp_we = 1'b1; ctrl.raddr = RD_A; ctrl.op = OP_ADD; ctrl.shift = SH_FIVE_B;
      end
      6'd35: begin ctrl.temp_we = 1'b1; ctrl.srcb = SRCB_WMEM; ctrl.op = OP_ADD; end
      6'd36: begin ctrl.rwe = 1'b1; ctrl.rwaddr = WR_E; ctrl.raddr = RD_D; end
      6'd37: begin ctrl.rwe = 1'b1; ctrl.rwaddr = WR_D; ctrl.raddr = RD_C; end
      6'd38: begin
        ctrl.rwe = 1'b1; ctrl.rwaddr = WR_C; ctrl.raddr = RD_B; ctrl.shift = SH_THIRTY_B;
      end
      6'd39: begin ctrl.rwe = 1'b1; ctrl.rwaddr = WR_B; ctrl.raddr = RD_A; end
      6'd40: begin ctrl.rwe = 1'b1; ctrl.rwaddr = WR_A; ctrl.raddr = RD_ZERO; ctrl.op = OP_ADD; end
      // --- Message Extension: W[t] <= (W[t]^W[t+2]^W[t+8]^W[t+13]) <<< 1
      6'd41: begin ctrl.temp_we = 1'b1; ctrl.srcb = SRCB_WMEM; w_sel = 2'd0; end
      6'd42, 6'd43, 6'd44: begin
        ctrl.temp_we = 1'b1; ctrl.srcb = SRCB_WMEM; ctrl.op = OP_XOR;
        w_sel        = 2'(state - 6'd41);
      end
      ST_MSG_EXT_WR: begin
        ctrl.temp_we = 1'b1; ctrl.raddr = RD_ZERO; ctrl.op = OP_ADD; ctrl.shift = SH_ONE_A;
        ctrl.wen     = 1'b1;
        cnt_a_inc    = 1'b1;
      end
      // --- Next Round Class
      ST_NEXT_CLASS: begin
        cnt_b_inc = 1'b1;
        cnt_a_clr = 1'b1;
      end
      // --- Block Cleanup: T <= X; H <= H + T for X = A..E
      6'd47, 6'd49, 6'd51, 6'd53, 6'd55: begin
        ctrl.temp_we = 1'b1;
        ctrl.raddr   = reg_raddr_e'(5'(RD_A) + 5'((state - 6'd47) >> 1));
      end
      6'd48, 6'd50, 6'd52, 6'd54, 6'd56: begin
        ctrl.rwe    = 1'b1;
        ctrl.raddr  = reg_raddr_e'(5'((state - 6'd48) >> 1));
        ctrl.rwaddr = reg_waddr_e'(4'((state - 6'd48) >> 1));
        ctrl.op     = OP_ADD;
      end
      // --- Output Hash: pins <= H0..H4
      6'd57, 6'd58, 6'd59, 6'd60, 6'd61: begin
        ctrl.raddr = reg_raddr_e'(5'(state - 6'd57));
      end
      default: ;
    endcase
  end

  assign cnt_c_inc = ctrl.wen;   // counter C follows every message-memory write
  assign ready     = ctrl.in_mode;

  // ------------------------------------------------------------ checks
  // The state register never leaves the 62 defined states once out of reset.
  a_state_range: assert property (@(posedge clk) disable iff (rst) state_d <= 6'd61);
  // Message words are written only while loading a block or extending it.
  a_wen_states: assert property (@(posedge clk) disable iff (rst)
                                 ctrl.wen |-> (state == ST_READ_BLOCK || state == ST_MSG_EXT_WR));

endmodule
