// sha1_pkg: types and constants shared by the word-serial SHA-1 unit.
//
// The unit works on one 32-bit word per clock. Its datapath is steered by a
// small set of control fields, defined here as enums so that controller,
// datapath and testbenches agree on their encodings:
//   * reg_raddr_e  - 5-bit read address of the state/constant bank. Bit 4
//                    selects the mask ROM (initial hash values, the four round
//                    constants and zero); bit 4 clear selects the 11-word
//                    state RAM (H0..H4, A..E and the scratch word T2).
//   * reg_waddr_e  - 4-bit write address of the state RAM (same numbering as
//                    the RAM half of reg_raddr_e).
//   * alu_shift_e  - rotation applied inside the ALU: 5 or 30 bits to the
//                    bank/message operand, or 1 bit to the temporary operand.
//   * alu_op_e     - ALU function: pass the bank/message operand, XOR, ADD, AND.
//   * srcb_e       - which memory feeds the ALU's second operand.
// The encodings follow the unit's original control-word assignment; the
// package form and names are this implementation's.
package sha1_pkg;

  localparam int unsigned WORD_W     = 32;  // SHA-1 word width
  localparam int unsigned MSG_WORDS  = 16;  // words in one 512-bit message block
  localparam int unsigned STATE_WORDS = 11; // H0..H4, A..E, T2
  localparam int unsigned ROUNDS_PER_CLASS = 20; // rounds sharing one f and K

  typedef logic [WORD_W-1:0] word_t;

  typedef enum logic [4:0] {
    RD_H0    = 5'b00000,
    RD_H1    = 5'b00001,
    RD_H2    = 5'b00010,
    RD_H3    = 5'b00011,
    RD_H4    = 5'b00100,
    RD_A     = 5'b00101,
    RD_B     = 5'b00110,
    RD_C     = 5'b00111,
    RD_D     = 5'b01000,
    RD_E     = 5'b01001,
    RD_T2    = 5'b01010,
    RD_AINIT = 5'b10000,
    RD_BINIT = 5'b10001,
    RD_CINIT = 5'b10010,
    RD_DINIT = 5'b10011,
    RD_EINIT = 5'b10100,
    RD_K1    = 5'b10101,
    RD_K2    = 5'b10110,
    RD_K3    = 5'b10111,
    RD_K4    = 5'b11000,
    RD_ZERO  = 5'b11001
  } reg_raddr_e;

  typedef enum logic [3:0] {
    WR_H0 = 4'b0000,
    WR_H1 = 4'b0001,
    WR_H2 = 4'b0010,
    WR_H3 = 4'b0011,
    WR_H4 = 4'b0100,
    WR_A  = 4'b0101,
    WR_B  = 4'b0110,
    WR_C  = 4'b0111,
    WR_D  = 4'b1000,
    WR_E  = 4'b1001,
    WR_T2 = 4'b1010
  } reg_waddr_e;

  typedef enum logic [1:0] {
    SH_NONE   = 2'b00,  // no rotation
    SH_FIVE_B = 2'b01,  // bank/message operand rotated left by 5
    SH_THIRTY_B = 2'b10,// bank/message operand rotated left by 30
    SH_ONE_A  = 2'b11   // temporary operand rotated left by 1
  } alu_shift_e;

  typedef enum logic [1:0] {
    OP_PASS = 2'b00,    // y = operand B (after its rotation)
    OP_XOR  = 2'b01,
    OP_ADD  = 2'b10,    // modulo 2^32
    OP_AND  = 2'b11
  } alu_op_e;

  typedef enum logic {
    SRCB_REG  = 1'b0,   // state/constant bank output
    SRCB_WMEM = 1'b1    // message memory output
  } srcb_e;

  // Control word the controller sends to the datapath every cycle.
  typedef struct packed {
    logic [3:0] waddr;    // message memory address (counter C + offset)
    logic       wen;      // message memory write enable
    reg_raddr_e raddr;    // state/constant bank read address
    reg_waddr_e rwaddr;   // state RAM write address
    logic       rwe;      // state RAM write enable
    logic       temp_we;  // temporary register load enable
    srcb_e      srcb;     // ALU operand B source
    alu_shift_e shift;    // ALU rotation
    alu_op_e    op;       // ALU function
    logic       in_mode;  // data pins are inputs (the Ready output)
  } dp_ctrl_t;

  // Mask-ROM contents, indexed by the low four bits of a ROM read address.
  // Words 0..4 are the SHA-1 initial hash values, 5..8 the round constants
  // K1..K4; word 9 is the zero constant, which needs no masking.
  function automatic word_t rom_word(input logic [3:0] idx);
    case (idx)
      4'd0:    return 32'h67452301;
      4'd1:    return 32'hEFCDAB89;
      4'd2:    return 32'h98BADCFE;
      4'd3:    return 32'h10325476;
      4'd4:    return 32'hC3D2E1F0;
      4'd5:    return 32'h5A827999;
      4'd6:    return 32'h6ED9EBA1;
      4'd7:    return 32'h8F1BBCDC;
      4'd8:    return 32'hCA62C1D6;
      default: return '0;
    endcase
  endfunction

  function automatic word_t rotl(input word_t x, input int unsigned n);
    return (x << n) | (x >> (WORD_W - n));
  endfunction

  // Controller state numbers that other blocks and testbenches refer to.
  localparam logic [5:0] ST_INIT0      = 6'd0;
  localparam logic [5:0] ST_READY      = 6'd5;
  localparam logic [5:0] ST_READ_BLOCK = 6'd6;
  localparam logic [5:0] ST_ROUND_INIT = 6'd12;
  localparam logic [5:0] ST_ROUND_A    = 6'd13;
  localparam logic [5:0] ST_ROUND_B    = 6'd18;
  localparam logic [5:0] ST_ROUND_C    = 6'd22;
  localparam logic [5:0] ST_ROUND_D    = 6'd29;
  localparam logic [5:0] ST_CLEANUP    = 6'd33;
  localparam logic [5:0] ST_MSG_EXT_WR = 6'd45;
  localparam logic [5:0] ST_NEXT_CLASS = 6'd46;
  localparam logic [5:0] ST_BLOCK_DONE = 6'd47;
  localparam logic [5:0] ST_HASH0      = 6'd57;

endpackage
