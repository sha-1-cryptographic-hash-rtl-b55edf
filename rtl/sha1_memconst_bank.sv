// sha1_memconst_bank: state memory and constant store of the SHA-1 unit.
//
// One read port serves two stores that share their address decoding:
//   * an 11-word RAM holding the running hash H0..H4, the working variables
//     A..E and a scratch word T2 (used for the Maj round function);
//   * a 9-word mask ROM holding the five SHA-1 initial hash values and the
//     four round constants, plus a zero word that needs no mask cells.
// Read address bit 4 chooses ROM (1) or RAM (0); the low four bits index the
// chosen store. Reading is combinational. The output multiplexer between the
// two stores is the bank's 2-input mux.
//
// The RAM has a separate 4-bit write address. `wdata` is written on the rising
// clock edge when `we` is high. Because the write is edge-triggered, a cycle
// may read a word and write the updated value back to the same word
// (H0 <= T + H0) without a combinational loop; in the original two-phase
// circuit a staging flip-flop in front of the RAM served that purpose, and
// here the edge-triggered write port takes its place. Reads of unused
// addresses return zero.
module sha1_memconst_bank
  import sha1_pkg::*;
(
  input  logic       clk,
  input  reg_raddr_e raddr,
  input  reg_waddr_e waddr,
  input  logic       we,
  input  word_t      wdata,
  output word_t      rdata
);

  word_t ram [STATE_WORDS];
  word_t ram_q, rom_q;

  always_ff @(posedge clk)
    if (we && (32'(waddr) < STATE_WORDS)) ram[waddr] <= wdata;

  assign ram_q = (32'(raddr[3:0]) < STATE_WORDS) ? ram[raddr[3:0]] : '0;
  assign rom_q = rom_word(raddr[3:0]);
  assign rdata = raddr[4] ? rom_q : ram_q;

endmodule
