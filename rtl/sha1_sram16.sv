// sha1_sram16: 16-word message-block memory of the SHA-1 unit.
//
// Holds the sixteen 32-bit words of the 512-bit block being hashed. The same
// memory also serves as the 16-entry circular buffer of the message schedule:
// word W[t] lives at address t mod 16, and each round overwrites the oldest
// word with the newly extended one, so only 16 words are ever stored.
//
// One address port shared by reads and writes, as in the original cell (a
// single address buffer). The read is combinational from `addr`. A write of
// `wdata` to `addr` happens on the rising clock edge when `we` is high, so a
// word written in one cycle is readable in the next.
module sha1_sram16 #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 16,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic [AW-1:0]    addr,
  input  logic             we,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (we) mem[addr] <= wdata;

  assign rdata = mem[addr];

endmodule
