// sha1_counter: one loop counter of the SHA-1 counter bank.
//
// A WIDTH-bit up-counter with synchronous clear and count enable; clear has
// priority. It wraps modulo 2^WIDTH, which the message-address counter relies
// on to walk the 16-word circular message buffer. No global reset: the
// controller clears each counter before it is first read.
module sha1_counter #(
  parameter int unsigned WIDTH = 5
) (
  input  logic             clk,
  input  logic             clr,
  input  logic             inc,
  output logic [WIDTH-1:0] count
);

  always_ff @(posedge clk)
    if (clr)      count <= '0;
    else if (inc) count <= count + 1'b1;

endmodule
