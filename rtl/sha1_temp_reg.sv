// sha1_temp_reg: the temporary (accumulator) register of the SHA-1 datapath.
//
// Holds the partial results the ALU builds up over several cycles (the round
// function f, the running sum of a round, the message-schedule XOR) and feeds
// them back as the ALU's A operand. It loads `d` on the rising clock edge when
// `en` is high and holds otherwise. It has no reset: every sequence that
// reads it loads it first. One-cycle latency from `d` to `q`.
module sha1_temp_reg #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk)
    if (en) q <= d;

endmodule
