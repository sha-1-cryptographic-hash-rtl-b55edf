// sha1_ioselect: direction selection for the shared 32-bit data pins.
//
// The unit has one 32-bit bus for both message input and hash output. While
// `in_mode` is high (the controller's Ready signal) the pins are inputs: the
// word on `io_in` becomes the datapath's write data, and the output driver is
// off. Otherwise the ALU result is the write data and is also driven onto the
// pins (`io_out` with `io_oe` high). The original cell is a multiplexer plus a
// tristate driver; here the tristate is split into a value and an enable so
// that a pad (or a testbench) can form the bidirectional pin. Combinational.
module sha1_ioselect #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             in_mode,
  input  logic [WIDTH-1:0] alu_y,
  input  logic [WIDTH-1:0] io_in,
  output logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] io_out,
  output logic             io_oe
);

  assign wdata  = in_mode ? io_in : alu_y;
  assign io_out = alu_y;
  assign io_oe  = ~in_mode;

endmodule
