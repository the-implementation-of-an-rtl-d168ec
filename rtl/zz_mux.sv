// zz_mux: read selector of the ping-pong buffer.
//
// Passes on the read data of the RAM that is being read, which is always the
// one not being written: with sel low (RAM 1 being written) the output is
// RAM 2's data d2, with sel high it is RAM 1's data d1. sel must be the bank
// select of the clock in which the read was issued, since the RAMs have one
// clock of read latency. Purely combinational. The multiplexer as read
// selector is the original design's; the delayed select is needed by the
// registered RAM reads chosen here.
module zz_mux #(
  parameter int unsigned DATA_W = zz_pkg::DATA_W_DEF
) (
  input  logic              sel,
  input  logic [DATA_W-1:0] d1,
  input  logic [DATA_W-1:0] d2,
  output logic [DATA_W-1:0] q
);

  always_comb q = sel ? d1 : d2;

endmodule
