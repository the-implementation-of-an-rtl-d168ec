// zz_demux: write distributor of the ping-pong buffer.
//
// Steers the write strobe of the incoming sample to one of the two RAMs:
// with se low the sample goes to RAM 1 (we1), with se high to RAM 2 (we2).
// Data and address go to both RAMs unchanged; only the strobe is switched.
// Purely combinational. The demultiplexer as write distributor is the
// original design's; switching only the strobe is the choice made here.
module zz_demux (
  input  logic we,
  input  logic se,
  output logic we1,
  output logic we2
);

  always_comb begin
    we1 = we & ~se;
    we2 = we &  se;
  end

endmodule
