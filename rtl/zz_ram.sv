// zz_ram: one block buffer (RAM 1 or RAM 2 of the ping-pong pair).
//
// DEPTH words of DATA_W bits with one write port and one read port, as a
// simple dual-port block RAM. A write stores wdata at waddr on the clock
// edge when we is high. A read is synchronous: when re is high, rdata takes
// the word at raddr on the clock edge (one clock of read latency) and holds
// it otherwise. Contents are not reset; every word is written before a
// block is read out.
//
// Two such buffers alternating between writing and reading are the original
// design's; the registered read and the separate read enable are choices
// made here.
module zz_ram #(
  parameter int unsigned DATA_W = zz_pkg::DATA_W_DEF,
  parameter int unsigned DEPTH  = zz_pkg::BLK_N_DEF * zz_pkg::BLK_N_DEF,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic              re,
  input  logic [ADDR_W-1:0] raddr,
  output logic [DATA_W-1:0] rdata
);

  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end

endmodule
