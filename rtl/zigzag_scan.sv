// zigzag_scan: zigzag scan of N x N coefficient blocks by the mapping method.
//
// Quantized DCT coefficients arrive one per clock in raster order (row by
// row). Instead of reordering them by comparisons, each sample is written
// straight to the RAM address of its place in the zigzag scan; that address
// comes from a ROM indexed by the sample's raster position. A block is then
// read out from addresses 0, 1, 2, ... in plain order, which is zigzag order.
//
// Two RAMs work as a ping-pong pair. While block k is written (scattered)
// into one, block k-1 is read (sequentially) from the other; at the end of
// every block the roles swap. The demultiplexer steers the write strobe and
// the multiplexer picks the read data; one counter drives the ROM, both read
// addresses and the bank select.
//
// Interface: in_valid/data_in take one sample per clock; when in_valid is
// low the whole pipeline pauses (this pause is this design's addition; the
// original runs continuously). out_valid/data_out give one zigzag-ordered
// sample per accepted input sample once the first block is complete;
// out_start marks the first (DC) sample of each output block.
//
// Timing: the first sample of a block is accepted on clock t; the first
// sample of the same block, in zigzag order, is on data_out right after clock
// t + N*N (64 clocks of latency at the default size). Throughput is one
// sample per clock with no gap between blocks. A block is only read out
// while the next one is written, so the last block of a stream needs N*N
// further input clocks (of any data) to come out.
module zigzag_scan #(
  parameter int unsigned N      = zz_pkg::BLK_N_DEF,
  parameter int unsigned DATA_W = zz_pkg::DATA_W_DEF,
  parameter int unsigned IDX_W  = $clog2(N * N)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [DATA_W-1:0] data_in,
  output logic              out_valid,
  output logic              out_start,
  output logic [DATA_W-1:0] data_out
);

  logic [IDX_W-1:0]  idx, waddr;
  logic              se, full;
  logic              we1, we2;
  logic [DATA_W-1:0] rdata1, rdata2;
  logic              rd_sel;

  zz_counter #(.N(N), .IDX_W(IDX_W)) u_counter (
    .clk, .rst_n, .adv(in_valid), .idx, .se, .full
  );

  zz_addr_rom #(.N(N), .IDX_W(IDX_W)) u_rom (
    .idx, .addr(waddr)
  );

  zz_demux u_demux (
    .we(in_valid), .se, .we1, .we2
  );

  zz_ram #(.DATA_W(DATA_W), .DEPTH(N * N), .ADDR_W(IDX_W)) u_ram1 (
    .clk, .we(we1), .waddr, .wdata(data_in),
    .re(in_valid), .raddr(idx), .rdata(rdata1)
  );

  zz_ram #(.DATA_W(DATA_W), .DEPTH(N * N), .ADDR_W(IDX_W)) u_ram2 (
    .clk, .we(we2), .waddr, .wdata(data_in),
    .re(in_valid), .raddr(idx), .rdata(rdata2)
  );

  // Bank select and output flags of the read issued in the previous clock,
  // aligned with the one-clock read latency of the RAMs.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_sel    <= 1'b0;
      out_valid <= 1'b0;
      out_start <= 1'b0;
    end else begin
      out_valid <= in_valid & full;
      out_start <= in_valid & full & (idx == '0);
      if (in_valid) rd_sel <= se;
    end
  end

  zz_mux #(.DATA_W(DATA_W)) u_mux (
    .sel(rd_sel), .d1(rdata1), .d2(rdata2), .q(data_out)
  );

  a_start_valid: assert property (@(posedge clk) disable iff (!rst_n)
    out_start |-> out_valid);

endmodule
