// zz_counter: sample counter and ping-pong bank select.
//
// idx counts the samples of the current block, 0 .. N*N-1, advancing by one
// on every clock in which adv is high. It addresses the zigzag ROM for the
// write side and is the read address of the other RAM. On the last sample of
// a block idx wraps to 0 and se toggles, so the RAM just filled becomes the
// one read and the other one is written next. full goes high after the first
// wrap and stays high: from then on the bank being read holds a complete
// block.
//
// The counting follows the design's counter i and bank signal se; here the
// counter runs 0..N*N-1 and toggles se on the wrap itself, so a block takes
// exactly N*N clocks with no idle cycle between blocks. The adv enable (to
// pause the stream) is this design's addition.
//
// Timing: all outputs are registers; reset is active low and asynchronous,
// clearing idx, se and full.
module zz_counter #(
  parameter int unsigned N     = zz_pkg::BLK_N_DEF,
  parameter int unsigned IDX_W = $clog2(N * N)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             adv,
  output logic [IDX_W-1:0] idx,
  output logic             se,
  output logic             full
);

  localparam logic [IDX_W-1:0] LAST = IDX_W'(N * N - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx  <= '0;
      se   <= 1'b0;
      full <= 1'b0;
    end else if (adv) begin
      if (idx == LAST) begin
        idx  <= '0;
        se   <= ~se;
        full <= 1'b1;
      end else begin
        idx <= idx + 1'b1;
      end
    end
  end

  a_idx_range: assert property (@(posedge clk) disable iff (!rst_n) idx <= LAST);

endmodule
