// tb_zigzag_scan: end-to-end test of the zigzag scan at its default size
// (8 x 8 blocks of bytes, no parameter override).
//
// Random blocks are streamed in raster order. A scoreboard reorders every
// completed input block with an independent zigzag walk (a row/column cursor
// that bounces off the block edges) and compares each out_valid sample with
// it, and checks out_start on the first sample of every block.
//
// Phase 1 streams four blocks back to back and then one more block to push
// the fourth out. It checks the latency (first output exactly 64 clocks after
// the first input is accepted) and that no output appears while the first
// block is being written. Phase 2 streams six blocks with in_valid dropped at
// random (plus a block of flush), and checks that the output pauses with the
// input.
//
// Each mechanism is counted and must occur: start-up suppression, reads from
// RAM 1 and from RAM 2 (bank swaps in both directions), input pauses.
module tb_zigzag_scan;
  localparam int N = 8;
  localparam int S = N * N;
  localparam int W = 8;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [W-1:0] data_in = 0, data_out;
  logic out_valid, out_start;

  int checks = 0, failures = 0;
  int cycle = 0, first_in_cycle = -1, first_out_cycle = -1;
  int zz_order [S];
  logic [W-1:0] cur_blk [S];
  int cur_cnt = 0;
  logic [W-1:0] exp_q [$];
  int out_cnt = 0;
  int n_startup = 0, n_from_ram1 = 0, n_from_ram2 = 0, n_pause = 0;

  zigzag_scan dut (.clk, .rst_n, .in_valid, .data_in, .out_valid, .out_start, .data_out);

  always #2 clk = ~clk;  // 250 MHz: 4 ns period

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Independent zigzag walk: zz_order[k] = raster index of scan position k.
  function automatic void build_walk();
    int r = 0, c = 0;
    bit up = 1;
    for (int k = 0; k < S; k++) begin
      zz_order[k] = r * N + c;
      if (up) begin
        if (c == N - 1)  begin r++; up = 0; end
        else if (r == 0) begin c++; up = 0; end
        else             begin r--; c++; end
      end else begin
        if (r == N - 1)  begin c++; up = 1; end
        else if (c == 0) begin r++; up = 1; end
        else             begin r++; c--; end
      end
    end
  endfunction

  // Scoreboard, sampled just after each rising edge.
  always @(posedge clk) begin
    #1;
    cycle++;
    if (rst_n) begin
      if (out_valid) begin
        if (first_out_cycle < 0) first_out_cycle = cycle;
        checks++;
        if (exp_q.size() == 0) begin
          failures++;
          $display("FAIL output %0d with nothing expected", out_cnt);
        end else begin
          logic [W-1:0] e;
          e = exp_q.pop_front();
          if (data_out !== e) begin
            failures++;
            $display("FAIL output %0d: %0h expected %0h", out_cnt, data_out, e);
          end
        end
        checks++;
        if (out_start !== (out_cnt % S == 0)) begin
          failures++;
          $display("FAIL out_start=%0d at output %0d", out_start, out_cnt);
        end
        if (out_start) begin
          if (dut.rd_sel) n_from_ram1++;
          else            n_from_ram2++;
        end
        out_cnt++;
      end
      if (in_valid && !out_valid && first_out_cycle < 0) n_startup++;
      checks++;
      if (!in_valid && out_valid) begin
        failures++;
        $display("FAIL output while input paused, cycle %0d", cycle);
      end
    end
  end

  task automatic send(input logic [W-1:0] d, input bit count_in = 1);
    @(negedge clk);
    in_valid = 1;
    data_in = d;
    @(posedge clk);
    if (first_in_cycle < 0) first_in_cycle = cycle + 1;
    cur_blk[cur_cnt] = d;
    cur_cnt++;
    if (cur_cnt == S) begin
      for (int k = 0; k < S; k++) exp_q.push_back(cur_blk[zz_order[k]]);
      cur_cnt = 0;
    end
  endtask

  task automatic idle();
    @(negedge clk);
    in_valid = 0;
    data_in = W'($urandom);
    n_pause++;
  endtask

  initial begin
    build_walk();
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // Phase 1: four blocks back to back, then one block to push them out.
    for (int b = 0; b < 5; b++)
      for (int i = 0; i < S; i++) send(W'($urandom));
    @(negedge clk) in_valid = 0;
    @(posedge clk); #2;
    checks++;
    if (first_out_cycle - first_in_cycle != S) begin
      failures++;
      $display("FAIL latency %0d clocks, expected %0d", first_out_cycle - first_in_cycle, S);
    end
    checks++;
    if (out_cnt != 4 * S || exp_q.size() != S) begin
      failures++;
      $display("FAIL phase 1: %0d outputs, %0d pending", out_cnt, exp_q.size());
    end
    n_pause = 0;

    // Phase 2: six more blocks with random pauses, then one block of flush;
    // this also pushes out the last block of phase 1.
    for (int b = 0; b < 7; b++)
      for (int i = 0; i < S; i++) begin
        while ($urandom_range(0, 3) == 0) idle();
        send(W'($urandom));
      end
    @(negedge clk) in_valid = 0;
    repeat (3) @(posedge clk);
    #2;
    checks++;
    if (out_cnt != 11 * S || exp_q.size() != S) begin
      failures++;
      $display("FAIL end: %0d outputs, %0d pending", out_cnt, exp_q.size());
    end

    $display("mechanisms: startup=%0d ram1_reads=%0d ram2_reads=%0d pauses=%0d latency=%0d",
             n_startup, n_from_ram1, n_from_ram2, n_pause, first_out_cycle - first_in_cycle);
    checks++;
    if (n_startup != S) begin
      failures++;
      $display("FAIL start-up suppression seen on %0d clocks", n_startup);
    end
    checks++;
    if (n_from_ram1 == 0 || n_from_ram2 == 0 || n_pause == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
