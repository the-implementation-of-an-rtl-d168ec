// tb_zz_counter: checks the sample counter and bank select.
//
// adv is driven at random (about 80% high). A reference model counts
// accepted samples; after every clock idx must equal count mod 64, se must
// equal (count / 64) mod 2 and full must be set once count reaches 64. The
// test also checks that a wrap takes exactly 64 advancing clocks.
module tb_zz_counter;
  localparam int N = 8;
  localparam int S = N * N;

  logic clk = 0, rst_n = 0, adv = 0;
  logic [5:0] idx;
  logic se, full;
  int checks = 0, failures = 0;
  int count = 0, wraps = 0;

  zz_counter dut (.clk, .rst_n, .adv, .idx, .se, .full);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_state();
    checks++;
    if (idx != 6'(count % S) || se != 1'((count / S) % 2) || full != (count >= S)) begin
      failures++;
      $display("FAIL count=%0d: idx=%0d se=%0d full=%0d", count, idx, se, full);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 check_state();
    rst_n = 1;
    for (int c = 0; c < 1200; c++) begin
      @(negedge clk);
      adv = ($urandom_range(0, 9) < 8);
      @(posedge clk);
      #1;
      if (adv) begin
        count++;
        if (count % S == 0) wraps++;
      end
      check_state();
    end
    checks++;
    if (wraps < 3) begin
      failures++;
      $display("FAIL only %0d wraps", wraps);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
