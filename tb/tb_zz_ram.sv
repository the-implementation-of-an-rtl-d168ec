// tb_zz_ram: checks one block buffer against an array model.
//
// Random writes and reads (each enabled about half the time, sometimes to the
// same address in one clock) are applied; rdata must equal the model's word
// at raddr as it was before the clock edge, and must hold when re is low.
module tb_zz_ram;
  localparam int W = 8;
  localparam int D = 64;

  logic clk = 0, we = 0, re = 0;
  logic [5:0] waddr = 0, raddr = 0;
  logic [W-1:0] wdata = 0, rdata;
  logic [W-1:0] model [D];
  logic [W-1:0] expect_q;
  int checks = 0, failures = 0;

  zz_ram dut (.clk, .we, .waddr, .wdata, .re, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Fill every word first so that all reads are of known data.
    for (int a = 0; a < D; a++) begin
      @(negedge clk);
      we = 1; waddr = 6'(a); wdata = W'($urandom); model[a] = wdata;
    end
    @(negedge clk);
    we = 0; re = 1; raddr = 0;
    @(posedge clk); #1;
    expect_q = model[0];
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      we    = $urandom_range(0, 1) == 1;
      re    = $urandom_range(0, 1) == 1;
      waddr = 6'($urandom);
      raddr = (c % 7 == 0) ? waddr : 6'($urandom);
      wdata = W'($urandom);
      @(posedge clk);
      if (re) expect_q = model[raddr];
      if (we) model[waddr] = wdata;
      #1;
      checks++;
      if (rdata != expect_q) begin
        failures++;
        $display("FAIL cycle %0d: rdata=%0h expected %0h", c, rdata, expect_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
