// tb_zz_mux: checks the read-data multiplexer with random data: q must be
// d1 when sel is high and d2 when sel is low.
module tb_zz_mux;
  localparam int W = 8;
  logic sel;
  logic [W-1:0] d1, d2, q;
  int checks = 0, failures = 0;

  zz_mux dut (.sel, .d1, .d2, .q);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 200; c++) begin
      sel = 1'(c % 2);
      d1 = W'($urandom);
      d2 = W'($urandom);
      #1;
      checks++;
      if (q !== (sel ? d1 : d2)) begin
        failures++;
        $display("FAIL sel=%0d d1=%0h d2=%0h q=%0h", sel, d1, d2, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
