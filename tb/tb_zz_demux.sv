// tb_zz_demux: checks the write-strobe demultiplexer on all four input
// combinations: we1 = we and not se, we2 = we and se.
module tb_zz_demux;
  logic we, se, we1, we2;
  int checks = 0, failures = 0;

  zz_demux dut (.we, .se, .we1, .we2);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {we, se} = 2'(v);
      #1;
      checks++;
      if (we1 !== (v == 2) || we2 !== (v == 3)) begin
        failures++;
        $display("FAIL we=%0d se=%0d: we1=%0d we2=%0d", we, se, we1, we2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
