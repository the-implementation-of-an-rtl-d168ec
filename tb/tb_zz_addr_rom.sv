// tb_zz_addr_rom: checks the zigzag address ROM at its default 8 x 8 size.
//
// The reference is the JPEG zigzag sequence, written out as the raster index
// of each scan position (position k holds raster sample JPEG_ZZ[k]). For
// every k the ROM must map raster index JPEG_ZZ[k] to address k; the test
// also checks that the ROM is a permutation of 0..63.
module tb_zz_addr_rom;
  localparam int N = 8;
  localparam int S = N * N;

  localparam int JPEG_ZZ [S] = '{
     0,  1,  8, 16,  9,  2,  3, 10, 17, 24, 32, 25, 18, 11,  4,  5,
    12, 19, 26, 33, 40, 48, 41, 34, 27, 20, 13,  6,  7, 14, 21, 28,
    35, 42, 49, 56, 57, 50, 43, 36, 29, 22, 15, 23, 30, 37, 44, 51,
    58, 59, 52, 45, 38, 31, 39, 46, 53, 60, 61, 54, 47, 55, 62, 63};

  logic [5:0] idx, addr;
  int checks = 0, failures = 0;
  bit seen [S];

  zz_addr_rom dut (.idx, .addr);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (seen[i]) seen[i] = 0;
    for (int k = 0; k < S; k++) begin
      idx = 6'(JPEG_ZZ[k]);
      #1;
      checks++;
      if (addr != 6'(k)) begin
        failures++;
        $display("FAIL raster %0d: addr %0d, expected %0d", JPEG_ZZ[k], addr, k);
      end
    end
    for (int i = 0; i < S; i++) begin
      idx = 6'(i);
      #1;
      seen[addr] = 1;
    end
    for (int i = 0; i < S; i++) begin
      checks++;
      if (!seen[i]) begin
        failures++;
        $display("FAIL address %0d never produced", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
