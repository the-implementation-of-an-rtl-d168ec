// tb_zz_pkg: checks zz_pkg::zz_position directly.
//
// For 8 x 8 it is compared with the JPEG zigzag sequence (JPEG_ZZ[k] is the
// raster index at scan position k). For block sides 2 to 16 it is compared
// with an independent walk that moves a row/column cursor along the
// anti-diagonals and bounces off the block edges.
module tb_zz_pkg;
  localparam int JPEG_ZZ [64] = '{
     0,  1,  8, 16,  9,  2,  3, 10, 17, 24, 32, 25, 18, 11,  4,  5,
    12, 19, 26, 33, 40, 48, 41, 34, 27, 20, 13,  6,  7, 14, 21, 28,
    35, 42, 49, 56, 57, 50, 43, 36, 29, 22, 15, 23, 30, 37, 44, 51,
    58, 59, 52, 45, 38, 31, 39, 46, 53, 60, 61, 54, 47, 55, 62, 63};

  int checks = 0, failures = 0;

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned p;
    for (int k = 0; k < 64; k++) begin
      p = zz_pkg::zz_position(8, JPEG_ZZ[k] / 8, JPEG_ZZ[k] % 8);
      checks++;
      if (p != k) begin
        failures++;
        $display("FAIL 8x8 raster %0d: position %0d, expected %0d", JPEG_ZZ[k], p, k);
      end
    end
    for (int n = 2; n <= 16; n++) begin
      int r, c;
      bit up;
      r = 0;
      c = 0;
      up = 1;
      for (int k = 0; k < n * n; k++) begin
        p = zz_pkg::zz_position(n, r, c);
        checks++;
        if (p != k) begin
          failures++;
          $display("FAIL %0dx%0d (%0d,%0d): position %0d, expected %0d", n, n, r, c, p, k);
        end
        if (up) begin
          if (c == n - 1)  begin r++; up = 0; end
          else if (r == 0) begin c++; up = 0; end
          else             begin r--; c++; end
        end else begin
          if (r == n - 1)  begin c++; up = 1; end
          else if (c == 0) begin r++; up = 1; end
          else             begin r++; c--; end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
