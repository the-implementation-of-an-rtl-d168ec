// zz_pkg: constants and functions shared by the zigzag-scan blocks.
//
// The zigzag order walks an N x N coefficient block along its anti-diagonals,
// starting at the top-left (DC) coefficient and ending at the bottom-right one,
// reversing direction on every diagonal: diagonal 1 runs from top-right to
// bottom-left, diagonal 2 from bottom-left to top-right, and so on. This is
// the standard JPEG/MPEG scan. zz_position() gives, for the coefficient at
// (row, col), its index in that scan; the address ROM is filled from it at
// elaboration time, so no table of numbers is stored in the sources.
//
// Defaults follow the design: 8 x 8 blocks of 8-bit (byte) samples.
package zz_pkg;

  parameter int unsigned BLK_N_DEF  = 8;  // block is BLK_N_DEF x BLK_N_DEF
  parameter int unsigned DATA_W_DEF = 8;  // one byte per sample

  // Zigzag-scan index of the coefficient at (row, col) of an n x n block.
  // Elements on diagonals before d = row + col:
  //   d <  n : d(d+1)/2
  //   d >= n : n*n - (2n-1-d)(2n-d)/2
  // Inside an odd diagonal the scan goes down (row rising), inside an even
  // one it goes up (row falling).
  function automatic int unsigned zz_position(int unsigned n, int unsigned row,
                                              int unsigned col);
    int unsigned d, n_prev, rmin, rmax, off;
    d = row + col;
    if (d < n) n_prev = (d * (d + 1)) / 2;
    else       n_prev = n * n - ((2 * n - 1 - d) * (2 * n - d)) / 2;
    rmin = (d >= n) ? d - (n - 1) : 0;
    rmax = (d < n) ? d : n - 1;
    if (d % 2 == 1) off = row - rmin;
    else            off = rmax - row;
    return n_prev + off;
  endfunction

endpackage
