// zz_addr_rom: zigzag address generator ("addr_tls" ROM).
//
// For the sample with raster index idx (row-major, idx = row*N + col) of an
// N x N block, addr is the position that sample takes in the zigzag scan.
// Writing sample idx to RAM address addr and later reading the RAM at
// addresses 0, 1, 2, ... yields the block in zigzag order, with no
// comparisons or arithmetic on the data path: this is the mapping method.
//
// The ROM contents are computed at elaboration from zz_pkg::zz_position, so
// the ROM is a constant array indexed by idx. The lookup is purely
// combinational (a LUT ROM); it sits in front of the RAM write port.
//
// The ROM as address generator, indexed by the sample counter, is the
// original design's; computing its contents from a formula and reading it
// combinationally are choices made here.
//
// Ports: idx (IDX_W bits) in, addr (IDX_W bits) out. No clock.
module zz_addr_rom #(
  parameter int unsigned N     = zz_pkg::BLK_N_DEF,
  parameter int unsigned IDX_W = $clog2(N * N)
) (
  input  logic [IDX_W-1:0] idx,
  output logic [IDX_W-1:0] addr
);

  typedef logic [N*N-1:0][IDX_W-1:0] rom_t;

  function automatic rom_t build_rom();
    rom_t r;
    for (int unsigned k = 0; k < N * N; k++)
      r[k] = IDX_W'(zz_pkg::zz_position(N, k / N, k % N));
    return r;
  endfunction

  localparam rom_t ROM = build_rom();

  always_comb addr = ROM[idx];

endmodule
