// oup_pkg: sizes, encodings and helper functions shared by the 8-phase and the
// 256-phase beam-steering processors.
//
// Both processors address a 1024 x 1024 pixel array split into four 512 x 512
// blocks. A 17-bit address is divided into a 2-bit block field, a 9-bit row
// field and a 6-bit column field; one column address covers a word of eight
// adjacent pixels. These numbers follow the published organisation; the split
// of a column word into eight pixels is derived from the 24-bit data bus of the
// 8-phase chip (24 bits / 3 bits per pixel).
//
// The 256-phase processor keeps a per-pixel phase code in Gray code and compares
// it with a Gray-coded frame count broadcast from one global circuit, so only a
// single line of that array-wide bus toggles per global clock.
package oup_pkg;

  // Array organisation
  localparam int unsigned BLOCK_BITS = 2;   // block select field
  localparam int unsigned CHIP_ROW_BITS  = 9;   // row field of the full chip (512 rows per block)
  localparam int unsigned CHIP_COL_BITS  = 6;   // column field of the full chip (64 words per row)
  localparam int unsigned PIX_PER_WORD = 8; // pixels per column word
  localparam int unsigned ADDR_BITS  = BLOCK_BITS + CHIP_ROW_BITS + CHIP_COL_BITS; // 17

  // 8-phase pixel: three SRAM bits select one of eight phase lines
  localparam int unsigned P8_BITS   = 3;
  localparam int unsigned P8_PHASES = 8;

  // n-phase pixel: 8-bit phase code, 256 levels, 256 global clocks per frame
  localparam int unsigned PN_BITS   = 8;

  // Binary to reflected Gray code
  function automatic logic [PN_BITS-1:0] bin2gray(input logic [PN_BITS-1:0] b);
    return b ^ (b >> 1);
  endfunction

  // Reflected Gray code to binary
  function automatic logic [PN_BITS-1:0] gray2bin(input logic [PN_BITS-1:0] g);
    logic [PN_BITS-1:0] b;
    b[PN_BITS-1] = g[PN_BITS-1];
    for (int i = PN_BITS - 2; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

endpackage
