// ii_pkg: sizes shared by the two-row integral image core.
//
// The core computes ii(x,y), the sum of all pixels i(x',y') with x' <= x and
// y' <= y, for a small gray image held on chip. The defaults below are the
// largest configuration the design targets: a 10 x 10 image of 8-bit pixels,
// whose integral values need 15 bits (10*10*255 = 25500 < 2**15).
// ii_bits() gives the word width any other size needs.
package ii_pkg;

  localparam int unsigned MAX_DIM_DEF = 10;  // largest height and width
  localparam int unsigned PIX_W_DEF   = 8;   // gray pixel, 0..255
  localparam int unsigned II_W_DEF    = 15;  // integral value word

  // Bits needed to hold the sum of m*n pixels of pix_w bits each.
  function automatic int unsigned ii_bits(int unsigned m, int unsigned n,
                                          int unsigned pix_w);
    longint unsigned maxv;
    maxv = longint'(m) * longint'(n) * ((longint'(1) << pix_w) - 1);
    return $clog2(maxv + 1);
  endfunction

endpackage
