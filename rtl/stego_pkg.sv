// stego_pkg: shared constants and types of the modulus-based steganography core.
//
// The scheme splits each L-bit secret block into an L1-bit segment, carried as two
// EMD digits (S0 in a (2*MX+1)-ary system over MX pixels, S1 in a (2*MY+1)-ary system
// over MY pixels), and an L2-bit segment, carried as one diamond-encoding digit S2 in a
// (2*MZ^2+2*MZ+1)-ary system over a pixel pair (p,q). The defaults are the main
// configuration of the scheme: MX = MY = MZ = 2, L1 = 4, L2 = 3, so a 7-bit block is
// hidden in 6 pixels. The 8-bit pixel width is this design's choice (grey images).
package stego_pkg;
  localparam int unsigned PIX_W   = 8;
  localparam int unsigned MX_DEF  = 2;
  localparam int unsigned MY_DEF  = 2;
  localparam int unsigned MZ_DEF  = 2;
  localparam int unsigned L1_DEF  = 4;
  localparam int unsigned L2_DEF  = 3;

  typedef logic [PIX_W-1:0] pixel_t;

  // Operating mode, selected by the Mode input of the core.
  typedef enum logic {
    MODE_EMBED   = 1'b0,   // conceal secret data into cover pixels
    MODE_EXTRACT = 1'b1    // recover secret data from stego pixels
  } mode_e;

  // Radix of an EMD digit for an m-pixel group.
  function automatic int unsigned emd_radix(int unsigned m);
    return 2 * m + 1;
  endfunction

  // Radix of a diamond-encoding digit for parameter k.
  function automatic int unsigned de_radix(int unsigned k);
    return 2 * k * k + 2 * k + 1;
  endfunction

  // Bits needed to hold values 0 .. n-1 (at least 1).
  function automatic int unsigned bits_for(int unsigned n);
    return (n <= 2) ? 1 : $clog2(n);
  endfunction
endpackage
