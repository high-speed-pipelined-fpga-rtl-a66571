// de_fmod: diamond-encoding modulo function.
//
// F = ((2k+1)*p + q) mod (2k^2+2k+1) for a pixel pair (p,q). Used for the cover
// pair when embedding and for the stego pair when extracting (where F is the
// hidden digit). Purely combinational; the multiplier and modulus are constants.
module de_fmod
  import stego_pkg::*;
#(
  parameter int unsigned K = 2
) (
  input  pixel_t                             p,
  input  pixel_t                             q,
  output logic [bits_for(de_radix(K))-1:0]   f
);
  localparam int unsigned N  = de_radix(K);
  localparam int unsigned SW = PIX_W + $clog2(2 * K + 2) + 1;

  logic [SW-1:0] lin;

  always_comb begin
    lin = SW'(2 * K + 1) * SW'(p) + SW'(q);
    f   = $bits(f)'(lin % SW'(N));
  end
endmodule
