// emd_wsm: EMD weighted-sum modulo function.
//
// For an m-pixel group g_1..g_m it computes F = (sum_{i=1..m} i*g_i) mod (2m+1).
// The same function serves embedding (F of the cover group) and extraction
// (the hidden digit E of the stego group). Pixel g_1 is g[0]. Purely
// combinational; the modulus is a constant, so it reduces to a small LUT tree.
module emd_wsm
  import stego_pkg::*;
#(
  parameter int unsigned M = 2
) (
  input  pixel_t [M-1:0]                     g,
  output logic [bits_for(emd_radix(M))-1:0]  f
);
  localparam int unsigned R  = emd_radix(M);
  localparam int unsigned SW = PIX_W + $clog2(M * (M + 1) / 2 + 1) + 1;

  logic [SW-1:0] sum;

  always_comb begin
    sum = '0;
    for (int unsigned i = 0; i < M; i++)
      sum += SW'(i + 1) * SW'(g[i]);
    f = $bits(f)'(sum % SW'(R));
  end
endmodule
