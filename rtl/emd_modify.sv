// emd_modify: EMD pixel modification.
//
// Given an m-pixel group g (g_1 = g[0]), its weighted-sum value f and the secret
// digit s_dig in the (2m+1)-ary system, it forms the difference
// s = (s_dig - f) mod (2m+1) and changes at most one pixel by one:
//   s = 0      -> no change
//   s <= m     -> g_s is incremented
//   s >  m     -> g_(2m+1-s) is decremented
// after which the weighted sum of the result equals s_dig. The caller keeps the
// pixels inside [1, 2^PIX_W-2] so the change never wraps. Purely combinational.
module emd_modify
  import stego_pkg::*;
#(
  parameter int unsigned M = 2
) (
  input  pixel_t [M-1:0]                     g,
  input  logic [bits_for(emd_radix(M))-1:0]  f,
  input  logic [bits_for(emd_radix(M))-1:0]  s_dig,
  output pixel_t [M-1:0]                     g_out
);
  localparam int unsigned R  = emd_radix(M);
  localparam int unsigned DW = bits_for(R);

  logic [DW:0] s;

  always_comb begin
    s     = ((DW+1)'(s_dig) + (DW+1)'(R) - (DW+1)'(f)) % (DW+1)'(R);
    g_out = g;
    for (int unsigned i = 1; i <= M; i++) begin
      if (s == (DW+1)'(i))         g_out[i-1] = g[i-1] + 1'b1;
      if (s == (DW+1)'(R - i))     g_out[i-1] = g[i-1] - 1'b1;
    end
  end
endmodule
