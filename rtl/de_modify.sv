// de_modify: diamond-encoding pixel modification.
//
// The modulus distance d = (s_dig - f) mod (2k^2+2k+1) selects one vector (a,b)
// of the diamond S_k = {(a,b) : |a|+|b| <= k}; the diamond holds exactly one
// vector for each distance, the one with ((2k+1)*a + b) mod (2k^2+2k+1) = d.
// The outputs are p' = p + a and q' = q + b, so F(p',q') = s_dig. The vector is
// found by comparing d with the constant value of each of the (2k+1)^2 diamond
// positions, which elaborates into a small constant decoder. The caller keeps the
// pixels inside [k, 2^PIX_W-1-k]. Purely combinational.
module de_modify
  import stego_pkg::*;
#(
  parameter int unsigned K = 2
) (
  input  pixel_t                             p,
  input  pixel_t                             q,
  input  logic [bits_for(de_radix(K))-1:0]   f,
  input  logic [bits_for(de_radix(K))-1:0]   s_dig,
  output pixel_t                             p_out,
  output pixel_t                             q_out
);
  localparam int unsigned N  = de_radix(K);
  localparam int unsigned DW = bits_for(N);

  logic [DW:0] d;
  pixel_t      da, db;   // two's-complement offsets, sign-extended to PIX_W

  always_comb begin
    d  = ((DW+1)'(s_dig) + (DW+1)'(N) - (DW+1)'(f)) % (DW+1)'(N);
    da = '0;
    db = '0;
    for (int a = -int'(K); a <= int'(K); a++) begin
      for (int b = -int'(K); b <= int'(K); b++) begin
        if (((a < 0 ? -a : a) + (b < 0 ? -b : b)) <= int'(K)) begin
          if (d == (DW+1)'((((2 * int'(K) + 1) * a + b) % int'(N) + int'(N)) % int'(N))) begin
            da = PIX_W'(a);
            db = PIX_W'(b);
          end
        end
      end
    end
    p_out = p + da;
    q_out = q + db;
  end
endmodule
