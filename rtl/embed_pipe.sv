// embed_pipe: the embedding (concealing) datapath.
//
// One group of NPIX = MX+MY+2 cover pixels and one L-bit secret block enter per
// valid cycle; the stego group leaves three cycles later. Pixels 0..MX-1 form
// group Q0, the next MY pixels Q1 and the last two the DE pair Q2 = (p,q). The
// secret block's low L1 bits are segment L1, the next L2 bits segment L2.
//   stage 1: the segments are searched in the x-y and z lookup tables (the tables
//            sit outside, connected through the key/result ports) giving S0, S1,
//            S2; pixels are limited to the range in which the change cannot wrap
//            (EMD pixels to [1, 254], the DE pair to [MZ, 255-MZ]).  -> register 1
//   stage 2: weighted-sum modulo functions F(Q0), F(Q1) and F_DE(p,q). -> register 2
//   stage 3: EMD modification of Q0 and Q1 and DE modification of Q2.  -> output register
// Registers 1 and 2 are the two sub-pipelining stages of the architecture (after the
// lookup tables and after the weighted-sum modulo functions); the output register and
// the pixel range limiting are this design's choices. out_miss flags a segment value
// that was not found in a table (the digit then defaults to 0). Full throughput: a new
// group may enter every cycle.
// xy_key and z_key are the two secret segments of the input, passed straight to the
// tables' search ports; the search results come back in the same cycle.
module embed_pipe
  import stego_pkg::*;
#(
  parameter int unsigned MX = MX_DEF,
  parameter int unsigned MY = MY_DEF,
  parameter int unsigned MZ = MZ_DEF,
  parameter int unsigned L1 = L1_DEF,
  parameter int unsigned L2 = L2_DEF,
  localparam int unsigned NPIX = MX + MY + 2,
  localparam int unsigned L    = L1 + L2,
  localparam int unsigned XW   = bits_for(emd_radix(MX)),
  localparam int unsigned YW   = bits_for(emd_radix(MY)),
  localparam int unsigned ZW   = bits_for(de_radix(MZ))
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  pixel_t [NPIX-1:0] in_pixels,
  input  logic [L-1:0]      in_secret,
  // lookup table search ports
  output logic [L1-1:0]     xy_key,
  input  logic [XW-1:0]     xy_sx,
  input  logic [YW-1:0]     xy_sy,
  input  logic              xy_hit,
  output logic [L2-1:0]     z_key,
  input  logic [ZW-1:0]     z_sdig,
  input  logic              z_hit,
  // stego group
  output logic              out_valid,
  output pixel_t [NPIX-1:0] out_pixels,
  output logic              out_miss,
  output logic              busy
);
  localparam pixel_t PMAX = '1;

  // ---- stage 1: lookup-table search and range limiting
  pixel_t [NPIX-1:0] lim;
  assign xy_key = in_secret[L1-1:0];
  assign z_key  = in_secret[L-1:L1];

  always_comb begin
    for (int unsigned i = 0; i < NPIX; i++) begin
      if (i < MX + MY) begin
        lim[i] = (in_pixels[i] == '0) ? pixel_t'(1) :
                 (in_pixels[i] == PMAX) ? PMAX - 1'b1 : in_pixels[i];
      end else begin
        lim[i] = (in_pixels[i] < pixel_t'(MZ)) ? pixel_t'(MZ) :
                 (in_pixels[i] > PMAX - pixel_t'(MZ)) ? PMAX - pixel_t'(MZ) : in_pixels[i];
      end
    end
  end

  logic              s1_valid, s1_miss;
  pixel_t [NPIX-1:0] s1_pix;
  logic [XW-1:0]     s1_s0;
  logic [YW-1:0]     s1_s1;
  logic [ZW-1:0]     s1_s2;

  always_ff @(posedge clk) begin
    if (!rst_n) s1_valid <= 1'b0;
    else        s1_valid <= in_valid;
    if (in_valid) begin
      s1_pix  <= lim;
      s1_s0   <= xy_hit ? xy_sx : '0;
      s1_s1   <= xy_hit ? xy_sy : '0;
      s1_s2   <= z_hit ? z_sdig : '0;
      s1_miss <= !(xy_hit && z_hit);
    end
  end

  // ---- stage 2: weighted-sum modulo functions
  logic [XW-1:0] f0;
  logic [YW-1:0] f1;
  logic [ZW-1:0] f2;

  emd_wsm #(.M(MX)) u_wsm0 (.g(s1_pix[MX-1:0]),       .f(f0));
  emd_wsm #(.M(MY)) u_wsm1 (.g(s1_pix[MX+MY-1:MX]),   .f(f1));
  de_fmod #(.K(MZ)) u_fde  (.p(s1_pix[NPIX-2]), .q(s1_pix[NPIX-1]), .f(f2));

  logic              s2_valid, s2_miss;
  pixel_t [NPIX-1:0] s2_pix;
  logic [XW-1:0]     s2_s0, s2_f0;
  logic [YW-1:0]     s2_s1, s2_f1;
  logic [ZW-1:0]     s2_s2, s2_f2;

  always_ff @(posedge clk) begin
    if (!rst_n) s2_valid <= 1'b0;
    else        s2_valid <= s1_valid;
    if (s1_valid) begin
      s2_pix  <= s1_pix;
      s2_s0   <= s1_s0;
      s2_s1   <= s1_s1;
      s2_s2   <= s1_s2;
      s2_f0   <= f0;
      s2_f1   <= f1;
      s2_f2   <= f2;
      s2_miss <= s1_miss;
    end
  end

  // ---- stage 3: pixel modification
  pixel_t [NPIX-1:0] mod;

  emd_modify #(.M(MX)) u_mod0 (.g(s2_pix[MX-1:0]), .f(s2_f0), .s_dig(s2_s0), .g_out(mod[MX-1:0]));
  emd_modify #(.M(MY)) u_mod1 (.g(s2_pix[MX+MY-1:MX]), .f(s2_f1), .s_dig(s2_s1),
                               .g_out(mod[MX+MY-1:MX]));
  de_modify  #(.K(MZ)) u_modz (.p(s2_pix[NPIX-2]), .q(s2_pix[NPIX-1]), .f(s2_f2), .s_dig(s2_s2),
                               .p_out(mod[NPIX-2]), .q_out(mod[NPIX-1]));

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= s2_valid;
    if (s2_valid) begin
      out_pixels <= mod;
      out_miss   <= s2_miss;
    end
  end

  assign busy = s1_valid || s2_valid;
endmodule
