// extract_pipe: the recovery (extracting) datapath.
//
// One stego group of NPIX = MX+MY+2 pixels enters per valid cycle; the recovered
// L-bit secret block leaves two cycles later.
//   stage 1: the weighted-sum modulo functions give the hidden digits
//            S0 = F(Q0), S1 = F(Q1) and S2 = F_DE(p,q).            -> register
//   stage 2: the x-y table is read at (S0,S1) for segment L1 and the z table at S2
//            for segment L2 (tables outside, through the read ports). -> output register
// out_secret = {L2 segment, L1 segment}; out_miss flags a digit that points at an
// invalid table cell. A new group may enter every cycle.
module extract_pipe
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
  // lookup table read ports
  output logic [XW-1:0]     xy_rx,
  output logic [YW-1:0]     xy_ry,
  input  logic [L1-1:0]     xy_rvalue,
  input  logic              xy_rhit,
  output logic [ZW-1:0]     z_rdig,
  input  logic [L2-1:0]     z_rvalue,
  input  logic              z_rhit,
  // recovered block
  output logic              out_valid,
  output logic [L-1:0]      out_secret,
  output logic              out_miss,
  output logic              busy
);
  logic [XW-1:0] f0;
  logic [YW-1:0] f1;
  logic [ZW-1:0] f2;

  emd_wsm #(.M(MX)) u_wsm0 (.g(in_pixels[MX-1:0]),     .f(f0));
  emd_wsm #(.M(MY)) u_wsm1 (.g(in_pixels[MX+MY-1:MX]), .f(f1));
  de_fmod #(.K(MZ)) u_fde  (.p(in_pixels[NPIX-2]), .q(in_pixels[NPIX-1]), .f(f2));

  logic s1_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) s1_valid <= 1'b0;
    else        s1_valid <= in_valid;
    if (in_valid) begin
      xy_rx  <= f0;
      xy_ry  <= f1;
      z_rdig <= f2;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= s1_valid;
    if (s1_valid) begin
      out_secret <= {z_rvalue, xy_rvalue};
      out_miss   <= !(xy_rhit && z_rhit);
    end
  end

  assign busy = s1_valid;
endmodule
