// group_shift_reg: the mode-controlled shift register between the input FIFO and
// the datapaths.
//
// Bytes read from the FIFO are shifted in one per cycle. A record is
//   embed mode:   SECB secret bytes (little-endian, low L bits used), then NPIX pixels
//   extract mode: NPIX stego pixels
// When the last byte of a record is shifted in, the whole record is copied into the
// group register and grp_valid pulses for one cycle in the next cycle; the shift
// register carries straight on with the next record, so back-to-back records cost
// one cycle per byte. A partial record is kept across FIFO blocks; clear drops it
// (used when the mode changes). The record layout is this design's choice.
module group_shift_reg
  import stego_pkg::*;
#(
  parameter int unsigned NPIX = MX_DEF + MY_DEF + 2,
  parameter int unsigned L    = L1_DEF + L2_DEF,
  localparam int unsigned SECB = (L + 7) / 8,
  localparam int unsigned RMAX = SECB + NPIX,
  localparam int unsigned CW   = bits_for(RMAX + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  mode_e             mode,
  input  logic              in_valid,
  input  logic [7:0]        in_byte,
  output logic              grp_valid,
  output mode_e             grp_mode,
  output pixel_t [NPIX-1:0] grp_pixels,
  output logic [L-1:0]      grp_secret
);
  logic [RMAX-2:0][7:0] sr;        // sr[0] is the newest byte held
  logic [RMAX-1:0][7:0] sr_nxt;
  logic [CW-1:0]        cnt;       // bytes of the current record already held
  logic [CW-1:0]        rlen;
  logic [CW-1:0]        secb;
  logic                 last;

  assign secb   = (mode == MODE_EMBED) ? CW'(SECB) : '0;
  assign rlen   = secb + CW'(NPIX);
  assign sr_nxt = {sr, in_byte};
  assign last   = in_valid && (cnt == rlen - 1'b1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt       <= '0;
      grp_valid <= 1'b0;
      grp_mode  <= MODE_EMBED;
    end else begin
      grp_valid <= last && !clear;
      if (clear)         cnt <= '0;
      else if (last)     cnt <= '0;
      else if (in_valid) cnt <= cnt + 1'b1;
      if (last) grp_mode <= mode;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) sr <= sr_nxt[RMAX-2:0];
    if (last) begin
      // record byte j sits at sr_nxt[rlen-1-j]
      for (int unsigned j = 0; j < NPIX; j++)
        grp_pixels[j] <= sr_nxt[32'(rlen) - 1 - (32'(secb) + j)];
      grp_secret <= '0;
      if (mode == MODE_EMBED) begin
        for (int unsigned b = 0; b < SECB; b++)
          for (int unsigned k = 0; k < 8; k++)
            if (b * 8 + k < L) grp_secret[b * 8 + k] <= sr_nxt[32'(rlen) - 1 - b][k];
      end
    end
  end
endmodule
