// stego_core: pipelined steganography IP core (embedding and recovery).
//
// The core hides L = L1+L2 secret bits in every group of NPIX = MX+MY+2 pixels of
// a cover image: segment L1 becomes two EMD digits (S0,S1) through the x-y
// coordinate table, segment L2 one diamond-encoding digit S2 through the z
// table; Q0 (MX pixels) and Q1 (MY pixels) carry S0 and S1 by EMD, the pair Q2
// carries S2 by diamond encoding. Recovery reverses it.
//
// Data flow: host bytes -> input FIFO -> shift register (record assembly by mode)
//   -> embedding pipeline (table search | reg | weighted-sum modulo | reg | modify | reg)
//   or recovery pipeline (weighted-sum modulo | reg | table read | reg) -> outputs.
// The controller starts a block when the FIFO is full, raises busy_irq while the
// block is processed and reads the FIFO one byte per cycle, so the core consumes
// 8 bits per clock.
//
// Interface: bytes are written with wr_en/wr_data while wr_ready is high. Embed
// records are SECB = ceil(L/8) secret bytes (little-endian) followed by the NPIX
// cover pixels; extract records are the NPIX stego pixels. Results appear with
// out_valid: out_pixels (embed) or out_secret (extract), no back-pressure. The tables
// are written between blocks through tbl_* (tbl_sel 0 = x-y cell y*(2MX+1)+x,
// 1 = z digit); reset loads the default layouts.
// Timing: with the default FIFO depth and an empty pipeline, the first stego group of
// a block is valid 13 cycles after the cycle in which the byte that fills the FIFO is
// written (1 cycle to see full, 1 to start reading, 7 bytes of the first record,
// group register, two sub-pipelining registers, output register).
module stego_core
  import stego_pkg::*;
#(
  parameter int unsigned MX         = MX_DEF,
  parameter int unsigned MY         = MY_DEF,
  parameter int unsigned MZ         = MZ_DEF,
  parameter int unsigned L1         = L1_DEF,
  parameter int unsigned L2         = L2_DEF,
  parameter int unsigned FIFO_DEPTH = 2048,
  localparam int unsigned NPIX = MX + MY + 2,
  localparam int unsigned L    = L1 + L2,
  localparam int unsigned TW   = (L1 > L2) ? L1 : L2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  mode_e             mode,
  // byte stream from memory
  input  logic              wr_en,
  input  logic [7:0]        wr_data,
  output logic              wr_ready,
  output logic              busy_irq,
  // lookup table construction
  input  logic              tbl_we,
  input  logic              tbl_sel,
  input  logic [7:0]        tbl_addr,
  input  logic              tbl_valid,
  input  logic [TW-1:0]     tbl_value,
  // results
  output logic              out_valid,
  output mode_e             out_mode,
  output pixel_t [NPIX-1:0] out_pixels,
  output logic [L-1:0]      out_secret,
  output logic              out_miss
);
  localparam int unsigned XW  = bits_for(emd_radix(MX));
  localparam int unsigned YW  = bits_for(emd_radix(MY));
  localparam int unsigned ZW  = bits_for(de_radix(MZ));
  localparam int unsigned XYA = bits_for(emd_radix(MX) * emd_radix(MY));

  // ---- input FIFO
  logic       f_full, f_empty, f_rd_en, f_rd_valid;
  logic [7:0] f_rd_data;

  assign wr_ready = !busy_irq && !f_full;

  sync_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .wr_en(wr_en && wr_ready), .wr_data,
    .rd_en(f_rd_en), .rd_data(f_rd_data), .rd_valid(f_rd_valid),
    .full(f_full), .empty(f_empty), .count());

  // ---- controller
  mode_e mode_q;
  logic  sr_clear, tbl_ok, pipe_busy;

  stego_ctrl u_ctrl (
    .clk, .rst_n, .mode_in(mode), .fifo_full(f_full), .fifo_empty(f_empty),
    .pipe_busy, .busy_irq, .rd_en(f_rd_en), .mode_q, .sr_clear, .tbl_ok);

  // ---- shift register
  logic              g_valid;
  mode_e             g_mode;
  pixel_t [NPIX-1:0] g_pixels;
  logic [L-1:0]      g_secret;

  group_shift_reg #(.NPIX(NPIX), .L(L)) u_sr (
    .clk, .rst_n, .clear(sr_clear), .mode(mode_q),
    .in_valid(f_rd_valid), .in_byte(f_rd_data),
    .grp_valid(g_valid), .grp_mode(g_mode), .grp_pixels(g_pixels), .grp_secret(g_secret));

  // ---- lookup tables
  logic [L1-1:0] xy_key, xy_rvalue;
  logic [XW-1:0] xy_sx, xy_rx;
  logic [YW-1:0] xy_sy, xy_ry;
  logic          xy_hit, xy_rhit;
  logic [L2-1:0] z_key, z_rvalue;
  logic [ZW-1:0] z_sdig, z_rdig;
  logic          z_hit, z_rhit;

  xy_lut #(.MX(MX), .MY(MY), .L1(L1)) u_xy (
    .clk, .rst_n,
    .we(tbl_we && tbl_ok && !tbl_sel), .waddr(tbl_addr[XYA-1:0]),
    .wvalid(tbl_valid), .wvalue(tbl_value[L1-1:0]),
    .key(xy_key), .sx(xy_sx), .sy(xy_sy), .shit(xy_hit),
    .rx(xy_rx), .ry(xy_ry), .rvalue(xy_rvalue), .rhit(xy_rhit));

  z_lut #(.MZ(MZ), .L2(L2)) u_z (
    .clk, .rst_n,
    .we(tbl_we && tbl_ok && tbl_sel), .waddr(tbl_addr[ZW-1:0]),
    .wvalid(tbl_valid), .wvalue(tbl_value[L2-1:0]),
    .key(z_key), .sdig(z_sdig), .shit(z_hit),
    .rdig(z_rdig), .rvalue(z_rvalue), .rhit(z_rhit));

  // ---- datapaths
  logic              e_valid, e_miss, e_busy;
  pixel_t [NPIX-1:0] e_pixels;
  logic              x_valid, x_miss, x_busy;
  logic [L-1:0]      x_secret;

  embed_pipe #(.MX(MX), .MY(MY), .MZ(MZ), .L1(L1), .L2(L2)) u_embed (
    .clk, .rst_n,
    .in_valid(g_valid && g_mode == MODE_EMBED), .in_pixels(g_pixels), .in_secret(g_secret),
    .xy_key, .xy_sx, .xy_sy, .xy_hit, .z_key, .z_sdig, .z_hit,
    .out_valid(e_valid), .out_pixels(e_pixels), .out_miss(e_miss), .busy(e_busy));

  extract_pipe #(.MX(MX), .MY(MY), .MZ(MZ), .L1(L1), .L2(L2)) u_extract (
    .clk, .rst_n,
    .in_valid(g_valid && g_mode == MODE_EXTRACT), .in_pixels(g_pixels),
    .xy_rx, .xy_ry, .xy_rvalue, .xy_rhit, .z_rdig, .z_rvalue, .z_rhit,
    .out_valid(x_valid), .out_secret(x_secret), .out_miss(x_miss), .busy(x_busy));

  assign pipe_busy = f_rd_valid || g_valid || e_busy || x_busy;

  // ---- result merge (the two pipelines never deliver in the same cycle)
  always_comb begin
    out_valid  = e_valid || x_valid;
    out_mode   = x_valid ? MODE_EXTRACT : MODE_EMBED;
    out_pixels = e_pixels;
    out_secret = x_secret;
    out_miss   = x_valid ? x_miss : e_miss;
  end

  a_one_result: assert property (@(posedge clk) disable iff (!rst_n) !(e_valid && x_valid))
    else $error("embedding and recovery results in the same cycle");
endmodule
