// image_run: workload harness shared by the image testbenches. It embeds a full
// W x H synthetic 8-bit image at full payload through stego_core, feeds the stego
// image back in extract mode and reports the results to the wrapping testbench.
// The image is a smooth diagonal ramp with noise and two saturated bands (rows at
// 0 and at 255). Every group of NPIX = MX+MY+2 pixels, in raster order, carries one
// random L-bit block; leftover pixels at the end of the image are left untouched,
// and the last FIFO block of each pass is padded with zero bytes. It measures:
//   ber_bits  - recovered bits that differ from the embedded ones
//   psnr_db   - 10 log10(255^2 / MSE) of stego against cover
//   emb_cycles - clock cycles from the first busy interrupt to the last stego group
//   busy_cycles - cycles of the embed pass with the busy interrupt high (the host
//                 fills the FIFO in the remaining cycles)
//   checks/failures - group counts, bit errors, per-pixel distance limits
module image_run
  import stego_pkg::*;
#(
  parameter int unsigned MX = 2,
  parameter int unsigned MY = 2,
  parameter int unsigned MZ = 2,
  parameter int unsigned L1 = 4,
  parameter int unsigned L2 = 3,
  parameter int unsigned W  = 512,
  parameter int unsigned H  = 512
) (
  output logic done,
  output int   checks,
  output int   failures,
  output int   ber_bits,
  output int   groups,
  output int   emb_cycles,
  output int   busy_cycles,
  output int   limited,
  output real  psnr_db
);
  localparam int NPIX  = MX + MY + 2;
  localparam int L     = L1 + L2;
  localparam int SECB  = (L + 7) / 8;
  localparam int NG    = (W * H) / NPIX;
  localparam int DEPTH = 2048;
  localparam int TW    = (L1 > L2) ? L1 : L2;

  logic            clk = 0, rst_n = 0;
  mode_e           mode = MODE_EMBED;
  logic            wr_en = 0;
  logic [7:0]      wr_data = '0;
  logic            wr_ready, busy_irq, out_valid, out_miss;
  mode_e           out_mode;
  pixel_t [NPIX-1:0] out_pixels;
  logic [L-1:0]    out_secret;

  always #5 clk = ~clk;

  stego_core #(.MX(MX), .MY(MY), .MZ(MZ), .L1(L1), .L2(L2)) dut (
    .clk, .rst_n, .mode, .wr_en, .wr_data, .wr_ready, .busy_irq,
    .tbl_we(1'b0), .tbl_sel(1'b0), .tbl_addr(8'd0), .tbl_valid(1'b0), .tbl_value(TW'(0)),
    .out_valid, .out_mode, .out_pixels, .out_secret, .out_miss);

  pixel_t       img[W * H];
  pixel_t       stg[W * H];
  logic [L-1:0] sec[NG];
  int           n_out = 0, cycle = 0, first_busy = -1, last_out = 0;

  always @(posedge clk) cycle++;

  always @(negedge clk) if (rst_n) begin
    if (busy_irq && first_busy < 0) first_busy = cycle;
    if (busy_irq && mode == MODE_EMBED) busy_cycles++;
    if (out_valid && out_mode == MODE_EMBED) begin
      if (n_out < NG) begin
        for (int i = 0; i < NPIX; i++) stg[n_out * NPIX + i] = out_pixels[i];
        last_out = cycle;
      end
      n_out++;
    end
    if (out_valid && out_mode == MODE_EXTRACT) begin
      if (n_out < NG) begin
        for (int b = 0; b < L; b++) if (out_secret[b] != sec[n_out][b]) ber_bits++;
        if (out_miss) failures++;
      end
      n_out++;
    end
  end

  int bytes_in = 0;
  task automatic push_byte(input logic [7:0] b);
    wr_en = 1; wr_data = b;
    while (!wr_ready) @(negedge clk);
    @(negedge clk);
    wr_en = 0;
    bytes_in++;
  endtask

  task automatic pad_and_wait(input int expect_groups);
    while (bytes_in % DEPTH != 0) push_byte(8'h00);
    while (n_out < expect_groups) @(negedge clk);
    while (busy_irq) @(negedge clk);
  endtask

  function automatic int lim(int v, int k); return v < k ? k : (v > 255 - k ? 255 - k : v); endfunction

  initial begin
    real sq;
    int  d, c, rec;
    done = 0; checks = 0; failures = 0; ber_bits = 0; limited = 0; groups = NG;
    busy_cycles = 0;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        if (y >= H / 8 && y < H / 8 + H / 32)       img[y * W + x] = 8'd0;
        else if (y >= H / 2 && y < H / 2 + H / 32)  img[y * W + x] = 8'd255;
        else img[y * W + x] = pixel_t'(((x + 2 * y) * 255) / (W + 2 * H) + ($urandom % 7) - 3);
        stg[y * W + x] = img[y * W + x];
      end
    for (int g = 0; g < NG; g++) sec[g] = L'({$urandom, $urandom});

    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // embed pass
    mode = MODE_EMBED;
    for (int g = 0; g < NG; g++) begin
      for (int b = 0; b < SECB; b++) push_byte(8'(sec[g] >> (8 * b)));
      for (int i = 0; i < NPIX; i++) push_byte(img[g * NPIX + i]);
    end
    rec = (bytes_in + DEPTH - 1) / DEPTH * DEPTH / (SECB + NPIX);
    pad_and_wait(rec);
    emb_cycles = last_out - first_busy;
    checks++;
    if (n_out != rec) begin
      failures++;
      $display("FAIL embed pass: %0d groups out, expected %0d", n_out, rec);
    end

    // distance limits and PSNR
    sq = 0.0;
    for (int g = 0; g < NG; g++) begin
      int dde;
      dde = 0;
      for (int i = 0; i < NPIX; i++) begin
        c = lim(int'(img[g * NPIX + i]), i < MX + MY ? 1 : MZ);
        if (c != int'(img[g * NPIX + i])) limited++;
        d = int'(stg[g * NPIX + i]) - c;
        if (i < MX + MY && (d > 1 || d < -1)) failures++;
        if (i >= MX + MY) dde += (d < 0) ? -d : d;
      end
      if (dde > MZ) failures++;
      checks++;
    end
    for (int p = 0; p < W * H; p++) begin
      d = int'(stg[p]) - int'(img[p]);
      sq += real'(d * d);
    end
    psnr_db = 10.0 * $log10(255.0 * 255.0 / (sq / real'(W * H)));

    // extract pass
    n_out = 0;
    bytes_in = 0;
    mode = MODE_EXTRACT;
    for (int g = 0; g < NG; g++)
      for (int i = 0; i < NPIX; i++) push_byte(stg[g * NPIX + i]);
    rec = (bytes_in + DEPTH - 1) / DEPTH * DEPTH / NPIX;
    pad_and_wait(rec);
    checks++;
    if (n_out < NG) begin
      failures++;
      $display("FAIL extract pass: %0d groups out", n_out);
    end
    checks++;
    if (ber_bits != 0) failures++;
    done = 1;
  end
endmodule
