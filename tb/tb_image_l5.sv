// tb_image_l5: the L1 = 5, L2 = 5 configuration (10-bit blocks) on a 512 x 512
// image at full payload. The x-y table needs at least 32 cells and the diamond
// pattern at least 32 digits, so MX = MY = 3 (7 x 7 = 49 cells) and MZ = 4 (41
// digits) are used: 10 bits per 8 pixels, two secret bytes per record. Requires
// bit-exact recovery and a PSNR above 40 dB, and reports rate, PSNR and timing.
module tb_image_l5;
  logic done;
  int   checks, failures, ber_bits, groups, emb_cycles, busy_cycles, limited;
  real  psnr_db;

  image_run #(.MX(3), .MY(3), .MZ(4), .L1(5), .L2(5), .W(512), .H(512)) run_i (
    .done, .checks, .failures, .ber_bits, .groups, .emb_cycles, .busy_cycles, .limited, .psnr_db);

  initial begin
    #100ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int c, f;
    @(posedge done);
    c = checks + 1;
    f = failures;
    if (psnr_db < 40.0) f++;
    $display("groups %0d, embedding rate %0.3f bpp, BER %0d bits, PSNR %0.2f dB, limited pixels %0d",
             groups, real'(groups * 10) / (512.0 * 512.0), ber_bits, psnr_db, limited);
    $display("embedding %0d cycles = %0.1f frames/s at 289.7 MHz; busy %0d cycles = %0.1f frames/s",
             emb_cycles, 289.7e6 / real'(emb_cycles), busy_cycles, 289.7e6 / real'(busy_cycles));
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end
endmodule
