// tb_image_default: full-payload embedding and recovery of a 512 x 512 8-bit image
// with the default configuration (MX = MY = MZ = 2, L1 = 4, L2 = 3: 7 bits per 6
// pixels). Requires bit-exact recovery (BER 0) and reports the embedding rate, the
// PSNR of the stego image and the embedding time in cycles and in frames per second
// at a 289.7 MHz clock. The PSNR must exceed 48 dB: the expected mean squared
// error of this configuration is (2*4/5 + 28/13)/6 = 0.63, i.e. about 50 dB.
module tb_image_default;
  logic done;
  int   checks, failures, ber_bits, groups, emb_cycles, busy_cycles, limited;
  real  psnr_db;

  image_run #(.W(512), .H(512)) run_i (.done, .checks, .failures, .ber_bits, .groups,
                                       .emb_cycles, .busy_cycles, .limited, .psnr_db);

  initial begin
    #100ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int c, f;
    @(posedge done);
    c = checks + 2;
    f = failures;
    if (psnr_db < 48.0) f++;
    if (limited == 0) f++;
    $display("groups %0d, embedding rate %0.3f bpp, BER %0d bits, PSNR %0.2f dB, limited pixels %0d",
             groups, real'(groups * 7) / (512.0 * 512.0), ber_bits, psnr_db, limited);
    $display("embedding %0d cycles = %0.1f frames/s at 289.7 MHz; busy %0d cycles = %0.1f frames/s",
             emb_cycles, 289.7e6 / real'(emb_cycles), busy_cycles, 289.7e6 / real'(busy_cycles));
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end
endmodule
