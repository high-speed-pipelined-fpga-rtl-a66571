// tb_de_fmod: checks F_DE = ((2k+1)p + q) mod (2k^2+2k+1) for k = 2 (default) and
// k = 4 on every pixel pair of a coarse grid plus random pairs.
module tb_de_fmod;
  import stego_pkg::*;
  int checks = 0, failures = 0;

  pixel_t     p, q;
  logic [3:0] f2;
  logic [5:0] f4;

  de_fmod          dut2 (.p, .q, .f(f2));
  de_fmod #(.K(4)) dut4 (.p, .q, .f(f4));

  task automatic check();
    #1;
    checks++;
    if (int'(f2) != (5 * int'(p) + int'(q)) % 13 || int'(f4) != (9 * int'(p) + int'(q)) % 41) begin
      failures++;
      $display("FAIL p=%0d q=%0d f2=%0d f4=%0d", p, q, f2, f4);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 256; a += 5)
      for (int b = 0; b < 256; b += 7) begin
        p = pixel_t'(a); q = pixel_t'(b); check();
      end
    p = 255; q = 255; check();
    for (int n = 0; n < 2000; n++) begin
      p = pixel_t'($urandom); q = pixel_t'($urandom); check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
