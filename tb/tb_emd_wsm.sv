// tb_emd_wsm: checks the EMD weighted-sum modulo function for m = 2 (default) and
// m = 3 against F = sum i*g_i mod (2m+1) computed with plain integers, over the
// corner values and random groups.
module tb_emd_wsm;
  import stego_pkg::*;
  int checks = 0, failures = 0;

  pixel_t [1:0] g2;
  logic [2:0]   f2;
  pixel_t [2:0] g3;
  logic [2:0]   f3;

  emd_wsm              dut2 (.g(g2), .f(f2));
  emd_wsm #(.M(3))     dut3 (.g(g3), .f(f3));

  task automatic check2();
    int ref_f;
    #1;
    ref_f = (int'(g2[0]) + 2 * int'(g2[1])) % 5;
    checks++;
    if (int'(f2) != ref_f) begin
      failures++;
      $display("FAIL m=2 g=%0d,%0d f=%0d exp %0d", g2[0], g2[1], f2, ref_f);
    end
  endtask

  task automatic check3();
    int ref_f;
    #1;
    ref_f = (int'(g3[0]) + 2 * int'(g3[1]) + 3 * int'(g3[2])) % 7;
    checks++;
    if (int'(f3) != ref_f) begin
      failures++;
      $display("FAIL m=3 f=%0d exp %0d", f3, ref_f);
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
    for (int a = 0; a < 256; a += 15)
      for (int b = 0; b < 256; b += 17) begin
        g2 = {pixel_t'(b), pixel_t'(a)};
        check2();
      end
    g2 = {8'd255, 8'd255}; check2();
    for (int n = 0; n < 2000; n++) begin
      g2 = {pixel_t'($urandom), pixel_t'($urandom)};
      check2();
      g3 = {pixel_t'($urandom), pixel_t'($urandom), pixel_t'($urandom)};
      check3();
    end
    g3 = {8'd255, 8'd255, 8'd255}; check3();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
