// tb_emd_modify: for every secret digit and random cover groups (m = 2 and m = 3)
// it checks that the modified group's weighted sum equals the digit, that at most
// one pixel changed and by at most one, and that nothing changes when the digit
// already matches. The weighted sum is recomputed here with plain integers.
module tb_emd_modify;
  import stego_pkg::*;
  int checks = 0, failures = 0;

  pixel_t [1:0] g2, o2;
  logic [2:0]   f2, s2;
  pixel_t [2:0] g3, o3;
  logic [2:0]   f3, s3;

  emd_modify          dut2 (.g(g2), .f(f2), .s_dig(s2), .g_out(o2));
  emd_modify #(.M(3)) dut3 (.g(g3), .f(f3), .s_dig(s3), .g_out(o3));

  function automatic int wsm(input int v[], input int m);
    int s = 0;
    for (int i = 0; i < m; i++) s += (i + 1) * v[i];
    return s % (2 * m + 1);
  endfunction

  task automatic do_case(input int m);
    int gi[], oi[], nchg, delta, fr, sd;
    gi = new[m]; oi = new[m];
    for (int i = 0; i < m; i++) gi[i] = 1 + ($urandom % 254);
    sd = $urandom % (2 * m + 1);
    fr = wsm(gi, m);
    if (m == 2) begin
      g2 = {pixel_t'(gi[1]), pixel_t'(gi[0])}; f2 = 3'(fr); s2 = 3'(sd); #1;
      for (int i = 0; i < 2; i++) oi[i] = int'(o2[i]);
    end else begin
      g3 = {pixel_t'(gi[2]), pixel_t'(gi[1]), pixel_t'(gi[0])}; f3 = 3'(fr); s3 = 3'(sd); #1;
      for (int i = 0; i < 3; i++) oi[i] = int'(o3[i]);
    end
    nchg = 0; delta = 0;
    for (int i = 0; i < m; i++) begin
      if (oi[i] != gi[i]) nchg++;
      delta += (oi[i] > gi[i]) ? oi[i] - gi[i] : gi[i] - oi[i];
    end
    checks++;
    if (wsm(oi, m) != sd || nchg > 1 || delta > 1 || (fr == sd && nchg != 0)) begin
      failures++;
      $display("FAIL m=%0d digit=%0d f=%0d changed=%0d delta=%0d", m, sd, fr, nchg, delta);
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
    for (int n = 0; n < 3000; n++) begin
      do_case(2);
      do_case(3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
