// tb_de_modify: for each secret digit of the 13-ary (k = 2) and 41-ary (k = 4)
// systems and random pixel pairs it checks that the stego pair decodes to the
// digit, ((2k+1)p' + q') mod (2k^2+2k+1), and that the change (a,b) stays inside
// the diamond |a|+|b| <= k.
module tb_de_modify;
  import stego_pkg::*;
  int checks = 0, failures = 0;

  pixel_t     p, q, p2o, q2o, p4o, q4o;
  logic [3:0] f2, s2;
  logic [5:0] f4, s4;

  de_modify          dut2 (.p, .q, .f(f2), .s_dig(s2), .p_out(p2o), .q_out(q2o));
  de_modify #(.K(4)) dut4 (.p, .q, .f(f4), .s_dig(s4), .p_out(p4o), .q_out(q4o));

  function automatic int iabs(int v); return v < 0 ? -v : v; endfunction

  task automatic do_case(input int pi, input int qi, input int d2, input int d4);
    p = pixel_t'(pi); q = pixel_t'(qi);
    f2 = 4'((5 * pi + qi) % 13); s2 = 4'(d2);
    f4 = 6'((9 * pi + qi) % 41); s4 = 6'(d4);
    #1;
    checks++;
    if ((5 * int'(p2o) + int'(q2o)) % 13 != d2 || iabs(int'(p2o) - pi) + iabs(int'(q2o) - qi) > 2) begin
      failures++;
      $display("FAIL k=2 p=%0d q=%0d digit=%0d -> %0d,%0d", pi, qi, d2, p2o, q2o);
    end
    checks++;
    if ((9 * int'(p4o) + int'(q4o)) % 41 != d4 || iabs(int'(p4o) - pi) + iabs(int'(q4o) - qi) > 4) begin
      failures++;
      $display("FAIL k=4 p=%0d q=%0d digit=%0d -> %0d,%0d", pi, qi, d4, p4o, q4o);
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
    for (int d = 0; d < 41; d++) do_case(100, 37, d % 13, d);
    for (int n = 0; n < 3000; n++)
      do_case(4 + ($urandom % 248), 4 + ($urandom % 248), $urandom % 13, $urandom % 41);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
