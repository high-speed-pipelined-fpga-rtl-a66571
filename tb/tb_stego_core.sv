// tb_stego_core: end-to-end test of the steganography core at its default
// parameters (MX = MY = MZ = 2, L1 = 4, L2 = 3, 2048-byte input FIFO).
//   A: embed 2048 random 7-bit blocks into 2048 random cover groups (a tenth of the
//      pixels at 0 or 255), 7 full FIFO blocks; records straddle block boundaries.
//      The first stego group must appear 13 cycles after the byte that fills the
//      FIFO; every stego pixel stays within the allowed distance of its cover pixel.
//   B: switch to extract mode, feed the 2048 stego groups back (6 blocks) and compare
//      every recovered block with the original.
//   C: rebuild both tables with a permutation, embed one block that ends with a
//      partial record.
//   D: switch to extract mode (the partial embed record must be dropped), recover
//      C's blocks, then random groups whose digits point at invalid cells must be
//      flagged out_miss exactly as the permuted tables say.
// The host keeps wr_en high while the core is busy; those refused writes are
// counted. Each mechanism (busy interrupt, refused write, straddling record, mode
// switch, partial-record drop, table rebuild, pixel range limiting, table miss) must
// occur at least once.
module tb_stego_core;
  import stego_pkg::*;
  int checks = 0, failures = 0;

  logic         clk = 0, rst_n = 0;
  mode_e        mode = MODE_EMBED;
  logic         wr_en = 0;
  logic [7:0]   wr_data = '0;
  logic         wr_ready, busy_irq;
  logic         tbl_we = 0, tbl_sel = 0, tbl_valid = 0;
  logic [7:0]   tbl_addr = '0;
  logic [3:0]   tbl_value = '0;
  logic         out_valid, out_miss;
  mode_e        out_mode;
  pixel_t [5:0] out_pixels;
  logic [6:0]   out_secret;

  localparam int DEPTH = 2048;
  localparam int NG    = 2048;   // groups in phase A/B
  localparam int NC    = 292;    // full records in the phase C block

  always #5 clk = ~clk;

  stego_core dut (.clk, .rst_n, .mode, .wr_en, .wr_data, .wr_ready, .busy_irq,
                  .tbl_we, .tbl_sel, .tbl_addr, .tbl_valid, .tbl_value,
                  .out_valid, .out_mode, .out_pixels, .out_secret, .out_miss);

  // ---------------- bookkeeping
  int cycle = 0;
  always @(posedge clk) cycle++;

  pixel_t [5:0] covpix[NG], stego[NG];
  logic [6:0]   secret[NG];
  typedef struct { mode_e m; pixel_t [5:0] pix; logic [6:0] sec; bit miss; int cyc; } res_t;
  res_t res_q[$];

  int n_busy = 0, n_refused = 0, n_straddle = 0, n_switch = 0, n_drop = 0;
  int n_tblwr = 0, n_limited = 0, n_miss = 0, bytes_in = 0, fill_cycle = -1;
  logic busy_d = 0;
  mode_e last_mode = MODE_EMBED;

  always @(negedge clk) if (rst_n) begin
    if (out_valid) begin
      res_t r;
      r.m = out_mode; r.pix = out_pixels; r.sec = out_secret; r.miss = out_miss; r.cyc = cycle;
      res_q.push_back(r);
    end
    if (busy_irq && !busy_d) n_busy++;
    busy_d <= busy_irq;
    if (dut.sr_clear && dut.u_sr.cnt != '0) n_drop++;
  end

  task automatic push_byte(input logic [7:0] b);
    wr_en = 1; wr_data = b;
    while (!wr_ready) begin
      n_refused++;
      @(negedge clk);
    end
    bytes_in++;
    if (bytes_in == DEPTH && fill_cycle < 0) fill_cycle = cycle;
    @(negedge clk);
    wr_en = 0;
  endtask

  task automatic set_mode(input mode_e m);
    // mode is sampled when a block starts; change it while the core is idle
    while (busy_irq) @(negedge clk);
    if (m != last_mode) n_switch++;
    last_mode = m;
    mode = m;
  endtask

  task automatic wait_results(input int n);
    int guard = 0;
    while (res_q.size() < n && guard < 100000) begin
      @(negedge clk);
      guard++;
    end
    while (busy_irq) @(negedge clk);
  endtask

  task automatic write_tbl(input bit sel, input int addr, input bit v, input int val);
    while (busy_irq) @(negedge clk);
    tbl_we = 1; tbl_sel = sel; tbl_addr = 8'(addr); tbl_valid = v; tbl_value = 4'(val);
    @(negedge clk);
    tbl_we = 0;
    n_tblwr++;
  endtask

  function automatic int iabs(int v); return v < 0 ? -v : v; endfunction
  function automatic int lim(int v, int k); return v < k ? k : (v > 255 - k ? 255 - k : v); endfunction

  // check one stego group against its cover and the digits it must carry
  task automatic check_stego(input pixel_t [5:0] cv, input pixel_t [5:0] st,
                             input int s0, input int s1, input int s2);
    int c[6], o[6], bad;
    for (int i = 0; i < 6; i++) begin
      c[i] = lim(int'(cv[i]), i < 4 ? 1 : 2);
      o[i] = int'(st[i]);
      if (int'(cv[i]) != c[i]) n_limited++;
    end
    bad = 0;
    if ((o[0] + 2 * o[1]) % 5 != s0) bad = 1;
    if ((o[2] + 2 * o[3]) % 5 != s1) bad = 1;
    if ((5 * o[4] + o[5]) % 13 != s2) bad = 1;
    for (int i = 0; i < 4; i++) if (iabs(o[i] - c[i]) > 1) bad = 1;
    if (iabs(o[4] - c[4]) + iabs(o[5] - c[5]) > 2) bad = 1;
    checks++;
    if (bad) begin
      failures++;
      $display("FAIL stego %h from cover %h digits %0d %0d %0d", st, cv, s0, s1, s2);
    end
  endtask

  // permuted tables of phase C/D
  function automatic int xy_cell(int v); return (7 * v + 3) % 25; endfunction
  function automatic int z_dig(int v);   return (5 * v + 4) % 13; endfunction

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    res_t r;
    int   cell_val[25], dig_val[13];
    pixel_t [5:0] pc[NC];
    logic [6:0]   sc[NC];

    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // ---------------- phase A: embedding, default tables
    set_mode(MODE_EMBED);
    for (int g = 0; g < NG; g++) begin
      secret[g] = 7'($urandom);
      for (int i = 0; i < 6; i++)
        case ($urandom % 20)
          0:       covpix[g][i] = 8'd0;
          1:       covpix[g][i] = 8'd255;
          default: covpix[g][i] = pixel_t'($urandom);
        endcase
    end
    for (int g = 0; g < NG; g++) begin
      if ((bytes_in % DEPTH) + 7 > DEPTH) n_straddle++;
      push_byte({1'b0, secret[g]});
      for (int i = 0; i < 6; i++) push_byte(covpix[g][i]);
    end
    wait_results(NG);
    checks++;
    if (res_q.size() != NG) begin
      failures++;
      $display("FAIL phase A: %0d results", res_q.size());
    end
    for (int g = 0; g < NG && res_q.size() > 0; g++) begin
      r = res_q.pop_front();
      if (g == 0) begin
        checks++;
        if (r.cyc - fill_cycle != 13) begin
          failures++;
          $display("FAIL latency %0d cycles, expected 13", r.cyc - fill_cycle);
        end
      end
      stego[g] = r.pix;
      checks++;
      if (r.m != MODE_EMBED || r.miss) begin
        failures++;
        $display("FAIL phase A group %0d mode %0d miss %0b", g, r.m, r.miss);
      end
      check_stego(covpix[g], r.pix, int'(secret[g][3:0]) % 5, int'(secret[g][3:0]) / 5,
                  int'(secret[g][6:4]));
    end

    // ---------------- phase B: recovery
    set_mode(MODE_EXTRACT);
    for (int g = 0; g < NG; g++)
      for (int i = 0; i < 6; i++) push_byte(stego[g][i]);
    wait_results(NG);
    checks++;
    if (res_q.size() != NG) begin
      failures++;
      $display("FAIL phase B: %0d results", res_q.size());
    end
    for (int g = 0; g < NG && res_q.size() > 0; g++) begin
      r = res_q.pop_front();
      checks++;
      if (r.m != MODE_EXTRACT || r.miss || r.sec != secret[g]) begin
        failures++;
        $display("FAIL phase B group %0d: %h miss %0b, expected %h", g, r.sec, r.miss, secret[g]);
      end
    end

    // ---------------- phase C: rebuilt tables, block ending in a partial record
    for (int c = 0; c < 25; c++) cell_val[c] = -1;
    for (int d = 0; d < 13; d++) dig_val[d] = -1;
    for (int c = 0; c < 25; c++) write_tbl(0, c, 0, 0);
    for (int d = 0; d < 13; d++) write_tbl(1, d, 0, 0);
    for (int v = 0; v < 16; v++) begin
      write_tbl(0, xy_cell(v), 1, v);
      cell_val[xy_cell(v)] = v;
    end
    for (int v = 0; v < 8; v++) begin
      write_tbl(1, z_dig(v), 1, v);
      dig_val[z_dig(v)] = v;
    end
    set_mode(MODE_EMBED);
    for (int g = 0; g < NC; g++) begin
      sc[g] = 7'($urandom);
      for (int i = 0; i < 6; i++) pc[g][i] = pixel_t'($urandom);
      push_byte({1'b0, sc[g]});
      for (int i = 0; i < 6; i++) push_byte(pc[g][i]);
    end
    push_byte(8'h55); push_byte(8'h01); push_byte(8'h02); push_byte(8'h03);  // partial record
    wait_results(NC);
    checks++;
    if (res_q.size() != NC) begin
      failures++;
      $display("FAIL phase C: %0d results", res_q.size());
    end
    for (int g = 0; g < NC && res_q.size() > 0; g++) begin
      int cl;
      r = res_q.pop_front();
      cl = xy_cell(int'(sc[g][3:0]));
      checks++;
      if (r.m != MODE_EMBED || r.miss) begin
        failures++;
        $display("FAIL phase C group %0d miss", g);
      end
      check_stego(pc[g], r.pix, cl % 5, cl / 5, z_dig(int'(sc[g][6:4])));
      pc[g] = r.pix;   // keep the stego group for phase D
    end

    // ---------------- phase D: recovery with the rebuilt tables after a mode switch
    set_mode(MODE_EXTRACT);
    for (int g = 0; g < NC; g++)
      for (int i = 0; i < 6; i++) push_byte(pc[g][i]);
    begin
      pixel_t [5:0] rg[50];
      int nr = (DEPTH - NC * 6) / 6;
      for (int g = 0; g < nr; g++)
        for (int i = 0; i < 6; i++) begin
          rg[g][i] = pixel_t'($urandom);
          push_byte(rg[g][i]);
        end
      for (int k = 0; k < DEPTH - NC * 6 - nr * 6; k++) push_byte(8'hAA);
      wait_results(NC + nr);
      checks++;
      if (res_q.size() != NC + nr) begin
        failures++;
        $display("FAIL phase D: %0d results, expected %0d", res_q.size(), NC + nr);
      end
      for (int g = 0; g < NC && res_q.size() > 0; g++) begin
        r = res_q.pop_front();
        checks++;
        if (r.miss || r.sec != sc[g]) begin
          failures++;
          $display("FAIL phase D group %0d: %h miss %0b, expected %h", g, r.sec, r.miss, sc[g]);
        end
      end
      for (int g = 0; g < nr && res_q.size() > 0; g++) begin
        int s0, s1, s2, v1, v2;
        bit miss;
        r  = res_q.pop_front();
        s0 = (int'(rg[g][0]) + 2 * int'(rg[g][1])) % 5;
        s1 = (int'(rg[g][2]) + 2 * int'(rg[g][3])) % 5;
        s2 = (5 * int'(rg[g][4]) + int'(rg[g][5])) % 13;
        v1 = cell_val[5 * s1 + s0];
        v2 = dig_val[s2];
        miss = (v1 < 0) || (v2 < 0);
        if (miss) n_miss++;
        checks++;
        if (r.miss != miss || (!miss && r.sec != {3'(v2), 4'(v1)})) begin
          failures++;
          $display("FAIL phase D random group %0d: %h miss %0b, expected %0d %0d", g, r.sec, r.miss, v2, v1);
        end
      end
    end

    // ---------------- mechanisms
    $display("blocks %0d, refused writes %0d, straddling records %0d, mode switches %0d",
             n_busy, n_refused, n_straddle, n_switch);
    $display("partial records dropped %0d, table writes %0d, limited pixels %0d, table misses %0d",
             n_drop, n_tblwr, n_limited, n_miss);
    checks++; if (n_busy == 0)     begin failures++; $display("FAIL no busy interrupt"); end
    checks++; if (n_refused == 0)  begin failures++; $display("FAIL no refused write"); end
    checks++; if (n_straddle == 0) begin failures++; $display("FAIL no straddling record"); end
    checks++; if (n_switch < 2)    begin failures++; $display("FAIL too few mode switches"); end
    checks++; if (n_drop == 0)     begin failures++; $display("FAIL no partial record dropped"); end
    checks++; if (n_tblwr == 0)    begin failures++; $display("FAIL no table rebuild"); end
    checks++; if (n_limited == 0)  begin failures++; $display("FAIL no range-limited pixel"); end
    checks++; if (n_miss == 0)     begin failures++; $display("FAIL no table miss"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
