// tb_group_shift_reg: feeds embed records (1 secret byte + 6 pixels) and extract
// records (6 pixels) with random gaps and checks every assembled group, that
// grp_valid comes exactly one cycle after the record's last byte, that a partial
// record survives a pause, and that clear drops a partial record on a mode change.
module tb_group_shift_reg;
  import stego_pkg::*;
  int checks = 0, failures = 0;

  logic              clk = 0, rst_n = 0, clear = 0, in_valid = 0;
  mode_e             mode = MODE_EMBED;
  logic [7:0]        in_byte = '0;
  logic              grp_valid;
  mode_e             grp_mode;
  pixel_t [5:0]      grp_pixels;
  logic [6:0]        grp_secret;

  typedef struct { mode_e m; logic [6:0] sec; pixel_t [5:0] pix; } rec_t;
  rec_t exp_q[$];
  int   last_cycle[$];
  int   cycle = 0, n_groups = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  group_shift_reg dut (.clk, .rst_n, .clear, .mode, .in_valid, .in_byte,
                       .grp_valid, .grp_mode, .grp_pixels, .grp_secret);

  // checker
  always @(negedge clk) if (rst_n && grp_valid) begin
    rec_t r;
    int   lc;
    n_groups++;
    checks++;
    if (exp_q.size() == 0) begin
      failures++;
      $display("FAIL unexpected group");
    end else begin
      r  = exp_q.pop_front();
      lc = last_cycle.pop_front();
      if (grp_mode != r.m || grp_pixels != r.pix || grp_secret != r.sec || cycle != lc) begin
        failures++;
        $display("FAIL group mode=%0d pix=%h sec=%h exp %0d %h %h cycle %0d exp %0d",
                 grp_mode, grp_pixels, grp_secret, r.m, r.pix, r.sec, cycle, lc);
      end
    end
  end

  task automatic send_byte(input logic [7:0] b, input bit gaps, input bit is_last = 0);
    if (gaps) while ($urandom % 3 == 0) @(negedge clk);
    if (is_last) last_cycle.push_back(cycle + 1);   // byte sampled at the next edge
    in_valid = 1; in_byte = b;
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic send_record(input mode_e m, input bit gaps);
    rec_t r;
    r.m = m;
    r.sec = (m == MODE_EMBED) ? 7'($urandom) : '0;
    for (int j = 0; j < 6; j++) r.pix[j] = pixel_t'($urandom);
    mode = m;
    if (m == MODE_EMBED) send_byte({1'b0, r.sec}, gaps);
    for (int j = 0; j < 6; j++) begin
      if (j == 5) exp_q.push_back(r);
      send_byte(r.pix[j], gaps, j == 5);
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
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 50; n++) send_record(MODE_EMBED, 0);      // back to back
    for (int n = 0; n < 50; n++) send_record(MODE_EMBED, 1);      // with gaps
    // partial record then mode change with clear
    send_byte(8'h11, 0); send_byte(8'h22, 0); send_byte(8'h33, 0);
    repeat (5) @(negedge clk);
    clear = 1; mode = MODE_EXTRACT;
    @(negedge clk);
    clear = 0;
    for (int n = 0; n < 50; n++) send_record(MODE_EXTRACT, n % 2 == 1);
    repeat (4) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || n_groups != 150) begin
      failures++;
      $display("FAIL %0d groups seen, %0d missing", n_groups, exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
