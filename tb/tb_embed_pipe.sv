// tb_embed_pipe: the embedding datapath with the two lookup tables in their default
// layouts. Random cover groups (a fifth of the pixels at 0 or 255) and secret
// blocks enter back to back and with gaps. For each stego group, exactly three
// cycles after its input, it checks with plain-integer arithmetic that
//   (g1 + 2 g2) mod 5 of Q0 is S0 = L1 mod 5, of Q1 is S1 = L1 div 5,
//   (5p + q) mod 13 of Q2 is S2 = L2,
// that every EMD pixel is within 1 of its range-limited cover value, at most one per
// group changed, and the DE change is inside the diamond |a|+|b| <= 2. A segment
// value removed from the x-y table must raise out_miss.
module tb_embed_pipe;
  import stego_pkg::*;
  int checks = 0, failures = 0;

  logic         clk = 0, rst_n = 0;
  logic         in_valid = 0;
  pixel_t [5:0] in_pixels = '0;
  logic [6:0]   in_secret = '0;
  logic [3:0]   xy_key;
  logic [2:0]   xy_sx, xy_sy;
  logic         xy_hit, z_hit, out_valid, out_miss, busy;
  logic [2:0]   z_key;
  logic [3:0]   z_sdig;
  pixel_t [5:0] out_pixels;
  logic         tbl_we = 0;
  logic [4:0]   tbl_addr = '0;
  logic [3:0]   xy_rv;
  logic [2:0]   z_rv;
  logic         xy_rh, z_rh;

  typedef struct { pixel_t [5:0] pix; logic [6:0] sec; bit miss; int due; } exp_t;
  exp_t exp_q[$];
  int   cycle = 0, n_out = 0, n_limited = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  xy_lut u_xy (.clk, .rst_n, .we(tbl_we), .waddr(tbl_addr), .wvalid(1'b0), .wvalue(4'd0),
               .key(xy_key), .sx(xy_sx), .sy(xy_sy), .shit(xy_hit),
               .rx(3'd0), .ry(3'd0), .rvalue(xy_rv), .rhit(xy_rh));
  z_lut  u_z  (.clk, .rst_n, .we(1'b0), .waddr(4'd0), .wvalid(1'b0), .wvalue(3'd0),
               .key(z_key), .sdig(z_sdig), .shit(z_hit),
               .rdig(4'd0), .rvalue(z_rv), .rhit(z_rh));
  embed_pipe dut (.clk, .rst_n, .in_valid, .in_pixels, .in_secret,
                  .xy_key, .xy_sx, .xy_sy, .xy_hit, .z_key, .z_sdig, .z_hit,
                  .out_valid, .out_pixels, .out_miss, .busy);

  function automatic int iabs(int v); return v < 0 ? -v : v; endfunction
  function automatic int lim(int v, int k); return v < k ? k : (v > 255 - k ? 255 - k : v); endfunction

  always @(negedge clk) if (rst_n && out_valid) begin
    exp_t e;
    int   c[6], o[6], l1, l2, nchg, bad;
    n_out++;
    checks++;
    if (exp_q.size() == 0) begin
      failures++;
      $display("FAIL unexpected output");
    end else begin
      e = exp_q.pop_front();
      for (int i = 0; i < 6; i++) begin
        c[i] = lim(int'(e.pix[i]), i < 4 ? 1 : 2);
        o[i] = int'(out_pixels[i]);
      end
      l1 = int'(e.sec[3:0]);
      l2 = int'(e.sec[6:4]);
      bad = 0;
      if (cycle != e.due) bad |= 1;
      if (out_miss != e.miss) bad |= 2;
      if (!e.miss) begin
        if ((o[0] + 2 * o[1]) % 5 != l1 % 5) bad |= 4;
        if ((o[2] + 2 * o[3]) % 5 != l1 / 5) bad |= 8;
        if ((5 * o[4] + o[5]) % 13 != l2) bad |= 16;
      end
      nchg = 0;
      for (int i = 0; i < 2; i++) if (o[i] != c[i]) nchg++;
      if (nchg > 1) bad |= 32;
      nchg = 0;
      for (int i = 2; i < 4; i++) if (o[i] != c[i]) nchg++;
      if (nchg > 1) bad |= 32;
      for (int i = 0; i < 4; i++) if (iabs(o[i] - c[i]) > 1) bad |= 64;
      if (iabs(o[4] - c[4]) + iabs(o[5] - c[5]) > 2) bad |= 128;
      if (bad != 0) begin
        failures++;
        $display("FAIL code %0d cycle %0d due %0d in=%h sec=%h out=%h miss=%0b",
                 bad, cycle, e.due, e.pix, e.sec, out_pixels, out_miss);
      end
    end
  end

  task automatic send(input bit expect_miss);
    exp_t e;
    for (int i = 0; i < 6; i++) begin
      case ($urandom % 10)
        0:       e.pix[i] = 8'd0;
        1:       e.pix[i] = 8'd255;
        default: e.pix[i] = pixel_t'($urandom);
      endcase
      if (e.pix[i] == 0 || e.pix[i] == 255 || (i >= 4 && (e.pix[i] == 1 || e.pix[i] == 254)))
        n_limited++;
    end
    e.sec  = expect_miss ? {3'($urandom), 4'd3} : 7'($urandom);
    e.miss = expect_miss;
    e.due  = cycle + 3;   // cycle count after the sampling edge; output three edges later
    in_valid = 1; in_pixels = e.pix; in_secret = e.sec;
    exp_q.push_back(e);
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 500; n++) send(0);
    for (int n = 0; n < 500; n++) begin
      send(0);
      repeat ($urandom % 3) @(negedge clk);
    end
    // remove value 3 from the x-y table (cell 3 invalid)
    tbl_we = 1; tbl_addr = 5'd3;
    @(negedge clk);
    tbl_we = 0;
    for (int n = 0; n < 5; n++) send(1);
    repeat (6) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || n_out != 1005 || n_limited == 0) begin
      failures++;
      $display("FAIL outputs %0d, missing %0d, limited pixels %0d", n_out, exp_q.size(), n_limited);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
