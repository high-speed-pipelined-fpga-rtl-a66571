// tb_extract_pipe: the recovery datapath with the lookup tables in their default
// layouts. Random stego groups enter back to back and with gaps; two cycles later
// the recovered block must be {S2, 5*S1 + S0} with S0, S1 the EMD digits of the two
// pixel pairs and S2 the DE digit of the last pair, computed here with plain
// integers, and out_miss must be set exactly when 5*S1+S0 > 15 or S2 > 7.
module tb_extract_pipe;
  import stego_pkg::*;
  int checks = 0, failures = 0;

  logic         clk = 0, rst_n = 0;
  logic         in_valid = 0;
  pixel_t [5:0] in_pixels = '0;
  logic [2:0]   xy_rx, xy_ry;
  logic [3:0]   xy_rvalue, z_rdig, z_sd;
  logic         xy_rhit, z_rhit, out_valid, out_miss, busy, xy_sh, z_sh;
  logic [2:0]   z_rvalue, xy_sx, xy_sy;
  logic [6:0]   out_secret;

  typedef struct { pixel_t [5:0] pix; int due; } exp_t;
  exp_t exp_q[$];
  int   cycle = 0, n_out = 0, n_miss = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  xy_lut u_xy (.clk, .rst_n, .we(1'b0), .waddr(5'd0), .wvalid(1'b0), .wvalue(4'd0),
               .key(4'd0), .sx(xy_sx), .sy(xy_sy), .shit(xy_sh),
               .rx(xy_rx), .ry(xy_ry), .rvalue(xy_rvalue), .rhit(xy_rhit));
  z_lut  u_z  (.clk, .rst_n, .we(1'b0), .waddr(4'd0), .wvalid(1'b0), .wvalue(3'd0),
               .key(3'd0), .sdig(z_sd), .shit(z_sh),
               .rdig(z_rdig), .rvalue(z_rvalue), .rhit(z_rhit));
  extract_pipe dut (.clk, .rst_n, .in_valid, .in_pixels,
                    .xy_rx, .xy_ry, .xy_rvalue, .xy_rhit, .z_rdig, .z_rvalue, .z_rhit,
                    .out_valid, .out_secret, .out_miss, .busy);

  always @(negedge clk) if (rst_n && out_valid) begin
    exp_t e;
    int   p[6], s0, s1, s2, v1;
    bit   miss;
    n_out++;
    checks++;
    if (exp_q.size() == 0) begin
      failures++;
      $display("FAIL unexpected output");
    end else begin
      e = exp_q.pop_front();
      for (int i = 0; i < 6; i++) p[i] = int'(e.pix[i]);
      s0 = (p[0] + 2 * p[1]) % 5;
      s1 = (p[2] + 2 * p[3]) % 5;
      s2 = (5 * p[4] + p[5]) % 13;
      v1 = 5 * s1 + s0;
      miss = (v1 > 15) || (s2 > 7);
      if (miss) n_miss++;
      if (cycle != e.due || out_miss != miss ||
          (!miss && out_secret != {3'(s2), 4'(v1)})) begin
        failures++;
        $display("FAIL cycle %0d due %0d secret %h miss %0b exp %0d/%0d miss %0b",
                 cycle, e.due, out_secret, out_miss, s2, v1, miss);
      end
    end
  end

  task automatic send();
    exp_t e;
    for (int i = 0; i < 6; i++) e.pix[i] = pixel_t'($urandom);
    e.due = cycle + 2;
    in_valid = 1; in_pixels = e.pix;
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
    for (int n = 0; n < 500; n++) send();
    for (int n = 0; n < 500; n++) begin
      send();
      repeat ($urandom % 3) @(negedge clk);
    end
    repeat (5) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || n_out != 1000 || n_miss == 0) begin
      failures++;
      $display("FAIL outputs %0d, missing %0d, misses %0d", n_out, exp_q.size(), n_miss);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
