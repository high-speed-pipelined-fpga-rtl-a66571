// tb_xy_lut: checks the x-y coordinate table. After reset the default layout must
// hold value y*5+x in the first 16 cells: every 4-bit key is searched and must give
// (key mod 5, key div 5), and every cidx is read back. Then a permuted table is
// written (value v at cidx (7*v+3) mod 25), searched and read again, a key with no
// valid cidx must miss, and a duplicated value must return the lower cidx.
module tb_xy_lut;
  import stego_pkg::*;
  int checks = 0, failures = 0;

  logic       clk = 0, rst_n = 0;
  logic       we = 0, wvalid = 0;
  logic [4:0] waddr = '0;
  logic [3:0] wvalue = '0, key = '0, rvalue;
  logic [2:0] sx, sy, rx = '0, ry = '0;
  logic       shit, rhit;
  int         cell_of[16];

  always #5 clk = ~clk;

  xy_lut dut (.clk, .rst_n, .we, .waddr, .wvalid, .wvalue, .key, .sx, .sy, .shit,
              .rx, .ry, .rvalue, .rhit);

  task automatic expect_search(input int k, input bit hit, input int cidx);
    key = 4'(k); #1;
    checks++;
    if (shit !== hit || (hit && (int'(sy) * 5 + int'(sx) != cidx))) begin
      failures++;
      $display("FAIL search key=%0d hit=%0b (%0d,%0d) exp cidx %0d", k, shit, sx, sy, cidx);
    end
  endtask

  task automatic expect_read(input int x, input int y, input bit hit, input int v);
    rx = 3'(x); ry = 3'(y); #1;
    checks++;
    if (rhit !== hit || (hit && int'(rvalue) != v)) begin
      failures++;
      $display("FAIL read (%0d,%0d) hit=%0b v=%0d exp %0b %0d", x, y, rhit, rvalue, hit, v);
    end
  endtask

  task automatic write_cell(input int c, input bit v, input int val);
    @(negedge clk); we = 1; waddr = 5'(c); wvalid = v; wvalue = 4'(val);
    @(negedge clk); we = 0;
  endtask

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int k = 0; k < 16; k++) expect_search(k, 1, k);
    for (int c = 0; c < 25; c++) expect_read(c % 5, c / 5, c < 16, c);
    expect_read(5, 0, 0, 0);
    // permuted table
    for (int c = 0; c < 25; c++) write_cell(c, 0, 0);
    for (int v = 0; v < 16; v++) begin
      cell_of[v] = (7 * v + 3) % 25;
      write_cell(cell_of[v], 1, v);
    end
    for (int v = 0; v < 16; v++) expect_search(v, 1, cell_of[v]);
    for (int v = 0; v < 16; v++) expect_read(cell_of[v] % 5, cell_of[v] / 5, 1, v);
    write_cell(cell_of[9], 0, 9);
    expect_search(9, 0, 0);
    expect_read(cell_of[9] % 5, cell_of[9] / 5, 0, 0);
    // duplicate of value 4 in cidx 0 (lower than its own cidx)
    write_cell(0, 1, 4);
    expect_search(4, 1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
