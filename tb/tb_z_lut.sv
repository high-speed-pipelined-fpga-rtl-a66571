// tb_z_lut: checks the z table over the 13 digits of the k = 2 distance pattern.
// Default layout: digit d holds value d for d < 8. Then values are moved to digit
// (5*v+4) mod 13, searched and read back; an invalidated value must miss.
module tb_z_lut;
  import stego_pkg::*;
  int checks = 0, failures = 0;

  logic       clk = 0, rst_n = 0;
  logic       we = 0, wvalid = 0;
  logic [3:0] waddr = '0, sdig, rdig = '0;
  logic [2:0] wvalue = '0, key = '0, rvalue;
  logic       shit, rhit;
  int         dig_of[8];

  always #5 clk = ~clk;

  z_lut dut (.clk, .rst_n, .we, .waddr, .wvalid, .wvalue, .key, .sdig, .shit,
             .rdig, .rvalue, .rhit);

  task automatic expect_search(input int k, input bit hit, input int d);
    key = 3'(k); #1;
    checks++;
    if (shit !== hit || (hit && int'(sdig) != d)) begin
      failures++;
      $display("FAIL search key=%0d hit=%0b d=%0d exp %0d", k, shit, sdig, d);
    end
  endtask

  task automatic expect_read(input int d, input bit hit, input int v);
    rdig = 4'(d); #1;
    checks++;
    if (rhit !== hit || (hit && int'(rvalue) != v)) begin
      failures++;
      $display("FAIL read d=%0d hit=%0b v=%0d exp %0d", d, rhit, rvalue, v);
    end
  endtask

  task automatic write_cell(input int d, input bit v, input int val);
    @(negedge clk); we = 1; waddr = 4'(d); wvalid = v; wvalue = 3'(val);
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
    for (int k = 0; k < 8; k++) expect_search(k, 1, k);
    for (int d = 0; d < 13; d++) expect_read(d, d < 8, d);
    expect_read(13, 0, 0);
    for (int d = 0; d < 13; d++) write_cell(d, 0, 0);
    for (int v = 0; v < 8; v++) begin
      dig_of[v] = (5 * v + 4) % 13;
      write_cell(dig_of[v], 1, v);
    end
    for (int v = 0; v < 8; v++) expect_search(v, 1, dig_of[v]);
    for (int v = 0; v < 8; v++) expect_read(dig_of[v], 1, v);
    write_cell(dig_of[2], 0, 2);
    expect_search(2, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
