// tb_sync_fifo: random pushes and pops on a 16-deep FIFO compared with a queue
// model: read data one cycle after the pop, full exactly at the depth, empty at
// zero, refused writes when full and refused reads when empty.
module tb_sync_fifo;
  int checks = 0, failures = 0;

  localparam int D = 16;
  logic       clk = 0, rst_n = 0;
  logic       wr_en = 0, rd_en = 0;
  logic [7:0] wr_data = '0, rd_data;
  logic       rd_valid, full, empty;
  logic [4:0] count;
  logic [7:0] model[$];
  logic [7:0] exp_data;
  bit         exp_valid;
  int         n_full = 0;

  always #5 clk = ~clk;

  sync_fifo #(.WIDTH(8), .DEPTH(D)) dut (.clk, .rst_n, .wr_en, .wr_data, .rd_en, .rd_data,
                                         .rd_valid, .full, .empty, .count);

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
    exp_valid = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      // check outputs of the previous edge
      checks++;
      if (rd_valid !== exp_valid || (exp_valid && rd_data !== exp_data) ||
          full !== (model.size() == D) || empty !== (model.size() == 0) ||
          int'(count) != model.size()) begin
        failures++;
        $display("FAIL n=%0d rd_valid=%0b data=%h exp %0b %h full=%0b empty=%0b count=%0d model=%0d",
                 n, rd_valid, rd_data, exp_valid, exp_data, full, empty, count, model.size());
      end
      if (full) n_full++;
      // bias: fill phases and drain phases
      wr_en   = ((n / 200) % 2 == 0) ? ($urandom % 4 != 0) : ($urandom % 4 == 0);
      rd_en   = ((n / 200) % 2 == 0) ? ($urandom % 4 == 0) : ($urandom % 4 != 0);
      wr_data = 8'($urandom);
      exp_valid = rd_en && model.size() > 0;
      if (exp_valid) exp_data = model.pop_front();
      // a write is refused when the FIFO was full before this edge's pop
      if (wr_en && (model.size() + (exp_valid ? 1 : 0)) != D) model.push_back(wr_data);
    end
    checks++;
    if (n_full == 0) begin
      failures++;
      $display("FAIL the FIFO never became full");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
