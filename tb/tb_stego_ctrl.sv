// tb_stego_ctrl: drives the FIFO flags and the pipeline-busy input of the
// controller and checks its sequence: idle until full, busy interrupt from the next
// cycle, one read per cycle while not empty, drain until the pipeline is idle, back
// to idle; mode latched at the start; sr_clear only when the mode changes; table
// writes allowed only when idle.
module tb_stego_ctrl;
  import stego_pkg::*;
  int checks = 0, failures = 0;

  logic  clk = 0, rst_n = 0;
  mode_e mode_in = MODE_EMBED;
  logic  fifo_full = 0, fifo_empty = 1, pipe_busy = 0;
  logic  busy_irq, rd_en, sr_clear, tbl_ok;
  mode_e mode_q;

  always #5 clk = ~clk;

  stego_ctrl dut (.clk, .rst_n, .mode_in, .fifo_full, .fifo_empty, .pipe_busy,
                  .busy_irq, .rd_en, .mode_q, .sr_clear, .tbl_ok);

  task automatic expect_out(input string what, input bit b, input bit r, input bit c,
                            input bit t, input mode_e m);
    checks++;
    if (busy_irq !== b || rd_en !== r || sr_clear !== c || tbl_ok !== t || mode_q !== m) begin
      failures++;
      $display("FAIL %s: busy=%0b rd=%0b clr=%0b tbl=%0b mode=%0d exp %0b %0b %0b %0b %0d",
               what, busy_irq, rd_en, sr_clear, tbl_ok, mode_q, b, r, c, t, m);
    end
  endtask

  // one block of n bytes in mode m; prev is the mode of the previous block
  task automatic block(input mode_e m, input mode_e prev, input int n, input int drain);
    mode_in = m;
    fifo_empty = 0;
    @(negedge clk);
    expect_out("idle", 0, 0, 0, 1, prev);
    fifo_full = 1;
    @(negedge clk);
    expect_out("start", 1, 1, m != prev, 0, m);
    fifo_full = 0;
    mode_in = (m == MODE_EMBED) ? MODE_EXTRACT : MODE_EMBED;  // must be ignored now
    for (int i = 1; i < n; i++) begin
      pipe_busy = 1;
      @(negedge clk);
      expect_out("run", 1, 1, 0, 0, m);
    end
    fifo_empty = 1;
    #1;
    expect_out("empty", 1, 0, 0, 0, m);
    @(negedge clk);
    for (int i = 0; i < drain; i++) begin
      expect_out("drain", 1, 0, 0, 0, m);
      @(negedge clk);
    end
    pipe_busy = 0;
    @(negedge clk);
    expect_out("done", 0, 0, 0, 1, m);
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
    @(negedge clk);
    expect_out("reset", 0, 0, 0, 1, MODE_EMBED);
    block(MODE_EMBED,   MODE_EMBED,   10, 3);
    block(MODE_EMBED,   MODE_EMBED,    5, 0);
    block(MODE_EXTRACT, MODE_EMBED,    8, 4);
    block(MODE_EXTRACT, MODE_EXTRACT,  3, 1);
    block(MODE_EMBED,   MODE_EXTRACT,  6, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
