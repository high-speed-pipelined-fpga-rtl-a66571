// stego_ctrl: the controller of the steganography core.
//
// A small state machine with no instruction memory: its state alone decides the
// control signals.
//   IDLE  : the host fills the input FIFO (wr_ready); busy_irq is low. When the
//           FIFO reports full, the Mode input is latched and the block starts.
//   RUN   : busy_irq is high (the interrupt that stops further DDR3 reads) and the
//           FIFO is read one byte per cycle until it is empty.
//   DRAIN : waits until no byte or group is left inside the datapaths, then IDLE.
// If the latched mode differs from the previous block's mode, sr_clear pulses in the
// first RUN cycle so that a partial record of the old format is dropped. The table
// write port is only honoured in IDLE (tbl_ok). Start-on-full and the busy interrupt
// follow the architecture; the DRAIN state and the mode latching are this design's
// choices.
module stego_ctrl
  import stego_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  mode_e mode_in,
  input  logic  fifo_full,
  input  logic  fifo_empty,
  input  logic  pipe_busy,
  output logic  busy_irq,
  output logic  rd_en,
  output mode_e mode_q,
  output logic  sr_clear,
  output logic  tbl_ok
);
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} state_e;
  state_e state;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      mode_q   <= MODE_EMBED;
      sr_clear <= 1'b0;
    end else begin
      sr_clear <= 1'b0;
      unique case (state)
        S_IDLE: if (fifo_full) begin
          state    <= S_RUN;
          mode_q   <= mode_in;
          sr_clear <= (mode_in != mode_q);
        end
        S_RUN:   if (fifo_empty) state <= S_DRAIN;
        S_DRAIN: if (!pipe_busy) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy_irq = (state != S_IDLE);
  assign rd_en    = (state == S_RUN) && !fifo_empty;
  assign tbl_ok   = (state == S_IDLE);
endmodule
