// uart_intr: interrupt controller.
//
// Four kinds of interrupt are handled, each enabled by a bit of IER:
//   trigger level - Rx FIFO holds at least its trigger level of bytes
//                   (rx_trig), or Tx FIFO has drained to its trigger level or
//                   below (tx_trig); levels 1, 4, 8 or 14 are chosen in FCR
//   timeout       - the Rx FIFO has held data for TIMEOUT_BITS bit-times with
//                   no byte received and no RHR read; the timeout counter is
//                   cleared by a received byte, an RHR read and an empty Rx
//                   FIFO
//   rx_error      - a byte arrived with a parity or framing error
//   tx_empty      - the transmitter finished a frame and found the Tx FIFO
//                   empty
// The trigger-level and timeout sources are levels and clear themselves when
// the host services the FIFO. rx_error and tx_empty are events: they are
// latched (when enabled) and cleared by intr_ack. isr reports every enabled
// pending source; intr is their OR.
//
// The four sources, the three timeout-clearing events, the 44 bit-time
// timeout and the 1/4/8/14 levels follow the published description. Splitting
// the trigger-level source into an Rx and a Tx enable, the meaning of the Tx
// trigger level, the ISR layout and the use of intr_ack are this design's
// own choices.
//
// Timing: isr and intr are registered, one cycle after the condition.
module uart_intr
  import uart_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH   = 16,
  parameter int unsigned OVERSAMPLE   = 16,
  parameter int unsigned TIMEOUT_BITS = 44,
  localparam int unsigned CW = $clog2(FIFO_DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          tick,
  input  irq_t          ier,
  input  logic [1:0]    rx_trig_sel,
  input  logic [1:0]    tx_trig_sel,
  input  logic [CW-1:0] rx_count,
  input  logic [CW-1:0] tx_count,
  input  logic          rx_empty,
  input  logic          rx_done,
  input  logic          rx_err,
  input  logic          tx_empty_evt,
  input  logic          rhr_rd,
  input  logic          intr_ack,
  output irq_t          isr,
  output logic          intr
);

  localparam int unsigned TIMEOUT_TICKS = TIMEOUT_BITS * OVERSAMPLE;
  localparam int unsigned TOW = $clog2(TIMEOUT_TICKS + 1);

  logic [TOW-1:0] to_cnt;
  logic           to_hit;
  logic           rx_err_p, tx_empty_p;
  logic           rx_trig_raw, tx_trig_raw;

  assign to_hit      = (to_cnt == TOW'(TIMEOUT_TICKS));
  assign rx_trig_raw = (32'(rx_count) >= 32'(trig_level(rx_trig_sel)));
  assign tx_trig_raw = (32'(tx_count) <= 32'(trig_level(tx_trig_sel)));

  // Receive timeout counter, in baud ticks.
  always_ff @(posedge clk) begin
    if (rst || rx_done || rhr_rd || rx_empty) to_cnt <= '0;
    else if (tick && !to_hit)                 to_cnt <= to_cnt + 1'b1;
  end

  // Latched event sources.
  always_ff @(posedge clk) begin
    if (rst) begin
      rx_err_p   <= 1'b0;
      tx_empty_p <= 1'b0;
    end else begin
      if (intr_ack) begin
        rx_err_p   <= 1'b0;
        tx_empty_p <= 1'b0;
      end
      if (rx_err && ier.rx_error)       rx_err_p   <= 1'b1;
      if (tx_empty_evt && ier.tx_empty) tx_empty_p <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      isr  <= '0;
      intr <= 1'b0;
    end else begin
      isr.rx_trig  <= ier.rx_trig && rx_trig_raw;
      isr.tx_trig  <= ier.tx_trig && tx_trig_raw;
      isr.rx_error <= ier.rx_error && rx_err_p;
      isr.timeout  <= ier.timeout && to_hit && !rx_empty;
      isr.tx_empty <= ier.tx_empty && tx_empty_p;
      intr         <= (ier.rx_trig && rx_trig_raw) || (ier.tx_trig && tx_trig_raw) ||
                      (ier.rx_error && rx_err_p) || (ier.timeout && to_hit && !rx_empty) ||
                      (ier.tx_empty && tx_empty_p);
    end
  end

  a_intr_matches_isr: assert property (@(posedge clk) disable iff (rst) intr == (|isr));

endmodule
