// uart_top: programmable full-duplex UART for a host processor bus.
//
// Six parts, as in the published block diagram:
//   interface            (uart_bus_sync) synchronises cs/rd/wr from the host
//   configuration module (uart_regs)     nine 8-bit registers
//   baud rate generator  (uart_brg)      divisor {DLH,DLL} -> sampling tick
//   transmitter          (uart_tx)       THR -> 16-byte Tx FIFO -> TSR -> tx
//   receiver             (uart_rx)       rx -> RSR -> 16-byte Rx FIFO -> RHR
//   interrupt controller (uart_intr)     trigger level, timeout, Tx empty and
//                                        receive error interrupts -> intr
// The transmitter and receiver share the one baud tick, so both directions
// run at the same baud rate, f_clk / (divisor * OVERSAMPLE), and can run at
// the same time.
//
// Host access: hold addr (and data_in for a write), raise cs together with
// wr or rd for at least 4 clk cycles, then drop them for at least 3 cycles.
// Read data appears on data_out 4 clk edges after cs & rd are first sampled
// and holds until the next read. The reset is synchronous and active high;
// after reset LCR selects 8 data bits, 1 stop bit, no parity, the divisor is
// 0 (no baud ticks) and all interrupts are disabled.
module uart_top
  import uart_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH   = 16,
  parameter int unsigned OVERSAMPLE   = 16,
  parameter int unsigned TIMEOUT_BITS = 44
) (
  input  logic       clk,
  input  logic       reset,
  input  logic       cs,
  input  logic       rd,
  input  logic       wr,
  input  logic [3:0] addr,
  input  logic [7:0] data_in,
  output logic [7:0] data_out,
  output logic       intr,
  input  logic       intr_ack,
  output logic       tx,
  input  logic       rx
);

  localparam int unsigned CW = $clog2(FIFO_DEPTH + 1);

  logic        reg_rd, reg_wr;
  logic [3:0]  reg_addr;
  logic [7:0]  reg_wdata;
  lcr_t        lcr;
  irq_t        ier, isr;
  logic [1:0]  rx_trig_sel, tx_trig_sel;
  logic        rx_clr, tx_clr;
  logic [15:0] divisor;
  logic        tick;
  logic        tx_push, rx_pop;
  logic [7:0]  tx_data, rx_data;
  logic [CW-1:0] tx_count, rx_count;
  logic        tx_fifo_empty, tx_fifo_full, tx_idle, tx_done, tx_empty_evt;
  logic        rx_fifo_empty, rx_fifo_full, rx_done, pe, fe, oe;

  uart_bus_sync u_if (
    .clk, .rst(reset), .cs, .rd, .wr, .addr, .data_in,
    .reg_rd, .reg_wr, .reg_addr, .reg_wdata
  );

  uart_regs u_regs (
    .clk, .rst(reset),
    .reg_rd, .reg_wr, .reg_addr, .reg_wdata, .data_out,
    .lcr, .ier, .rx_trig_sel, .tx_trig_sel, .rx_clr, .tx_clr, .divisor,
    .tx_push, .tx_data, .rx_pop, .rx_data,
    .rx_empty(rx_fifo_empty), .tx_fifo_empty, .tx_fifo_full, .tx_idle, .pe, .fe, .oe, .isr
  );

  uart_brg u_brg (
    .clk, .rst(reset), .divisor, .tick
  );

  uart_tx #(.FIFO_DEPTH(FIFO_DEPTH), .OVERSAMPLE(OVERSAMPLE)) u_tx (
    .clk, .rst(reset), .tick, .lcr,
    .push(tx_push), .din(tx_data), .clr(tx_clr),
    .tx, .count(tx_count), .fifo_empty(tx_fifo_empty), .fifo_full(tx_fifo_full),
    .idle(tx_idle), .tx_done, .tx_empty_evt
  );

  uart_rx #(.FIFO_DEPTH(FIFO_DEPTH), .OVERSAMPLE(OVERSAMPLE)) u_rx (
    .clk, .rst(reset), .tick, .lcr, .rx,
    .pop(rx_pop), .clr(rx_clr), .dout(rx_data),
    .count(rx_count), .fifo_empty(rx_fifo_empty), .fifo_full(rx_fifo_full),
    .rx_done, .pe, .fe, .oe
  );

  uart_intr #(.FIFO_DEPTH(FIFO_DEPTH), .OVERSAMPLE(OVERSAMPLE), .TIMEOUT_BITS(TIMEOUT_BITS)) u_intr (
    .clk, .rst(reset), .tick, .ier,
    .rx_trig_sel, .tx_trig_sel, .rx_count, .tx_count,
    .rx_empty(rx_fifo_empty), .rx_done, .rx_err(pe || fe), .tx_empty_evt,
    .rhr_rd(rx_pop), .intr_ack, .isr, .intr
  );

endmodule
