// uart_regs: configuration module, the UART's register file.
//
// Nine 8-bit registers are decoded from a 4-bit address, as published:
//   0x0 THR  W    write pushes a byte into the Tx FIFO
//   0x1 RHR  R    read returns and pops the head of the Rx FIFO (0 if empty)
//   0x2 FCR  W    [7:6] Rx trigger, [5:4] Tx trigger, [2] Tx FIFO clear,
//                 [1] Rx FIFO clear (clears are one-shot)
//   0x3 LCR  R/W  [1:0] word length 5..8, [2] two stop bits, [3] parity
//                 enable, [4] even parity, [7:5] stored only
//   0x4 LSR  R    [0] data ready, [1] overrun, [2] parity error, [3] framing
//                 error, [4] Tx FIFO full, [5] Tx FIFO empty, [6] transmitter empty (FIFO and
//                 shift register), [7] any receive error; bits 1-3 are sticky
//                 and cleared by reading LSR
//   0x5 IER  R/W  [0] Rx trigger, [1] Tx trigger, [2] receive error,
//                 [3] timeout, [4] Tx empty; [7:5] stored only
//   0x6 ISR  R    pending enabled interrupts in IER bit order, [7] = intr
//   0x7 DLL  W    divisor low byte
//   0x8 DLH  W    divisor high byte
// Addresses, names and access directions follow the published memory map;
// the bit layouts inside the registers are this design's own (16550-like).
// Writes to read-only and unused addresses and reads of write-only and unused
// addresses (which return 0) have no effect.
//
// Timing: reg_wr/reg_rd are one-cycle strobes. A write takes effect at that
// clock edge; tx_push and rx_pop are combinational from the strobe. data_out
// is registered at the read strobe and holds until the next read.
module uart_regs
  import uart_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  // register access
  input  logic       reg_rd,
  input  logic       reg_wr,
  input  logic [3:0] reg_addr,
  input  logic [7:0] reg_wdata,
  output logic [7:0] data_out,
  // configuration
  output lcr_t       lcr,
  output irq_t       ier,
  output logic [1:0] rx_trig_sel,
  output logic [1:0] tx_trig_sel,
  output logic       rx_clr,
  output logic       tx_clr,
  output logic [15:0] divisor,
  // FIFO access
  output logic       tx_push,
  output logic [7:0] tx_data,
  output logic       rx_pop,
  input  logic [7:0] rx_data,
  // status
  input  logic       rx_empty,
  input  logic       tx_fifo_empty,
  input  logic       tx_fifo_full,
  input  logic       tx_idle,
  input  logic       pe,
  input  logic       fe,
  input  logic       oe,
  input  irq_t       isr
);

  logic [2:0] ier_hi;
  logic       oe_s, pe_s, fe_s;
  logic [7:0] lsr;
  fcr_t       fcr_w;

  logic wr_thr, wr_fcr, wr_lcr, wr_ier, wr_dll, wr_dlh, rd_rhr, rd_lsr;
  assign wr_thr = reg_wr && reg_addr == ADDR_THR;
  assign wr_fcr = reg_wr && reg_addr == ADDR_FCR;
  assign wr_lcr = reg_wr && reg_addr == ADDR_LCR;
  assign wr_ier = reg_wr && reg_addr == ADDR_IER;
  assign wr_dll = reg_wr && reg_addr == ADDR_DLL;
  assign wr_dlh = reg_wr && reg_addr == ADDR_DLH;
  assign rd_rhr = reg_rd && reg_addr == ADDR_RHR;
  assign rd_lsr = reg_rd && reg_addr == ADDR_LSR;

  assign fcr_w   = fcr_t'(reg_wdata);
  assign tx_push = wr_thr;
  assign tx_data = reg_wdata;
  assign rx_pop  = rd_rhr;
  assign rx_clr  = wr_fcr && fcr_w.rx_clr;
  assign tx_clr  = wr_fcr && fcr_w.tx_clr;

  assign lsr = {(oe_s || pe_s || fe_s), (tx_fifo_empty && tx_idle), tx_fifo_empty, tx_fifo_full,
                fe_s, pe_s, oe_s, !rx_empty};

  always_ff @(posedge clk) begin
    if (rst) begin
      lcr         <= lcr_t'(8'h03);   // 8 data bits, 1 stop bit, no parity
      ier         <= '0;
      ier_hi      <= '0;
      rx_trig_sel <= 2'b00;
      tx_trig_sel <= 2'b00;
      divisor     <= '0;
    end else begin
      if (wr_lcr) lcr <= lcr_t'(reg_wdata);
      if (wr_ier) {ier_hi, ier} <= reg_wdata;
      if (wr_fcr) begin
        rx_trig_sel <= fcr_w.rx_trig;
        tx_trig_sel <= fcr_w.tx_trig;
      end
      if (wr_dll) divisor[7:0]  <= reg_wdata;
      if (wr_dlh) divisor[15:8] <= reg_wdata;
    end
  end

  // Sticky receive error flags: a new error wins over a clearing LSR read.
  always_ff @(posedge clk) begin
    if (rst) begin
      oe_s <= 1'b0;
      pe_s <= 1'b0;
      fe_s <= 1'b0;
    end else begin
      if (rd_lsr) begin
        oe_s <= 1'b0;
        pe_s <= 1'b0;
        fe_s <= 1'b0;
      end
      if (oe) oe_s <= 1'b1;
      if (pe) pe_s <= 1'b1;
      if (fe) fe_s <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      data_out <= '0;
    end else if (reg_rd) begin
      case (reg_addr)
        ADDR_RHR: data_out <= rx_empty ? 8'h00 : rx_data;
        ADDR_LCR: data_out <= lcr;
        ADDR_LSR: data_out <= lsr;
        ADDR_IER: data_out <= {ier_hi, ier};
        ADDR_ISR: data_out <= {(|isr), 2'b00, isr};
        default:  data_out <= 8'h00;
      endcase
    end
  end

endmodule
