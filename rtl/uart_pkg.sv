// uart_pkg: register addresses, register field layouts and small helpers
// shared by the UART modules.
//
// The nine register names and their addresses (0x0 .. 0x8) follow the
// published memory map. The bit layouts inside LCR, FCR, LSR, IER and ISR are
// not published; the layouts below are this design's own, modelled on the
// common 16550-style UART where that fits the described features.
package uart_pkg;

  // Register map (4-bit address, 8-bit registers)
  typedef enum logic [3:0] {
    ADDR_THR = 4'h0,  // W   transmit holding register (push into Tx FIFO)
    ADDR_RHR = 4'h1,  // R   receive holding register  (pop from Rx FIFO)
    ADDR_FCR = 4'h2,  // W   FIFO control
    ADDR_LCR = 4'h3,  // R/W line control
    ADDR_LSR = 4'h4,  // R   line status
    ADDR_IER = 4'h5,  // R/W interrupt enable
    ADDR_ISR = 4'h6,  // R   interrupt status
    ADDR_DLL = 4'h7,  // W   divisor latch, low byte
    ADDR_DLH = 4'h8   // W   divisor latch, high byte
  } reg_addr_e;

  // Line control register.
  //   wls : word length, 00=5 01=6 10=7 11=8 data bits
  //   stb : 0 = one stop bit, 1 = two stop bits
  //   pen : parity enable
  //   eps : 1 = even parity, 0 = odd parity
  //   rsvd: stored and read back, no function
  typedef struct packed {
    logic [2:0] rsvd;
    logic       eps;
    logic       pen;
    logic       stb;
    logic [1:0] wls;
  } lcr_t;

  // FIFO control register (write only).
  //   rx_trig/tx_trig : trigger level select, 00=1 01=4 10=8 11=14 bytes
  //   tx_clr/rx_clr   : self-clearing FIFO reset
  typedef struct packed {
    logic [1:0] rx_trig;
    logic [1:0] tx_trig;
    logic       rsvd;
    logic       tx_clr;
    logic       rx_clr;
    logic       rsvd0;
  } fcr_t;

  // Interrupt sources, one bit each in IER and ISR.
  typedef struct packed {
    logic tx_empty;   // bit 4: transmitter found Tx FIFO empty after a frame
    logic timeout;    // bit 3: data left in Rx FIFO for TIMEOUT_BITS bit-times
    logic rx_error;   // bit 2: parity or framing error in received data
    logic tx_trig;    // bit 1: Tx FIFO drained to its trigger level
    logic rx_trig;    // bit 0: Rx FIFO filled to its trigger level
  } irq_t;

  // Trigger level in bytes for a 2-bit FCR selection.
  function automatic logic [4:0] trig_level(input logic [1:0] sel);
    case (sel)
      2'b00:   return 5'd1;
      2'b01:   return 5'd4;
      2'b10:   return 5'd8;
      default: return 5'd14;
    endcase
  endfunction

  // Number of data bits for an LCR word-length field.
  function automatic logic [3:0] word_bits(input logic [1:0] wls);
    return 4'd5 + {2'b00, wls};
  endfunction

endpackage
