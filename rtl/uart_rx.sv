// uart_rx: UART receiver, the receive shift register (RSR) feeding a receive
// FIFO that is read through RHR.
//
// The rx line first passes a two-flop synchroniser. In IDLE the RSR waits for
// a 0 on the line at a baud tick. It then counts OVERSAMPLE/2 ticks to the
// centre of the start bit and checks that the line is still 0; a shorter low
// pulse is treated as a glitch and ignored. From there it samples every
// following bit once, OVERSAMPLE ticks apart, i.e. at the centre of each bit
// period. Data bits arrive least significant bit first and are shifted in
// from the top of the shift register. The optional parity bit is compared
// with the parity of the received data; the (first) stop bit must be 1 or a
// framing error is flagged. Start, parity and stop bits are removed and the
// data byte is pushed into the 16-entry Rx FIFO.
//
// On the cycle a byte is complete, rx_done pulses together with pe (parity
// error) and fe (framing error) for that byte; oe pulses instead of a push
// when the FIFO is full (the byte is lost). Frame format comes from LCR and
// is latched at the start bit. Centre sampling and removal of framing bits
// follow the published description; the synchroniser, glitch check, the
// error pulses and the overrun flag are this design's own details.
module uart_rx
  import uart_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 16,
  parameter int unsigned OVERSAMPLE = 16,
  localparam int unsigned CW = $clog2(FIFO_DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          tick,
  input  lcr_t          lcr,
  input  logic          rx,
  input  logic          pop,
  input  logic          clr,
  output logic [7:0]    dout,
  output logic [CW-1:0] count,
  output logic          fifo_empty,
  output logic          fifo_full,
  output logic          rx_done,
  output logic          pe,
  output logic          fe,
  output logic          oe
);

  typedef enum logic [2:0] {S_IDLE, S_START, S_DATA, S_PARITY, S_STOP} rx_state_e;

  localparam int unsigned TW = (OVERSAMPLE > 1) ? $clog2(OVERSAMPLE) : 1;

  logic          rx_meta, rx_s;
  rx_state_e     state;
  logic [TW-1:0] tcnt;
  logic [2:0]    bidx;
  logic [7:0]    shreg;
  logic [3:0]    nbits;
  logic          par_en, par_even;
  logic          par_ok;
  logic          push;
  logic [7:0]    byte_q;

  uart_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_rxfifo (
    .clk, .rst, .clr,
    .push, .din(byte_q),
    .pop, .dout,
    .count, .empty(fifo_empty), .full(fifo_full)
  );

  logic half_bit, full_bit;
  assign half_bit = tick && (tcnt == TW'(OVERSAMPLE / 2 - 1));
  assign full_bit = tick && (tcnt == TW'(OVERSAMPLE - 1));

  // Received data aligned to bit 0 (the shift register fills from the top).
  logic [7:0] aligned;
  assign aligned = shreg >> (4'd8 - nbits);

  always_ff @(posedge clk) begin
    if (rst) begin
      rx_meta  <= 1'b1;
      rx_s     <= 1'b1;
      state    <= S_IDLE;
      tcnt     <= '0;
      bidx     <= '0;
      shreg    <= '0;
      nbits    <= 4'd8;
      par_en   <= 1'b0;
      par_even <= 1'b0;
      par_ok   <= 1'b1;
      push     <= 1'b0;
      byte_q   <= '0;
      rx_done  <= 1'b0;
      pe       <= 1'b0;
      fe       <= 1'b0;
      oe       <= 1'b0;
    end else begin
      rx_meta <= rx;
      rx_s    <= rx_meta;
      push    <= 1'b0;
      rx_done <= 1'b0;
      pe      <= 1'b0;
      fe      <= 1'b0;
      oe      <= 1'b0;
      if (tick) tcnt <= tcnt + 1'b1;
      unique case (state)
        S_IDLE: begin
          tcnt <= '0;
          if (tick && !rx_s) begin
            nbits    <= word_bits(lcr.wls);
            par_en   <= lcr.pen;
            par_even <= lcr.eps;
            state    <= S_START;
          end
        end
        S_START: begin
          if (half_bit) begin
            tcnt <= '0;
            bidx <= '0;
            state <= rx_s ? S_IDLE : S_DATA;
          end
        end
        S_DATA: begin
          if (full_bit) begin
            tcnt  <= '0;
            shreg <= {rx_s, shreg[7:1]};
            if (4'(bidx) == nbits - 4'd1) begin
              state <= par_en ? S_PARITY : S_STOP;
            end else begin
              bidx <= bidx + 1'b1;
            end
          end
        end
        S_PARITY: begin
          if (full_bit) begin
            tcnt   <= '0;
            // even parity: data bits plus parity bit hold an even number of 1s
            par_ok <= ((^aligned) ^ rx_s) == !par_even;
            state  <= S_STOP;
          end
        end
        S_STOP: begin
          if (full_bit) begin
            tcnt    <= '0;
            byte_q  <= aligned;
            rx_done <= 1'b1;
            pe      <= par_en && !par_ok;
            fe      <= !rx_s;
            push    <= !fifo_full;
            oe      <= fifo_full;
            par_ok  <= 1'b1;
            state   <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
