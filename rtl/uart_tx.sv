// uart_tx: UART transmitter, a transmit FIFO feeding the transmit shift
// register (TSR).
//
// Bytes written to THR are pushed into the 16-entry Tx FIFO. The TSR is a
// state machine with the five published states:
//   IDLE   - tx held at 1; leaves when the FIFO holds a byte (on a tick)
//   START  - tx = 0 for one bit time
//   DATA   - 5 to 8 data bits, least significant bit first
//   PARITY - optional parity bit, odd or even
//   STOP   - tx = 1 for one or two bit times
// Word length, parity and stop bits come from LCR and are latched when a byte
// is taken from the FIFO, so an LCR write never changes a frame in flight.
// One bit time is OVERSAMPLE baud-generator ticks.
//
// tx_done pulses for one cycle as a frame's last stop bit ends. tx_empty_evt
// pulses at the same moment when the FIFO holds nothing more to send: the
// transmitter tried to continue and found the FIFO empty (the "Tx empty"
// interrupt source). Which LCR bits select the frame format, the tick-aligned
// start and the end-of-frame pulses are this design's own choices.
module uart_tx
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
  input  logic          push,
  input  logic [7:0]    din,
  input  logic          clr,
  output logic          tx,
  output logic [CW-1:0] count,
  output logic          fifo_empty,
  output logic          fifo_full,
  output logic          idle,
  output logic          tx_done,
  output logic          tx_empty_evt
);

  typedef enum logic [2:0] {S_IDLE, S_START, S_DATA, S_PARITY, S_STOP} tx_state_e;

  localparam int unsigned TW = (OVERSAMPLE > 1) ? $clog2(OVERSAMPLE) : 1;

  tx_state_e    state;
  logic [TW-1:0] tcnt;        // ticks within the current bit
  logic [2:0]    bidx;        // data bit index / stop bit index
  logic [7:0]    shreg;
  logic [3:0]    nbits;
  logic          par_en, two_stop;
  logic          par_bit;
  logic [7:0]    fifo_dout;
  logic          pop;

  uart_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_txfifo (
    .clk, .rst, .clr,
    .push, .din,
    .pop, .dout(fifo_dout),
    .count, .empty(fifo_empty), .full(fifo_full)
  );

  logic bit_end;
  assign bit_end = tick && (tcnt == TW'(OVERSAMPLE - 1));
  assign pop     = (state == S_IDLE) && tick && !fifo_empty && !clr;
  assign idle    = (state == S_IDLE);

  // Parity over the data bits actually sent (unused upper bits are masked).
  function automatic logic parity_of(input logic [7:0] d, input logic [3:0] n, input logic even);
    logic [7:0] mask;
    mask = 8'hFF >> (4'd8 - n);
    return (^(d & mask)) ^ ~even;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      state        <= S_IDLE;
      tcnt         <= '0;
      bidx         <= '0;
      shreg        <= '0;
      nbits        <= 4'd8;
      par_en       <= 1'b0;
      two_stop     <= 1'b0;
      par_bit      <= 1'b0;
      tx           <= 1'b1;
      tx_done      <= 1'b0;
      tx_empty_evt <= 1'b0;
    end else begin
      tx_done      <= 1'b0;
      tx_empty_evt <= 1'b0;
      if (tick && state != S_IDLE) tcnt <= (bit_end) ? '0 : tcnt + 1'b1;
      unique case (state)
        S_IDLE: begin
          tx <= 1'b1;
          if (pop) begin
            shreg    <= fifo_dout;
            nbits    <= word_bits(lcr.wls);
            par_en   <= lcr.pen;
            two_stop <= lcr.stb;
            par_bit  <= parity_of(fifo_dout, word_bits(lcr.wls), lcr.eps);
            tcnt     <= '0;
            tx       <= 1'b0;
            state    <= S_START;
          end
        end
        S_START: begin
          if (bit_end) begin
            bidx  <= '0;
            tx    <= shreg[0];
            state <= S_DATA;
          end
        end
        S_DATA: begin
          if (bit_end) begin
            if (4'(bidx) == nbits - 4'd1) begin
              bidx <= '0;
              if (par_en) begin
                tx    <= par_bit;
                state <= S_PARITY;
              end else begin
                tx    <= 1'b1;
                state <= S_STOP;
              end
            end else begin
              bidx  <= bidx + 1'b1;
              shreg <= shreg >> 1;
              tx    <= shreg[1];
            end
          end
        end
        S_PARITY: begin
          if (bit_end) begin
            tx    <= 1'b1;
            state <= S_STOP;
          end
        end
        S_STOP: begin
          if (bit_end) begin
            if (two_stop && bidx == '0) begin
              bidx <= 3'd1;
            end else begin
              state        <= S_IDLE;
              tx_done      <= 1'b1;
              tx_empty_evt <= fifo_empty;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The line idles high.
  a_idle_high: assert property (@(posedge clk) disable iff (rst)
                                (state == S_IDLE && $past(state) == S_IDLE && !$past(rst)) |-> tx);

endmodule
