// uart_brg: baud rate generator.
//
// Divides the system clock by the 16-bit divisor formed from the DLH (high)
// and DLL (low) registers and emits a one-cycle tick once per divisor period.
// The tick is the sampling clock enable: the transmitter holds each bit for
// OVERSAMPLE ticks and the receiver samples at that rate, so
//     divisor = f_clk / (baud rate * OVERSAMPLE),
// which is the published divisor formula. The counter implementation, the
// choice that a divisor of 0 stops the ticks, and the restart of the count
// whenever the divisor changes are this design's own.
//
// Timing: with divisor N >= 1 the tick is high for one cycle in every N
// cycles (every cycle when N = 1).
module uart_brg (
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] divisor,
  output logic        tick
);

  logic [15:0] cnt;
  logic [15:0] div_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt   <= '0;
      tick  <= 1'b0;
      div_q <= '0;
    end else begin
      div_q <= divisor;
      if (divisor == '0 || divisor != div_q) begin
        cnt  <= '0;
        tick <= 1'b0;
      end else if (cnt >= divisor - 16'd1) begin
        cnt  <= '0;
        tick <= 1'b1;
      end else begin
        cnt  <= cnt + 16'd1;
        tick <= 1'b0;
      end
    end
  end

endmodule
