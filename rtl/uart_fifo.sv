// uart_fifo: synchronous first-in first-out buffer used for both the
// transmit FIFO (between THR and the transmit shift register) and the receive
// FIFO (between the receive shift register and RHR).
//
// The depth (16 bytes) and width (8 bits) are the published sizes. How the
// buffer is built is this design's own choice: a circular array with read and
// write pointers and an occupancy counter. The head entry is always visible on
// dout (first-word fall-through), so a pop and the use of dout happen in the
// same cycle. A push to a full FIFO and a pop from an empty one are ignored.
// A simultaneous push and pop on a non-empty FIFO keeps the count unchanged.
// clr empties the FIFO in one cycle (used by the FCR FIFO-reset bits).
//
// Timing: push/pop take effect at the clock edge; count, empty and full are
// registered-state derived and change in the following cycle.
module uart_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clr,
  input  logic             push,
  input  logic [WIDTH-1:0] din,
  input  logic             pop,
  output logic [WIDTH-1:0] dout,
  output logic [CW-1:0]    count,
  output logic             empty,
  output logic             full
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;

  logic do_push, do_pop;
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;

  assign empty = (count == '0);
  assign full  = (count == CW'(DEPTH));
  assign dout  = mem[rptr];

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_push) mem[wptr] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_push) wptr <= next_ptr(wptr);
      if (do_pop)  rptr <= next_ptr(rptr);
      case ({do_push, do_pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  // Occupancy never exceeds the depth.
  a_count_range: assert property (@(posedge clk) disable iff (rst) count <= CW'(DEPTH));

endmodule
