// uart_rx_tb: self-checking test of the receiver (RSR + Rx FIFO) with a
// tick every 6 clocks (divisor 6, as in the receive example) and 16
// ticks per bit. A serial driver produces frames for every word length,
// parity setting and stop-bit count, some with a wrong parity bit or a 0 stop
// bit, plus short low glitches. For each frame the test checks rx_done, the
// pe/fe flags, the byte in the Rx FIFO and that the byte was taken near the
// middle of the stop bit (the receiver samples at bit centres). A 17th byte
// arriving at a full FIFO must raise oe and be lost. The first byte is
// 11101000 with LCR = 00000011, the receive example of the design
// description.
module uart_rx_tb;
  import uart_pkg::*;
  localparam int OS = 16;
  localparam int D  = 6;              // clock cycles per tick: DLL = 6, as in the receive example
  localparam int BIT = OS * D;        // clock cycles per bit

  logic clk = 0, rst = 1, tick = 0;
  lcr_t lcr;
  logic rx = 1, pop = 0, clr = 0;
  logic [7:0] dout;
  logic [4:0] count;
  logic fifo_empty, fifo_full, rx_done, pe, fe, oe;
  int checks = 0, failures = 0;
  int n_pe = 0, n_fe = 0, n_oe = 0, n_done = 0;

  uart_rx dut (.*);

  always #5 clk = ~clk;

  int tcnt = 0;
  always @(posedge clk) begin
    tcnt <= (tcnt == D - 1) ? 0 : tcnt + 1;
    tick <= (tcnt == D - 1);
  end

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    if (!rst) begin
      if (rx_done) n_done++;
      if (pe) n_pe++;
      if (fe) n_fe++;
      if (oe) n_oe++;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #200000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Drive one frame and check the receiver's reaction.
  task automatic frame(input logic [7:0] d, input bit bad_par, input bit bad_stop,
                       input bit expect_store);
    int n, nb, t0, tdone, lo, hi;
    logic [7:0] m;
    logic par;
    bit got_done, got_pe, got_fe, got_oe;
    n = 5 + int'(lcr.wls);
    m = 8'hFF >> (8 - n);
    par = (lcr.eps ? ^(d & m) : ~^(d & m)) ^ bad_par;
    nb = 1 + n + int'(lcr.pen) + 1;
    got_done = 0; got_pe = 0; got_fe = 0; got_oe = 0; tdone = 0;
    @(negedge clk);
    t0 = cyc;
    fork
      begin
        rx = 0;
        repeat (BIT) @(negedge clk);
        for (int i = 0; i < n; i++) begin
          rx = d[i];
          repeat (BIT) @(negedge clk);
        end
        if (lcr.pen) begin
          rx = par;
          repeat (BIT) @(negedge clk);
        end
        rx = !bad_stop;
        repeat (BIT) @(negedge clk);
        rx = 1;
        if (lcr.stb) repeat (BIT) @(negedge clk);
        repeat (BIT / 4) @(negedge clk);
      end
      begin
        while (cyc - t0 < (nb + 2) * BIT) begin
          @(posedge clk); #1;
          if (rx_done && !got_done) begin
            got_done = 1; tdone = cyc;
            got_pe = pe; got_fe = fe; got_oe = oe;
          end
        end
      end
    join
    check(got_done, "no rx_done");
    lo = nb * BIT - BIT / 2;
    hi = lo + D + 6;
    check(tdone - t0 >= lo && tdone - t0 <= hi,
          $sformatf("rx_done after %0d cycles, expected %0d..%0d", tdone - t0, lo, hi));
    check(got_pe == (lcr.pen && bad_par), "parity error flag");
    check(got_fe == bad_stop, "framing error flag");
    check(got_oe == !expect_store, "overrun flag");
  endtask

  task automatic read_check(input logic [7:0] exp);
    @(negedge clk);
    check(!fifo_empty, "FIFO empty on read");
    check(dout == exp, $sformatf("RHR %b expected %b", dout, exp));
    pop = 1;
    @(negedge clk);
    pop = 0;
  endtask

  initial begin
    logic [7:0] d, e;
    lcr = lcr_t'(8'h03);
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (10) @(posedge clk);
    // example from the description
    frame(8'b11101000, 0, 0, 1);
    repeat (2) @(negedge clk);
    read_check(8'b11101000);
    // all formats, good frames, then with parity / framing errors
    for (int l = 0; l < 32; l++) begin
      lcr = lcr_t'(8'(l));
      e = 8'hFF >> (3 - lcr.wls);
      d = 8'($urandom);
      frame(d, 0, 0, 1);
      repeat (2) @(negedge clk);
      read_check(d & e);
      d = 8'($urandom);
      frame(d, 1, 0, 1);
      repeat (2) @(negedge clk);
      read_check(d & e);
      d = 8'($urandom);
      frame(d, 0, 1, 1);
      repeat (2) @(negedge clk);
      read_check(d & e);
    end
    // glitches shorter than half a bit are ignored
    lcr = lcr_t'(8'h03);
    repeat (3) begin
      @(negedge clk) rx = 0;
      repeat (BIT / 4) @(negedge clk);
      rx = 1;
      repeat (3 * BIT) @(negedge clk);
    end
    check(fifo_empty, "glitch produced a byte");
    // fill the FIFO, then overrun
    for (int i = 0; i < 16; i++) frame(8'(i * 13 + 1), 0, 0, 1);
    check(fifo_full && count == 16, "FIFO full after 16 bytes");
    frame(8'hEE, 0, 0, 0);
    for (int i = 0; i < 16; i++) read_check(8'(i * 13 + 1));
    check(fifo_empty, "FIFO empty after reading all");
    // clear
    frame(8'h42, 0, 0, 1);
    @(negedge clk) clr = 1;
    @(negedge clk) clr = 0;
    check(fifo_empty, "clear empties the FIFO");
    check(n_pe == 16 && n_fe == 32 && n_oe == 1,
          $sformatf("error counts pe=%0d fe=%0d oe=%0d", n_pe, n_fe, n_oe));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
