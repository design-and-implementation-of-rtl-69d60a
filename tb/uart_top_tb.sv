// uart_top_tb: end-to-end test of the complete UART at its default
// parameters (16-byte FIFOs, 16 ticks per bit, 44 bit-time timeout).
//
// A host model drives cs/rd/wr/addr/data_in with timing unrelated to the UART
// clock. An independent serial decoder watches tx and a serial driver feeds
// rx; rx can also be looped back from tx. The test runs, and counts, every
// mechanism of the design:
//   duplex      - 11100100 sent while 11101000 is received, at the 57.6 kbit/s
//                 setting (DLL = 18, 16.5888 MHz clock), as in the published
//                 full-module example
//   tx_empty    - Tx-empty interrupt after the last frame, cleared by intr_ack
//   rx_trigger  - Rx trigger-level interrupt at 4 bytes
//   tx_trigger  - Tx trigger-level interrupt when the Tx FIFO drains to 4
//   timeout     - receive timeout interrupt 44 bit-times after the last byte
//   rx_error    - parity and framing errors in LSR and as an interrupt
//   overrun     - 17th byte into a full Rx FIFO
//   fifo_clear  - FCR clears both FIFOs
//   format      - frame format switched to 5..8 bits, parity, 2 stop bits
// Each mechanism that never happens counts as a failure.
module uart_top_tb;
  localparam int CLK_NS = 10;

  logic clk = 0, reset = 1;
  logic cs = 0, rd = 0, wr = 0;
  logic [3:0] addr = 0;
  logic [7:0] data_in = 0, data_out;
  logic intr, intr_ack = 0;
  logic tx, rx;
  logic loop_en = 0, drv_rx = 1;
  int checks = 0, failures = 0;

  assign rx = loop_en ? tx : drv_rx;

  uart_top dut (.*);

  always #(CLK_NS / 2) clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------------
  // host bus model (asynchronous to clk)
  task automatic bus_write(input logic [3:0] a, input logic [7:0] d);
    addr = a; data_in = d;
    #7;
    cs = 1; wr = 1;
    #(6 * CLK_NS + 3);
    cs = 0; wr = 0;
    #(4 * CLK_NS + 1);
  endtask

  task automatic bus_read(input logic [3:0] a, output logic [7:0] d);
    addr = a;
    #7;
    cs = 1; rd = 1;
    #(6 * CLK_NS + 3);
    d = data_out;
    cs = 0; rd = 0;
    #(4 * CLK_NS + 1);
  endtask

  localparam logic [3:0] THR = 0, RHR = 1, FCR = 2, LCR = 3, LSR = 4,
                         IER = 5, ISR = 6, DLL = 7, DLH = 8;

  // line settings shared by the decoder and the driver
  int         div = 18;
  logic [7:0] lcr_v = 8'h03;
  function automatic int bit_cycles();
    return 16 * div;
  endfunction

  // ------------------------------------------------------------------
  // independent tx decoder
  logic [7:0] tx_seen[$];
  int tx_bad_frames = 0;
  initial begin
    forever begin
      int n, b;
      logic [7:0] d;
      logic p;
      @(negedge clk);
      if (reset || tx) continue;
      b = bit_cycles();
      n = 5 + int'(lcr_v[1:0]);
      repeat (b / 2) @(negedge clk);
      if (tx) continue;   // not a start bit
      d = 0;
      for (int i = 0; i < n; i++) begin
        repeat (b) @(negedge clk);
        d[i] = tx;
      end
      if (lcr_v[3]) begin
        repeat (b) @(negedge clk);
        p = tx;
        if (p != (lcr_v[4] ? ^d : ~^d)) tx_bad_frames++;
      end
      repeat (b) @(negedge clk);
      if (!tx) tx_bad_frames++;
      tx_seen.push_back(d);
    end
  end

  // serial driver for rx
  task automatic drive_frame(input logic [7:0] d, input bit bad_par = 0, input bit bad_stop = 0);
    int n, b;
    logic [7:0] m;
    b = bit_cycles();
    n = 5 + int'(lcr_v[1:0]);
    m = 8'hFF >> (8 - n);
    drv_rx = 0;
    repeat (b) @(negedge clk);
    for (int i = 0; i < n; i++) begin
      drv_rx = d[i];
      repeat (b) @(negedge clk);
    end
    if (lcr_v[3]) begin
      drv_rx = (lcr_v[4] ? ^(d & m) : ~^(d & m)) ^ bad_par;
      repeat (b) @(negedge clk);
    end
    drv_rx = !bad_stop;
    repeat (b) @(negedge clk);
    drv_rx = 1;
    repeat (lcr_v[2] ? b : 0) @(negedge clk);
    repeat (b) @(negedge clk);   // idle gap
  endtask

  // ------------------------------------------------------------------
  int n_duplex = 0, n_tx_empty = 0, n_rx_trig = 0, n_tx_trig = 0, n_timeout = 0;
  int n_rx_error = 0, n_overrun = 0, n_fifo_clear = 0, n_format = 0;

  task automatic wait_intr(input int max_cycles, output bit seen);
    seen = 0;
    for (int i = 0; i < max_cycles; i++) begin
      @(negedge clk);
      if (intr) begin seen = 1; break; end
    end
  endtask

  task automatic wait_tx_done();
    logic [7:0] s;
    int polls;
    polls = 0;
    do begin
      bus_read(LSR, s);
      polls++;
    end while (!s[6] && polls < 1000);
    check(s[6], "transmitter never became empty");
    repeat (2 * bit_cycles()) @(negedge clk);
  endtask

  task automatic set_lcr(input logic [7:0] v);
    bus_write(LCR, v);
    lcr_v = v;
  endtask

  initial begin
    logic [7:0] d, s;
    bit seen;
    int t0, t1;
    repeat (4) @(posedge clk);
    reset = 0;
    repeat (4) @(posedge clk);

    // -- configuration: 57.6 kbit/s example, 8N1
    bus_write(DLL, 8'd18);
    bus_write(DLH, 8'd0);
    set_lcr(8'h03);
    bus_read(LCR, d); check(d == 8'h03, "LCR readback");
    bus_read(LSR, s); check(s == 8'b0110_0000, $sformatf("LSR after reset %b", s));

    // -- full duplex: send 11100100 while 11101000 arrives
    bus_write(IER, 8'b0001_0000);          // Tx empty interrupt only
    bus_write(THR, 8'b11100100);
    drive_frame(8'b11101000);
    wait_tx_done();
    check(tx_seen.size() == 1 && tx_seen[0] == 8'b11100100, "tx of 11100100");
    bus_read(LSR, s); check(s[0], "data ready");
    bus_read(RHR, d); check(d == 8'b11101000, $sformatf("rx of 11101000, got %b", d));
    if (tx_seen.size() == 1 && d == 8'b11101000) n_duplex++;
    void'(tx_seen.pop_front());

    // -- Tx empty interrupt and its acknowledge
    check(intr, "Tx empty interrupt raised");
    bus_read(ISR, d);
    check(d == 8'b1001_0000, $sformatf("ISR Tx empty %b", d));
    @(negedge clk) intr_ack = 1;
    @(negedge clk) intr_ack = 0;
    repeat (3) @(negedge clk);
    check(!intr, "intr_ack clears Tx empty");
    if (d[4] && !intr) n_tx_empty++;

    // faster line for the rest
    div = 2;
    bus_write(DLL, 8'd2);
    repeat (40) @(negedge clk);

    // -- Rx trigger level 4 (loopback)
    loop_en = 1;
    bus_write(FCR, 8'b0100_0000);          // Rx trigger 4, Tx trigger 1
    bus_write(IER, 8'b0000_0001);
    for (int i = 0; i < 4; i++) bus_write(THR, 8'(8'h30 + i));
    t0 = $time;
    wait_intr(4 * 12 * bit_cycles(), seen);
    check(seen, "Rx trigger interrupt");
    bus_read(ISR, d);
    check(d == 8'b1000_0001, $sformatf("ISR Rx trigger %b", d));
    if (seen && d[0]) n_rx_trig++;
    bus_read(LSR, s);
    for (int i = 0; i < 4; i++) begin
      bus_read(RHR, d);
      check(d == 8'(8'h30 + i), $sformatf("loopback byte %0d = %h", i, d));
    end
    repeat (5) @(negedge clk);
    check(!intr, "Rx trigger cleared by reading");
    check(tx_seen.size() == 4, "4 bytes seen on tx");
    tx_seen.delete();

    // -- Tx trigger: fill the Tx FIFO, interrupt once it drains to 4
    loop_en = 0;
    bus_write(FCR, 8'b0001_0000);          // Tx trigger 4
    bus_write(IER, 8'b0000_0010);
    for (int i = 0; i < 14; i++) bus_write(THR, 8'(8'h50 + i));
    bus_read(ISR, d);
    check(d == 0, $sformatf("no Tx trigger while FIFO above level, ISR %b", d));
    wait_intr(20 * 12 * bit_cycles(), seen);
    check(seen, "Tx trigger interrupt");
    // at least 9 frames must have gone (14 queued, 4 left, one in the TSR)
    check(tx_seen.size() >= 8 && tx_seen.size() <= 10,
          $sformatf("Tx trigger after %0d frames", tx_seen.size()));
    if (seen) n_tx_trig++;
    bus_write(IER, 8'h00);
    wait_tx_done();
    check(tx_seen.size() == 14, $sformatf("14 frames sent, saw %0d", tx_seen.size()));
    foreach (tx_seen[i]) check(tx_seen[i] == 8'(8'h50 + i), "Tx FIFO order");
    tx_seen.delete();

    // -- receive timeout: 2 bytes below the trigger level of 8
    bus_write(FCR, 8'b1000_0000);          // Rx trigger 8
    bus_write(IER, 8'b0000_1001);          // Rx trigger + timeout
    drive_frame(8'hA1);
    drive_frame(8'hA2);
    t0 = $time / CLK_NS;
    wait_intr(60 * bit_cycles(), seen);
    t1 = $time / CLK_NS;
    check(seen, "timeout interrupt");
    // the counter restarts at the last stop-bit sample, half a bit plus the
    // one-bit idle gap before t0; 44 bit-times from there
    check(t1 - t0 >= 42 * bit_cycles() && t1 - t0 <= 44 * bit_cycles(),
          $sformatf("timeout after %0d cycles", t1 - t0));
    bus_read(ISR, d);
    check(d == 8'b1000_1000, $sformatf("ISR timeout %b", d));
    if (seen && d[3]) n_timeout++;
    bus_read(RHR, d); check(d == 8'hA1, "timeout byte 1");
    bus_read(RHR, d); check(d == 8'hA2, "timeout byte 2");
    repeat (5) @(negedge clk);
    check(!intr, "timeout cleared by reading");

    // -- receive errors: parity, then framing
    set_lcr(8'b0001_1011);                 // 8 bits, even parity, 1 stop
    bus_write(IER, 8'b0000_0100);
    drive_frame(8'h3C, 1, 0);
    repeat (5) @(negedge clk);
    check(intr, "parity error interrupt");
    bus_read(LSR, s);
    check(s[2] && s[7] && !s[3], $sformatf("LSR parity error %b", s));
    bus_read(ISR, d);
    if (intr && d[2] && s[2]) n_rx_error++;
    bus_read(RHR, d); check(d == 8'h3C, "byte with parity error is kept");
    @(negedge clk) intr_ack = 1;
    @(negedge clk) intr_ack = 0;
    repeat (3) @(negedge clk);
    check(!intr, "intr_ack clears receive error");
    drive_frame(8'hC3, 0, 1);
    repeat (5) @(negedge clk);
    bus_read(LSR, s);
    check(s[3] && s[7] && !s[2], $sformatf("LSR framing error %b", s));
    if (intr && s[3]) n_rx_error++;
    bus_read(LSR, s);
    check(!s[3] && !s[2] && !s[7], "LSR errors cleared by reading");
    @(negedge clk) intr_ack = 1;
    @(negedge clk) intr_ack = 0;
    // let the receiver resynchronise after the 0 stop bit, then flush
    repeat (3 * bit_cycles()) @(negedge clk);
    bus_write(FCR, 8'b0000_0010);
    bus_write(IER, 8'h00);

    // -- overrun: 17 bytes with no reads
    set_lcr(8'h03);
    for (int i = 0; i < 17; i++) drive_frame(8'(i + 1));
    bus_read(LSR, s);
    check(s[1] && s[0], $sformatf("LSR overrun %b", s));
    if (s[1]) n_overrun++;
    for (int i = 0; i < 16; i++) begin
      bus_read(RHR, d);
      check(d == 8'(i + 1), $sformatf("FIFO byte %0d = %h", i, d));
    end
    bus_read(LSR, s);
    check(!s[0] && !s[1], "Rx FIFO empty, overrun cleared");

    // -- FIFO clear via FCR
    for (int i = 0; i < 3; i++) drive_frame(8'h77);
    bus_read(LSR, s); check(s[0], "data before clear");
    bus_write(FCR, 8'b0000_0110);
    bus_read(LSR, s);
    check(!s[0], "Rx FIFO cleared");
    if (!s[0]) n_fifo_clear++;

    // -- frame formats in loopback: every word length, parity, stop bits
    loop_en = 1;
    for (int f = 0; f < 16; f++) begin
      logic [7:0] v, m;
      v = 8'(f);                           // bits 3:0 = parity enable, stop, length
      v[4] = f[0];                         // even/odd
      set_lcr(v);
      m = 8'hFF >> (3 - v[1:0]);
      d = 8'($urandom);
      bus_write(THR, d);
      wait_tx_done();
      bus_read(RHR, s);
      check(s == (d & m), $sformatf("format %b: sent %h got %h", v, d & m, s));
      check(tx_seen.size() == 1 && tx_seen[0] == (d & m), "format decoded on tx");
      tx_seen.delete();
      if (s == (d & m)) n_format++;
    end
    bus_read(LSR, s);
    check(!s[2] && !s[3], "no errors in loopback");
    check(tx_bad_frames == 0, "tx frames well formed");

    // -- every mechanism happened
    check(n_duplex > 0, "duplex never happened");
    check(n_tx_empty > 0, "Tx empty interrupt never happened");
    check(n_rx_trig > 0, "Rx trigger never happened");
    check(n_tx_trig > 0, "Tx trigger never happened");
    check(n_timeout > 0, "timeout never happened");
    check(n_rx_error >= 2, "receive errors never happened");
    check(n_overrun > 0, "overrun never happened");
    check(n_fifo_clear > 0, "FIFO clear never happened");
    check(n_format == 16, "format switches");
    $display("mechanisms: duplex=%0d tx_empty=%0d rx_trig=%0d tx_trig=%0d timeout=%0d rx_error=%0d overrun=%0d fifo_clear=%0d format=%0d",
             n_duplex, n_tx_empty, n_rx_trig, n_tx_trig, n_timeout, n_rx_error, n_overrun, n_fifo_clear, n_format);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
