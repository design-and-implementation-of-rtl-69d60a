// uart_tx_tb: self-checking test of the transmitter (Tx FIFO + TSR) with a
// tick every 18 clocks (divisor 18, the 57.6 kbit/s setting) and
// 16 ticks per bit. A line monitor waits for each start bit, samples the tx
// line at the centre of every bit period and compares the whole frame
// (start, data LSB first, optional parity, stop bits) with a frame built
// independently from the byte and the line settings. It also checks that the
// frame lasts exactly (bits x 16 x tick period) clock cycles up to tx_done,
// that tx_empty_evt comes only after the last queued byte, and the FIFO
// count/full flags. The first byte is 10010111 with LCR = 00000011, the
// transmit example of the design description.
module uart_tx_tb;
  import uart_pkg::*;
  localparam int OS = 16;
  localparam int D  = 18;         // clock cycles per tick: DLL = 18, the 57.6 kbit/s setting

  logic clk = 0, rst = 1, tick = 0;
  lcr_t lcr;
  logic push = 0, clr = 0;
  logic [7:0] din = 0;
  logic tx;
  logic [4:0] count;
  logic fifo_empty, fifo_full, idle, tx_done, tx_empty_evt;
  int checks = 0, failures = 0;
  int frames = 0, empty_events = 0;
  bit tick_en = 1;

  uart_tx dut (.*);

  always #5 clk = ~clk;

  int tcnt = 0;
  always @(posedge clk) begin
    if (tick_en) begin
      tcnt <= (tcnt == D - 1) ? 0 : tcnt + 1;
      tick <= (tcnt == D - 1);
    end else tick <= 0;
  end

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

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

  // expected frames, as bit lists on the line (start bit first)
  typedef struct { logic [7:0] data; lcr_t lcr; } job_t;
  job_t jobs[$];

  // monitor
  initial begin
    forever begin
      job_t j;
      bit exp_bits[$];
      int n, t0;
      logic [7:0] m;
      @(negedge clk);
      if (rst || tx) continue;
      t0 = cyc;
      if (jobs.size() == 0) begin
        check(0, "unexpected start bit");
        @(posedge tx_done);
        continue;
      end
      j = jobs.pop_front();
      exp_bits.delete();
      n = 5 + int'(j.lcr.wls);
      m = 8'hFF >> (8 - n);
      exp_bits.push_back(0);
      for (int i = 0; i < n; i++) exp_bits.push_back(j.data[i]);
      if (j.lcr.pen) exp_bits.push_back(j.lcr.eps ? ^(j.data & m) : ~^(j.data & m));
      exp_bits.push_back(1);
      if (j.lcr.stb) exp_bits.push_back(1);
      // sample at bit centres
      repeat (OS * D / 2) @(negedge clk);
      foreach (exp_bits[i]) begin
        check(tx == exp_bits[i], $sformatf("data %b bit %0d: got %b", j.data, i, tx));
        if (i != exp_bits.size() - 1) repeat (OS * D) @(negedge clk);
      end
      // the frame ends when tx_done pulses
      while (!tx_done) @(negedge clk);
      check(cyc - t0 == exp_bits.size() * OS * D,
            $sformatf("frame length %0d cycles, expected %0d", cyc - t0, exp_bits.size() * OS * D));
      check(tx_empty_evt == (jobs.size() == 0), "tx_empty_evt at frame end");
      frames++;
    end
  end

  always @(posedge clk) if (tx_empty_evt) empty_events++;

  task automatic send(input logic [7:0] d);
    @(negedge clk);
    push = 1; din = d;
    jobs.push_back('{d, lcr});
    @(negedge clk);
    push = 0;
  endtask

  task automatic wait_idle();
    while (jobs.size() != 0 || !idle || !fifo_empty) @(negedge clk);
    repeat (5) @(negedge clk);
  endtask

  initial begin
    lcr = lcr_t'(8'h03);
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (5) @(posedge clk);
    // example from the description: 8 data bits, no parity, 1 stop bit
    send(8'b10010111);
    wait_idle();
    check(tx == 1, "line idles high");
    check(empty_events == 1, "one tx_empty event after a single byte");
    // every word length, parity setting and stop-bit count
    for (int l = 0; l < 32; l++) begin
      lcr = lcr_t'(8'(l));
      send(8'($urandom));
      send(8'($urandom));
      wait_idle();
    end
    // fill the FIFO while ticks are stopped
    lcr = lcr_t'(8'h1b);   // 8 bits, even parity, 1 stop
    @(negedge clk) tick_en = 0;
    repeat (20) @(negedge clk);
    for (int i = 0; i < 16; i++) send(8'(i * 17 + 3));
    #1;
    check(count == 16 && fifo_full, "FIFO full after 16 writes");
    // a 17th write is dropped
    @(negedge clk) push = 1; din = 8'h55;
    @(negedge clk) push = 0;
    check(count == 16, "write to a full FIFO is dropped");
    tick_en = 1;
    wait_idle();
    // clear while holding bytes: nothing more is sent
    @(negedge clk) tick_en = 0;
    send(8'hA5);
    send(8'h5A);
    void'(jobs.pop_back());
    void'(jobs.pop_back());
    @(negedge clk) clr = 1;
    @(negedge clk) clr = 0;
    check(fifo_empty && count == 0, "clear empties the FIFO");
    tick_en = 1;
    repeat (40 * OS * D) @(negedge clk);
    check(tx == 1 && idle, "nothing sent after clear");
    check(frames == 1 + 64 + 16, $sformatf("%0d frames", frames));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
