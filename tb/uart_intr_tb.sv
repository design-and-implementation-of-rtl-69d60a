// uart_intr_tb: self-checking test of the interrupt controller with its
// default 44 bit-time timeout and 16 ticks per bit. The FIFO counts and event
// pulses are driven directly. Checked: Rx trigger at each of the levels
// 1/4/8/14, Tx trigger at or below each level, the timeout firing exactly
// 44 x 16 ticks after the last reset of its counter and being reset by a
// received byte, an RHR read and an empty FIFO, latching of receive-error
// and Tx-empty events and their clearing by intr_ack, and masking by IER.
module uart_intr_tb;
  import uart_pkg::*;
  localparam int OS = 16, TB = 44;

  logic clk = 0, rst = 1, tick = 0;
  irq_t ier = '0, isr;
  logic [1:0] rx_trig_sel = 0, tx_trig_sel = 0;
  logic [4:0] rx_count = 0, tx_count = 0;
  logic rx_empty = 1, rx_done = 0, rx_err = 0, tx_empty_evt = 0, rhr_rd = 0, intr_ack = 0;
  logic intr;
  int checks = 0, failures = 0;

  uart_intr dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input int n = 1);
    repeat (n) @(negedge clk);
    #0;
  endtask

  // one tick every other cycle; returns after n ticks
  task automatic ticks(input int n);
    repeat (n) begin
      @(negedge clk) tick = 1;
      @(negedge clk) tick = 0;
    end
  endtask

  initial begin
    int lv[4] = '{1, 4, 8, 14};
    int fired_at;
    repeat (3) @(posedge clk);
    rst <= 0;
    step(2);
    check(!intr && isr == '0, "quiet after reset");
    // Rx trigger levels
    ier = '0; ier.rx_trig = 1;
    tx_count = 5;   // keep the Tx trigger condition away (not enabled anyway)
    for (int s = 0; s < 4; s++) begin
      rx_trig_sel = 2'(s);
      rx_empty = 0;
      rx_count = 5'(lv[s] - 1);
      step(2);
      check(!isr.rx_trig && !intr, $sformatf("rx trig below level %0d", lv[s]));
      rx_count = 5'(lv[s]);
      step(2);
      check(isr.rx_trig && intr, $sformatf("rx trig at level %0d", lv[s]));
      rx_count = 5'(16);
      step(2);
      check(isr.rx_trig, "rx trig above level");
    end
    ier.rx_trig = 0;
    step(2);
    check(!intr, "rx trig masked by IER");
    rx_count = 0; rx_empty = 1;
    // Tx trigger levels
    ier = '0; ier.tx_trig = 1;
    for (int s = 0; s < 4; s++) begin
      tx_trig_sel = 2'(s);
      tx_count = 5'(lv[s] + 1);
      step(2);
      check(!isr.tx_trig && !intr, $sformatf("tx trig above level %0d", lv[s]));
      tx_count = 5'(lv[s]);
      step(2);
      check(isr.tx_trig && intr, $sformatf("tx trig at level %0d", lv[s]));
    end
    tx_count = 16;
    ier = '0;
    // timeout: fires 44*16 ticks after data is left in the FIFO
    ier.timeout = 1;
    rx_count = 1; rx_empty = 0;
    @(negedge clk) rx_done = 1;
    @(negedge clk) rx_done = 0;
    fired_at = -1;
    for (int t = 1; t <= TB * OS + 10; t++) begin
      ticks(1);
      step(1);
      if (isr.timeout && fired_at < 0) fired_at = t;
    end
    check(fired_at == TB * OS, $sformatf("timeout after %0d ticks, expected %0d", fired_at, TB * OS));
    check(intr, "timeout raises intr");
    // reset by an RHR read
    @(negedge clk) rhr_rd = 1;
    @(negedge clk) rhr_rd = 0;
    step(1);
    check(!isr.timeout, "RHR read clears timeout");
    ticks(TB * OS - 2);
    step(1);
    check(!isr.timeout, "no timeout before 44 bit-times");
    // reset by new data
    @(negedge clk) rx_done = 1;
    @(negedge clk) rx_done = 0;
    ticks(TB * OS - 2);
    step(1);
    check(!isr.timeout, "received byte restarts timeout");
    ticks(4);
    step(1);
    check(isr.timeout, "timeout after restart");
    // empty FIFO keeps it cleared
    rx_empty = 1; rx_count = 0;
    step(2);
    check(!isr.timeout, "empty FIFO clears timeout");
    ticks(TB * OS + 5);
    step(1);
    check(!isr.timeout && !intr, "no timeout while empty");
    ier = '0;
    // receive error event: latched, cleared by intr_ack
    ier.rx_error = 1;
    @(negedge clk) rx_err = 1;
    @(negedge clk) rx_err = 0;
    step(3);
    check(isr.rx_error && intr, "rx error latched");
    @(negedge clk) intr_ack = 1;
    @(negedge clk) intr_ack = 0;
    step(1);
    check(!isr.rx_error && !intr, "intr_ack clears rx error");
    // Tx empty event
    ier = '0; ier.tx_empty = 1;
    @(negedge clk) tx_empty_evt = 1;
    @(negedge clk) tx_empty_evt = 0;
    step(3);
    check(isr.tx_empty && intr, "tx empty latched");
    @(negedge clk) intr_ack = 1;
    @(negedge clk) intr_ack = 0;
    step(1);
    check(!isr.tx_empty && !intr, "intr_ack clears tx empty");
    // disabled events are not latched
    ier = '0;
    @(negedge clk) begin tx_empty_evt = 1; rx_err = 1; end
    @(negedge clk) begin tx_empty_evt = 0; rx_err = 0; end
    ier.tx_empty = 1; ier.rx_error = 1;
    step(3);
    check(!intr, "disabled events are not latched");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
