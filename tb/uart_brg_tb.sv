// uart_brg_tb: self-checking test of the baud rate generator. For several
// divisors, including the one that gives 57.6 kbit/s with 16x sampling from
// a 16.5888 MHz clock (18), the distance in clock cycles between successive
// ticks is measured and must equal the divisor; a tick must last one cycle;
// a divisor of 0 must produce no ticks.
module uart_brg_tb;
  logic clk = 0, rst = 1, tick;
  logic [15:0] divisor = 0;
  int checks = 0, failures = 0;

  uart_brg dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input int div);
    int last, n, cyc;
    @(negedge clk) divisor = 16'(div);
    // let the generator restart on the new divisor
    repeat (div + 3) @(posedge clk);
    last = -1; n = 0; cyc = 0;
    while (n < 6) begin
      @(posedge clk); #1;
      cyc++;
      if (tick) begin
        if (last >= 0) check(cyc - last == div, $sformatf("div %0d period %0d", div, cyc - last));
        last = cyc;
        n++;
        if (div > 1) begin
          @(posedge clk); #1; cyc++;
          check(!tick, "tick longer than one cycle");
        end
      end
      if (cyc > 10 * div + 20) begin
        check(0, $sformatf("div %0d: no ticks", div));
        break;
      end
    end
  endtask

  initial begin
    int seen;
    repeat (3) @(posedge clk);
    rst <= 0;
    // divisor 0: no ticks
    seen = 0;
    repeat (100) begin @(posedge clk); #1; if (tick) seen++; end
    check(seen == 0, "ticks with divisor 0");
    measure(1);
    measure(2);
    measure(5);
    measure(18);
    measure(6);
    measure(300);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
