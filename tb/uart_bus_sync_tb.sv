// uart_bus_sync_tb: self-checking test of the host interface synchroniser.
// The host side is driven from its own clock (period unrelated to the UART
// clock) with random read and write accesses of random length. Every access
// must produce exactly one strobe of the right kind, carrying the address and
// data that were held during the access, 3 to 4 UART clock edges after the
// access began; no strobe may appear between accesses.
module uart_bus_sync_tb;
  logic clk = 0, rst = 1;
  logic cs = 0, rd = 0, wr = 0;
  logic [3:0] addr = 0;
  logic [7:0] data_in = 0;
  logic reg_rd, reg_wr;
  logic [3:0] reg_addr;
  logic [7:0] reg_wdata;
  int checks = 0, failures = 0;
  int rd_strobes = 0, wr_strobes = 0;

  uart_bus_sync dut (.*);

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

  // expected access, set by the driver
  bit         exp_wr;
  logic [3:0] exp_addr;
  logic [7:0] exp_data;
  int         strobes_this_access;
  int         cyc = 0;
  int         start_cyc;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && (reg_rd || reg_wr)) begin
      strobes_this_access++;
      check(reg_wr == exp_wr && reg_rd == !exp_wr, "strobe kind");
      check(reg_addr == exp_addr, "address");
      if (exp_wr) check(reg_wdata == exp_data, "data");
      check(cyc - start_cyc >= 3 && cyc - start_cyc <= 5,
            $sformatf("latency %0d", cyc - start_cyc));
      if (reg_wr) wr_strobes++; else rd_strobes++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (3) @(posedge clk);
    for (int i = 0; i < 300; i++) begin
      int len;
      len = 4 + $urandom % 8;
      #(1 + $urandom % 7);
      exp_wr   = 1'($urandom % 2);
      exp_addr = 4'($urandom);
      exp_data = 8'($urandom);
      strobes_this_access = 0;
      addr    = exp_addr;
      data_in = exp_data;
      #3;
      start_cyc = cyc;
      cs = 1;
      if (exp_wr) wr = 1; else rd = 1;
      repeat (len) #10;
      #3;
      cs = 0; rd = 0; wr = 0;
      repeat (4) @(posedge clk);
      #2;
      check(strobes_this_access == 1, $sformatf("%0d strobes for one access", strobes_this_access));
      // bus parked with garbage: no strobe may follow
      addr = 4'($urandom);
      data_in = 8'($urandom);
    end
    check(rd_strobes > 100 && wr_strobes > 100, "both access kinds seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
