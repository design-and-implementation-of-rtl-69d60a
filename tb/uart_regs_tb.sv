// uart_regs_tb: self-checking test of the register file. Register strobes
// are driven directly and the status inputs are set by the test. Checked:
// LCR and IER read back what was written, DLL/DLH form the divisor, FCR sets
// the trigger selections and pulses the FIFO clears, THR writes push, RHR
// reads pop and return the FIFO head (0 when empty), LSR reflects the status
// inputs with sticky error bits cleared by an LSR read, ISR shows the
// interrupt status, write-only and unused addresses read as 0 and writes to
// read-only addresses change nothing.
module uart_regs_tb;
  import uart_pkg::*;

  logic clk = 0, rst = 1;
  logic reg_rd = 0, reg_wr = 0;
  logic [3:0] reg_addr = 0;
  logic [7:0] reg_wdata = 0, data_out;
  lcr_t lcr;
  irq_t ier, isr = '0;
  logic [1:0] rx_trig_sel, tx_trig_sel;
  logic rx_clr, tx_clr;
  logic [15:0] divisor;
  logic tx_push, rx_pop;
  logic [7:0] tx_data, rx_data = 8'h00;
  logic rx_empty = 1, tx_fifo_empty = 1, tx_fifo_full = 0, tx_idle = 1;
  logic pe = 0, fe = 0, oe = 0;
  int checks = 0, failures = 0;
  int pushes = 0, pops = 0, rx_clrs = 0, tx_clrs = 0;
  logic [7:0] last_push;

  uart_regs dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (!rst && tx_push) begin pushes++; last_push = tx_data; end
    if (!rst && rx_pop) pops++;
    if (!rst && rx_clr) rx_clrs++;
    if (!rst && tx_clr) tx_clrs++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [3:0] a, input logic [7:0] d);
    @(negedge clk);
    reg_wr = 1; reg_addr = a; reg_wdata = d;
    @(negedge clk);
    reg_wr = 0; reg_wdata = 8'($urandom);
  endtask

  task automatic rd(input logic [3:0] a, output logic [7:0] d);
    @(negedge clk);
    reg_rd = 1; reg_addr = a;
    @(negedge clk);
    reg_rd = 0;
    d = data_out;
  endtask

  initial begin
    logic [7:0] d;
    repeat (3) @(posedge clk);
    rst <= 0;
    rd(4'h3, d);
    check(d == 8'h03, "LCR reset value (8N1)");
    // LCR, IER read/write
    for (int i = 0; i < 20; i++) begin
      logic [7:0] v1, v2;
      v1 = 8'($urandom); v2 = 8'($urandom);
      wr(4'h3, v1);
      wr(4'h5, v2);
      rd(4'h3, d); check(d == v1, "LCR readback");
      check(lcr == v1, "LCR output");
      rd(4'h5, d); check(d == v2, "IER readback");
      check(ier == v2[4:0], "IER output");
    end
    // divisor
    wr(4'h7, 8'h12);
    wr(4'h8, 8'h00);
    check(divisor == 16'd18, "divisor 18");
    wr(4'h8, 8'hA5);
    check(divisor == 16'hA512, "divisor high byte");
    rd(4'h7, d); check(d == 0, "DLL is write only");
    rd(4'h8, d); check(d == 0, "DLH is write only");
    // FCR
    wr(4'h2, 8'b1001_0110);
    check(rx_trig_sel == 2'b10 && tx_trig_sel == 2'b01, "FCR trigger selections");
    check(rx_clrs == 1 && tx_clrs == 1, "FCR clears pulse once");
    wr(4'h2, 8'b0110_0010);
    check(rx_trig_sel == 2'b01 && tx_trig_sel == 2'b10, "FCR trigger selections 2");
    check(rx_clrs == 2 && tx_clrs == 1, "FCR Rx clear only");
    rd(4'h2, d); check(d == 0, "FCR is write only");
    // THR
    wr(4'h0, 8'h97);
    check(pushes == 1 && last_push == 8'h97, "THR write pushes");
    rd(4'h0, d);
    check(pushes == 1 && d == 0, "THR read does nothing");
    // RHR
    rx_empty = 0; rx_data = 8'hE8;
    rd(4'h1, d);
    check(d == 8'hE8 && pops == 1, "RHR read pops the FIFO head");
    rx_empty = 1;
    rd(4'h1, d);
    check(d == 8'h00, "RHR read of an empty FIFO");
    wr(4'h1, 8'h33);
    check(pops == 2 && pushes == 1, "RHR write does nothing");
    // LSR
    rx_empty = 0; tx_fifo_empty = 1; tx_idle = 1; tx_fifo_full = 0;
    rd(4'h4, d); check(d == 8'b0110_0001, $sformatf("LSR %b", d));
    tx_idle = 0;
    rd(4'h4, d); check(d == 8'b0010_0001, $sformatf("LSR busy %b", d));
    tx_fifo_empty = 0; tx_fifo_full = 1; rx_empty = 1;
    rd(4'h4, d); check(d == 8'b0001_0000, $sformatf("LSR full %b", d));
    tx_fifo_full = 0;
    @(negedge clk) pe = 1;
    @(negedge clk) begin pe = 0; fe = 1; end
    @(negedge clk) begin fe = 0; oe = 1; end
    @(negedge clk) oe = 0;
    rd(4'h4, d); check(d == 8'b1000_1110, $sformatf("LSR errors %b", d));
    rd(4'h4, d); check(d == 8'b0000_0000, $sformatf("LSR errors cleared %b", d));
    wr(4'h4, 8'hFF);
    rd(4'h4, d); check(d == 8'b0000_0000, "LSR is read only");
    // ISR
    isr = 5'b01010;
    rd(4'h6, d); check(d == 8'b1000_1010, $sformatf("ISR %b", d));
    isr = '0;
    rd(4'h6, d); check(d == 8'h00, "ISR idle");
    // unused addresses
    rd(4'h9, d); check(d == 0, "unused address");
    rd(4'hF, d); check(d == 0, "unused address F");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
