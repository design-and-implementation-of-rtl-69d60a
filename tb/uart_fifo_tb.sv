// uart_fifo_tb: self-checking test of uart_fifo at its default size
// (16 x 8 bits). Random pushes and pops, including pushes when full and pops
// when empty, are compared every cycle against a queue reference model; the
// head value, count, empty and full are checked, and clr is exercised.
module uart_fifo_tb;
  localparam int DEPTH = 16;
  logic clk = 0, rst = 1, clr = 0, push = 0, pop = 0;
  logic [7:0] din = 0, dout;
  logic [4:0] count;
  logic empty, full;
  int checks = 0, failures = 0;
  int saw_full = 0, saw_empty_pop = 0;
  logic [7:0] model[$];

  uart_fifo dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 3000; i++) begin
      // bias: phases that fill and phases that drain
      int bias;
      bias = ((i / 200) % 2 == 0) ? 70 : 30;
      @(negedge clk);
      push = ($urandom % 100) < bias;
      pop  = ($urandom % 100) < (100 - bias);
      din  = 8'($urandom);
      clr  = (i == 1500);
      @(posedge clk);
      #1;
      if (clr) model.delete();
      else begin
        int sz;
        sz = model.size();
        if (pop && sz > 0) void'(model.pop_front());
        else if (pop) saw_empty_pop++;
        // a push to a full FIFO is dropped even if a pop frees a slot
        if (push && sz < DEPTH) model.push_back(din);
      end
      check(count == 5'(model.size()), $sformatf("count %0d vs %0d", count, model.size()));
      check(empty == (model.size() == 0), "empty");
      check(full == (model.size() == DEPTH), "full");
      if (model.size() > 0) check(dout == model[0], $sformatf("dout %h vs %h", dout, model[0]));
      if (full) saw_full++;
    end
    check(saw_full > 0, "FIFO never filled");
    check(saw_empty_pop > 0, "no pop on empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
