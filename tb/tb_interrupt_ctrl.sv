// Self-checking test of interrupt_ctrl: random events, masks and clears
// against a model of the pending bits and the interrupt line.
module tb_interrupt_ctrl;
  logic clk = 1'b0;
  logic rst = 1'b1;
  always #1 clk = ~clk;
  int checks = 0;
  int failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  task automatic finish_tb();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  // watchdog
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    finish_tb();
  end
  logic [7:0] events, mask, clear, pending;
  logic irq;
  interrupt_ctrl #(.N(8)) dut (.*);

  initial begin
    automatic logic [7:0] ep = '0;
    automatic bit eirq = 0;
    automatic int irqs = 0;
    events = '0; mask = '0; clear = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 2000; n++) begin
      events = ($urandom_range(0, 9) == 0) ? 8'(1 << $urandom_range(0, 7)) : '0;
      clear  = ($urandom_range(0, 4) == 0) ? 8'($urandom) : '0;
      if (n % 100 == 0) mask = 8'($urandom);
      eirq = |(ep & mask);
      ep = (ep & ~clear) | events;
      @(negedge clk);
      check(pending == ep, "pending bits");
      check(irq == eirq, "irq");
      if (irq) irqs++;
    end
    check(irqs > 0, "irq raised");
    finish_tb();
  end
endmodule
