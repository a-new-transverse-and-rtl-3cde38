// Self-checking test of trigger_unit: software and external triggers, the
// programmed delay, disarm, and that an unarmed unit ignores triggers.
module tb_trigger_unit;
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
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    finish_tb();
  end
  logic ext_trig, ext_en, soft_trig, arm, disarm, fire, armed, waiting;
  logic [15:0] delay;
  trigger_unit dut (.*);

  // cycles from the trigger request to fire
  task automatic run(input bit use_ext, input int d);
    int t = 0;
    delay = 16'(d);
    @(negedge clk); arm = 1; @(negedge clk); arm = 0;
    check(armed, "armed");
    if (use_ext) ext_trig = 1; else soft_trig = 1;
    @(negedge clk); soft_trig = 0;
    while (!fire && t < 1000) begin @(negedge clk); t++; end
    ext_trig = 0;
    // soft: 1 cycle to start, d cycles of count, 1 to fire; ext adds 2 sync stages
    check(t == d + 1 + (use_ext ? 2 : 0), $sformatf("trigger latency %0d for delay %0d", t, d));
    @(negedge clk);
    check(!fire && !armed && !waiting, "single shot");
  endtask

  initial begin
    ext_trig = 0; ext_en = 1; soft_trig = 0; arm = 0; disarm = 0; delay = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    soft_trig = 1; @(negedge clk); soft_trig = 0;
    repeat (5) begin @(negedge clk); check(!fire, "unarmed ignores trigger"); end
    run(0, 0); run(0, 7); run(1, 0); run(1, 33); run(0, 200);
    // disarm
    @(negedge clk); arm = 1; @(negedge clk); arm = 0; disarm = 1; @(negedge clk); disarm = 0;
    soft_trig = 1; @(negedge clk); soft_trig = 0;
    repeat (5) begin @(negedge clk); check(!fire, "disarmed ignores trigger"); end
    // external disabled
    ext_en = 0;
    @(negedge clk); arm = 1; @(negedge clk); arm = 0;
    ext_trig = 1; repeat (5) begin @(negedge clk); check(!fire, "external disabled"); end
    ext_trig = 0;
    finish_tb();
  end
endmodule
