// Self-checking test of bunch_counter: the index counts 0..BUNCHES-1 and
// wraps, turn_start marks bunch 0, and a turn marker restarts the count.
module tb_bunch_counter;
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
  localparam int BUNCHES = 936;
  logic turn_sync, turn_start;
  logic [9:0] bunch;
  bunch_counter #(.BUNCHES(BUNCHES)) dut (.*);

  initial begin
    automatic int exp_b = 0;
    automatic int wraps = 0;
    turn_sync = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    check(bunch == 0, "reset to bunch 0");
    for (int n = 0; n < 3000; n++) begin
      turn_sync = (n == 1500);
      @(negedge clk);
      if (turn_sync) exp_b = 0;
      else exp_b = (exp_b == BUNCHES - 1) ? 0 : exp_b + 1;
      if (exp_b == 0) wraps++;
      check(int'(bunch) == exp_b, $sformatf("bunch %0d expected %0d", bunch, exp_b));
      check(turn_start == (exp_b == 0), "turn_start");
    end
    check(wraps >= 3, "wrapped");
    finish_tb();
  end
endmodule
