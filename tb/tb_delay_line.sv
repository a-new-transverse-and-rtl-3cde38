// Self-checking test of delay_line: a counting input stream is delayed by a
// series of delays (including 0 and the maximum) and each output is checked
// against the input the given number of cycles earlier.
module tb_delay_line;
  import lmbf_pkg::*;
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
  localparam int MAX_DELAY = 128;
  sample_t din, dout;
  logic [6:0] delay;
  delay_line #(.MAX_DELAY(MAX_DELAY)) dut (.*);

  sample_t xs [$];

  initial begin
    automatic int dl [6] = '{0, 1, 5, 64, 100, 127};
    int idx;
    sample_t expv;
    din = '0; delay = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 6 * 400; n++) begin
      delay = 7'(dl[n / 400]);
      din = sample_t'($urandom);
      xs.push_back(din);
      #0.5;  // combinational path for delay 0
      if (delay == 0) check(dout == din, "zero delay");
      @(negedge clk);
      // after the edge, dout equals the input of delay-1 steps ago; seen
      // from the next input that is a delay of `delay` cycles
      idx = n + 1 - int'(delay);
      if (n % 400 >= int'(delay) + 1 && delay != 0) begin
        expv = xs[idx];
        check(dout == expv, "delayed sample");
      end
    end
    finish_tb();
  end
endmodule
