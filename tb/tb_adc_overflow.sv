// Self-checking test of adc_overflow: random samples against a random
// threshold; checks the per-sample pulse, the sticky flag and its clear, and
// the one-cycle pass-through of the sample.
module tb_adc_overflow;
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
  logic signed [15:0] din, dout;
  logic [15:0] threshold;
  logic clear, ovf, ovf_sticky;
  adc_overflow #(.W(16)) dut (.*);

  initial begin
    automatic bit exp_sticky = 0;
    din = '0; threshold = 16'd20000; clear = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 2000; n++) begin
      logic signed [15:0] x;
      int mag;
      bit hit;
      x = 16'($urandom);
      if (n % 7 == 0) x = -16'sd20000;
      if (n % 11 == 0) x = 16'sd19999;
      if (n == 50) x = -16'sd32768;
      clear = (n % 97 == 0);
      din = x;
      mag = (x < 0) ? -int'(x) : int'(x);
      hit = mag >= 20000;
      exp_sticky = (exp_sticky && !clear) || hit;
      @(negedge clk);
      check(ovf == hit, $sformatf("ovf for %0d", x));
      check(ovf_sticky == exp_sticky, "sticky flag");
      check(dout == x, "pass-through");
    end
    finish_tb();
  end
endmodule
