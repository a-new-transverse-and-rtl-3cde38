// Self-checking test of gain: random samples and gains, compared with the
// product shifted by 12 bits and saturated, one cycle later.
module tb_gain;
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
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    finish_tb();
  end
  sample_t din, dout;
  logic signed [15:0] g;
  gain dut (.*);

  initial begin
    din = '0; g = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 2000; n++) begin
      longint e;
      din = sample_t'($urandom);
      g   = (n < 1000) ? 16'($urandom_range(0, 8191)) - 16'sd4096 : 16'($urandom);
      e = (longint'(din) * longint'(g)) >>> 12;
      if (e > 32767) e = 32767;
      if (e < -32768) e = -32768;
      @(negedge clk);
      check(dout == sample_t'(e), $sformatf("gain %0d * %0d", din, g));
    end
    finish_tb();
  end
endmodule
