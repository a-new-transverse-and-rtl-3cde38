// Self-checking test of fir_filter: random coefficients and input; every
// output is compared with the convolution of the input history (two cycles
// of latency) with saturation to 16 bits, including a saturating stretch.
module tb_fir_filter;
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
  localparam int TAPS = 8;
  sample_t din, dout;
  logic signed [15:0] coeffs [TAPS];
  fir_filter #(.TAPS(TAPS)) dut (.*);

  sample_t xs [$];

  // output seen after the edge that loads input n: y = sum c[k] x[n-1-k]
  function automatic sample_t model_at(int n);
    longint acc = 0;
    for (int k = 0; k < TAPS; k++)
      if (n - 1 - k >= 0) acc += longint'(xs[n - 1 - k]) * longint'(coeffs[k]);
    acc = acc >>> 14;
    if (acc > 32767) return 16'sh7fff;
    if (acc < -32768) return 16'sh8000;
    return sample_t'(acc);
  endfunction

  initial begin
    for (int k = 0; k < TAPS; k++) coeffs[k] = 16'($urandom_range(0, 16383)) - 16'sd8192;
    din = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 1500; n++) begin
      din = (n % 300 < 150) ? sample_t'($urandom) : sample_t'($urandom_range(0, 2000));
      if (n == 700) for (int k = 0; k < TAPS; k++) coeffs[k] = 16'sd16383;
      if (n == 800) for (int k = 0; k < TAPS; k++) coeffs[k] = 16'($urandom_range(0, 8000));
      xs.push_back(din);
      @(negedge clk);
      if (n >= 1) check(dout == model_at(n), $sformatf("fir output n=%0d", n));
    end
    finish_tb();
  end
endmodule
