// Self-checking test of dac_stage: random feedback and oscillator samples,
// per-bunch enables and output gains, source gains and compensation filter.
// mult_out is compared with the gated, scaled, summed and multiplied inputs
// three cycles earlier, and dac_out with the FIR of mult_out delayed by the
// programmed alignment delay.
module tb_dac_stage;
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
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    finish_tb();
  end
  sample_t fir_in, nco0_in, nco1_in, mult_out, dac_out;
  bunch_cfg_t bcfg;
  logic signed [15:0] fir_gain, nco0_gain, nco1_gain;
  logic signed [15:0] coeffs [IO_TAPS];
  logic [6:0] delay;
  dac_stage #(.MAX_DELAY(128)) dut (.*);

  function automatic longint sat(longint v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : v;
  endfunction

  longint mq [$];   // expected mult_out per input cycle
  longint fq [$];   // expected FIR output per input cycle

  initial begin
    automatic int dl [3] = '{0, 9, 40};
    int idx;
    longint expd;
    fir_gain = 16'sd4096; nco0_gain = 16'sd2048; nco1_gain = -16'sd1024;
    for (int k = 0; k < IO_TAPS; k++) coeffs[k] = 16'($urandom_range(0, 8000)) - 16'sd4000;
    coeffs[0] = 16'sd16384;
    fir_in = '0; nco0_in = '0; nco1_in = '0; bcfg = '0; delay = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 3000; n++) begin
      longint s, m, f;
      if (n % 1000 == 0) delay = 7'(dl[n / 1000]);
      fir_in = sample_t'($urandom); nco0_in = sample_t'($urandom); nco1_in = sample_t'($urandom);
      bcfg = bunch_cfg_t'($urandom);
      bcfg.out_gain = 16'($urandom_range(0, 8192)) - 16'sd4096;
      s = sat(((bcfg.fir_en  ? longint'(fir_in)  : 0) * fir_gain)  >>> 12)
        + sat(((bcfg.nco0_en ? longint'(nco0_in) : 0) * nco0_gain) >>> 12)
        + sat(((bcfg.nco1_en ? longint'(nco1_in) : 0) * nco1_gain) >>> 12);
      m = sat((sat(s) * longint'(bcfg.out_gain)) >>> 12);
      mq.push_back(m);
      f = 0;
      for (int k = 0; k < IO_TAPS; k++)
        if (mq.size() >= 1 + k) f += mq[mq.size() - 1 - k] * longint'(coeffs[k]);
      fq.push_back(sat(f >>> 14));
      @(negedge clk);
      // mult_out after this edge belongs to input n-2 (3 cycles of latency)
      if (n >= 2) check(longint'(mult_out) == mq[n - 2], $sformatf("mult_out n=%0d", n));
      // FIR adds 2 cycles, the delay line `delay` more
      idx = n - 4 - int'(delay);
      if (n % 1000 >= 140) begin
        expd = fq[idx];
        check(longint'(dac_out) == expd, "dac_out");
      end
    end
    finish_tb();
  end
endmodule
