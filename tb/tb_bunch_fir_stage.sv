// Self-checking test of bunch_fir_stage with 5 bunches and 4 taps: for
// decimation counts 1 and 4 the output of every bunch is compared with a
// model of "average over N turns, filter with the bunch's coefficient set,
// hold for N turns", three cycles after the input.  Bunches use different
// filter sets, and the held output must stay constant between updates.
module tb_bunch_fir_stage;
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
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    finish_tb();
  end
  localparam int B = 5, T = 4;
  sample_t din, dout;
  logic [2:0] bunch;
  logic turn_start, coef_we;
  logic [6:0] decim_m1;
  logic [2:0] decim_shift;
  logic [1:0] fir_sel;
  logic [3:0] coef_addr;
  logic signed [15:0] coef_data;
  bunch_fir_stage #(.BUNCHES(B), .TAPS(T), .NMAX_W(7)) dut (.*);

  logic signed [15:0] cf [4][T];
  function automatic logic [1:0] selfn(int idx);
    return 2'(idx % 3);
  endfunction
  function automatic longint sat(longint v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : v;
  endfunction

  initial begin
    automatic int ms [2] = '{0, 3};
    automatic int sh [2] = '{0, 2};
    longint acc [B];
    longint hist [B][T];
    longint held [B];
    longint expq [$];
    int tc, holds;
    din = '0; bunch = '0; turn_start = 0; coef_we = 0; coef_addr = '0; coef_data = '0;
    decim_m1 = '0; decim_shift = '0; fir_sel = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int f = 0; f < 4; f++)
      for (int k = 0; k < T; k++) begin
        cf[f][k] = 16'($urandom_range(0, 12000)) - 16'sd6000;
        coef_we = 1; coef_addr = {2'(f), 2'(k)}; coef_data = cf[f][k];
        @(negedge clk);
      end
    coef_we = 0;
    holds = 0;
    for (int m = 0; m < 2; m++) begin
      int n;
      tc = 0; n = 0;
      expq.delete();
      for (int b = 0; b < B; b++) begin
        held[b] = 0;
        for (int k = 0; k < T; k++) hist[b][k] = 0;
      end
      decim_m1 = 7'(ms[m]); decim_shift = 3'(sh[m]);
      for (int t = 0; t < 30 * (ms[m] + 1); t++)
        for (int b = 0; b < B; b++) begin
          sample_t x;
          x = sample_t'($urandom_range(0, 16000)) - 16'sd8000;
          bunch = 3'(b); turn_start = (b == 0); din = x;
          fir_sel = selfn(b);
          if (b == 0) tc = (tc >= ms[m]) ? 0 : tc + 1;
          if (tc == 0) acc[b] = longint'(x); else acc[b] += longint'(x);
          if (tc == ms[m]) begin
            longint y;
            for (int k = T - 1; k > 0; k--) hist[b][k] = hist[b][k-1];
            hist[b][0] = sat(acc[b] >>> sh[m]);
            y = 0;
            for (int k = 0; k < T; k++) y += hist[b][k] * longint'(cf[selfn((b + 1) % B)][k]);
            held[b] = sat(y >>> 14);
          end
          expq.push_back(held[b]);
          @(negedge clk);
          if (n >= 2 && t >= (T + 2) * (ms[m] + 1)) begin
            check(longint'(dout) == expq[n - 2], $sformatf("N=%0d turn %0d bunch %0d", ms[m] + 1, t, b));
            if (ms[m] > 0 && tc != ms[m]) holds++;
          end
          n++;
        end
    end
    check(holds > 100, "held outputs between updates");
    finish_tb();
  end
endmodule
