// Self-checking test of bunch_decimate with 5 bunches: for decimation counts
// 1, 4 and 8 the averaged outputs are compared with per-bunch sums computed
// here, and the number of valid outputs per turn group is checked (one per
// bunch every N turns).
module tb_bunch_decimate;
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
  localparam int B = 5;
  sample_t din, dout;
  logic [2:0] bunch;
  logic turn_start, dout_valid;
  logic [6:0] decim_m1;
  logic [2:0] shift;
  bunch_decimate #(.BUNCHES(B), .NMAX_W(7)) dut (.*);

  initial begin
    automatic int ms [3] = '{0, 3, 7};
    automatic int sh [3] = '{0, 2, 3};
    din = '0; bunch = '0; turn_start = 0; decim_m1 = '0; shift = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int m = 0; m < 3; m++) begin
      int tc;
      longint acc [B];
      int nvalid, nexp;
      int nturns;
      nvalid = 0; nexp = 0; tc = 0; nturns = 8 * (ms[m] + 1);
      decim_m1 = 7'(ms[m]); shift = 3'(sh[m]);
      // realign the turn counter: run until a group starts
      for (int t = 0; t < nturns + ms[m] + 1; t++) begin
        for (int b = 0; b < B; b++) begin
          sample_t x;
          bit ev;
          longint e;
          x = sample_t'($urandom);
          if (m == 1 && t > 10) x = 16'sh7fff;  // saturation of the shifted sum is not reached: exact mean
          bunch = 3'(b); turn_start = (b == 0); din = x;
          if (b == 0) tc = (tc >= ms[m]) ? 0 : tc + 1;
          if (tc == 0) acc[b] = longint'(x); else acc[b] += longint'(x);
          ev = (tc == ms[m]);
          e = acc[b] >>> sh[m];
          if (e > 32767) e = 32767;
          if (e < -32768) e = -32768;
          @(negedge clk);
          if (t > ms[m]) begin
            check(dout_valid == ev, "valid timing");
            if (ev) nexp++;
            if (dout_valid) nvalid++;
            if (ev) begin
              check(longint'(dout) == e, $sformatf("average N=%0d b=%0d", ms[m] + 1, b));
            end
          end
        end
      end
      check(nvalid == nexp && nexp >= B * 7, $sformatf("output count %0d", nvalid));
    end
    finish_tb();
  end
endmodule
