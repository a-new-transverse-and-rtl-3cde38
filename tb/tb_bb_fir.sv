// Self-checking test of bb_fir with 4 bunches and 4 taps: each bunch gets its
// own input sequence and filter set; outputs are compared with a per-bunch
// convolution computed here.  Invalid cycles must leave the histories alone.
module tb_bb_fir;
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
  localparam int B = 4, T = 4;
  sample_t din, dout;
  logic din_valid, coef_we, dout_valid;
  logic [1:0] bunch, fir_sel;
  logic [3:0] coef_addr;
  logic signed [15:0] coef_data;
  bb_fir #(.BUNCHES(B), .TAPS(T)) dut (.*);

  logic signed [15:0] cf [4][T];
  sample_t hist [B][T];

  initial begin
    din = '0; din_valid = 0; bunch = '0; fir_sel = '0; coef_we = 0; coef_addr = '0; coef_data = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int f = 0; f < 4; f++)
      for (int k = 0; k < T; k++) begin
        cf[f][k] = (f == 0 && k == 0) ? 16'sd16384 : 16'($urandom_range(0, 16000)) - 16'sd8000;
        coef_we = 1; coef_addr = 4'({f[1:0], k[1:0]}); coef_data = cf[f][k];
        @(negedge clk);
      end
    coef_we = 0;
    for (int b = 0; b < B; b++) for (int k = 0; k < T; k++) hist[b][k] = '0;
    // flush the histories with zeros
    for (int t = 0; t < T; t++)
      for (int b = 0; b < B; b++) begin
        bunch = 2'(b); din = '0; din_valid = 1; @(negedge clk);
      end
    for (int t = 0; t < 200; t++)
      for (int b = 0; b < B; b++) begin
        longint acc;
        acc = 0;
        bunch = 2'(b);
        fir_sel = 2'(b + t / 50);
        din = sample_t'($urandom_range(0, 20000)) - 16'sd10000;
        din_valid = (t % 3 != 1);
        if (din_valid) begin
          for (int k = T - 1; k > 0; k--) hist[b][k] = hist[b][k-1];
          hist[b][0] = din;
        end
        for (int k = 0; k < T; k++) acc += longint'(hist[b][k]) * longint'(cf[fir_sel][k]);
        acc = acc >>> 14;
        if (acc > 32767) acc = 32767;
        if (acc < -32768) acc = -32768;
        @(negedge clk);
        check(dout_valid == din_valid, "valid");
        if (din_valid) check(longint'(dout) == acc, $sformatf("bunch %0d turn %0d got %0d exp %0d sel %0d", b, t, dout, acc, fir_sel));
      end
    finish_tb();
  end
endmodule
