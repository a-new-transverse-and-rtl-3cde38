// Self-checking test of detector: random input, oscillator and per-bunch
// enables; at each dwell end the I and Q results must equal the sums of
// products over the enabled samples of that dwell, scaled by the shift.
module tb_detector;
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
  logic enable, bunch_en, dwell_end, out_valid;
  sample_t din;
  nco_pair_t nco;
  logic [4:0] shift;
  logic signed [31:0] i_out, q_out;
  detector dut (.*);

  initial begin
    longint si, sq;
    int nout;
    si = 0; sq = 0; nout = 0;
    enable = 0; bunch_en = 0; dwell_end = 0; din = '0; nco = '0; shift = 5'd4;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    enable = 1;
    for (int n = 0; n < 3000; n++) begin
      longint ei, eq;
      din = sample_t'($urandom);
      nco.c = sample_t'($urandom);
      nco.s = sample_t'($urandom);
      bunch_en = $urandom_range(0, 3) != 0;
      dwell_end = (n % 100 == 99);
      if (n == 1500) shift = 5'd0;
      if (bunch_en) begin
        si += longint'(din) * longint'(nco.c);
        sq += longint'(din) * longint'(nco.s);
      end
      ei = si >>> shift;
      eq = sq >>> shift;
      @(negedge clk);
      check(out_valid == dwell_end, "valid at dwell end");
      if (dwell_end) begin
        nout++;
        check(i_out == 32'(ei), $sformatf("I result %0d vs %0d", i_out, ei));
        check(q_out == 32'(eq), "Q result");
        si = 0; sq = 0;
      end
    end
    check(nout == 30, "result count");
    // disabled: no output and sums cleared
    enable = 0; dwell_end = 1; @(negedge clk);
    check(!out_valid, "no result while disabled");
    finish_tb();
  end
endmodule
