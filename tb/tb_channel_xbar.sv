// Self-checking test of channel_xbar with 16-bit samples and with a struct
// type: every select combination routes the expected source.
module tb_channel_xbar;
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
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    finish_tb();
  end
  sample_t in0, in1, alt0, alt1, out0, out1;
  logic sel0, sel1;
  nco_pair_t p0, p1, pa0, pa1, po0, po1;
  channel_xbar #(.T(sample_t)) dut (.*);
  channel_xbar #(.T(nco_pair_t)) dut2 (.in0(p0), .in1(p1), .alt0(pa0), .alt1(pa1),
    .sel0, .sel1, .out0(po0), .out1(po1));

  initial begin
    rst = 0;
    for (int n = 0; n < 200; n++) begin
      {in0, in1, alt0, alt1} = {$urandom, $urandom};
      {p0, p1} = {$urandom, $urandom};
      {pa0, pa1} = {$urandom, $urandom};
      {sel0, sel1} = 2'(n);
      #1;
      check(out0 == (sel0 ? alt0 : in0), "out0");
      check(out1 == (sel1 ? alt1 : in1), "out1");
      check(po0 == (sel0 ? pa0 : p0), "struct out0");
      check(po1 == (sel1 ? pa1 : p1), "struct out1");
    end
    finish_tb();
  end
endmodule
