// Self-checking test of bunch_interp with 6 bunches: values written every
// third turn must be held for every bunch in the turns between.
module tb_bunch_interp;
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
  localparam int B = 6;
  sample_t din, dout;
  logic din_valid;
  logic [2:0] bunch;
  bunch_interp #(.BUNCHES(B)) dut (.*);

  sample_t held [B];

  initial begin
    din = '0; din_valid = 0; bunch = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 60; t++)
      for (int b = 0; b < B; b++) begin
        bunch = 3'(b);
        din_valid = (t % 3 == 0);
        din = sample_t'($urandom);
        if (din_valid) held[b] = din;
        @(negedge clk);
        check(dout == held[b], $sformatf("held value bunch %0d turn %0d", b, t));
      end
    finish_tb();
  end
endmodule
