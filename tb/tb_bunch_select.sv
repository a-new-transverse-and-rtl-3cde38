// Self-checking test of bunch_select with 10 bunches and 4 banks: random
// entries are written, then read back for every bunch and bank with one
// cycle of latency.
module tb_bunch_select;
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
  localparam int B = 10;
  logic [3:0] bunch;
  logic [1:0] bank;
  logic wr_en;
  logic [5:0] wr_addr;
  bunch_cfg_t wr_data, cfg;
  bunch_select #(.BUNCHES(B)) dut (.*);

  bunch_cfg_t model [4][B];

  initial begin
    bunch = '0; bank = '0; wr_en = 0; wr_addr = '0; wr_data = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int k = 0; k < 4; k++)
      for (int b = 0; b < B; b++) begin
        model[k][b] = bunch_cfg_t'($urandom);
        wr_en = 1; wr_addr = {2'(k), 4'(b)}; wr_data = model[k][b];
        @(negedge clk);
      end
    wr_en = 0;
    for (int n = 0; n < 400; n++) begin
      int b, k;
      b = n % B;
      k = (n / 37) % 4;
      bunch = 4'(b); bank = 2'(k);
      @(negedge clk);
      check(cfg == model[k][b], $sformatf("bank %0d bunch %0d", k, b));
    end
    finish_tb();
  end
endmodule
