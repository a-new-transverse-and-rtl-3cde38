// Self-checking test of mms with 8 bunches: random samples over several
// measurement intervals; after each swap the readout bank is compared, bunch
// by bunch, with min, max, sum and sum of squares computed here, and the turn
// count with the number of turns in the interval.
module tb_mms;
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
  localparam int B = 8;
  sample_t din, rd_min, rd_max;
  logic [2:0] bunch, rd_addr;
  logic turn_start, swap;
  logic signed [32:0] rd_sum;
  logic [48:0] rd_sum2;
  logic [16:0] turns;
  mms #(.BUNCHES(B), .TURN_W(17)) dut (.*);

  longint mn [B], mx [B], sm [B], s2 [B];
  int nturns;

  initial begin
    din = '0; bunch = '0; turn_start = 0; swap = 0; rd_addr = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int iv = 0; iv < 6; iv++) begin
      automatic int len = 3 + iv * 5;
      // one interval: the swap request comes mid-turn before the interval
      for (int t = 0; t < len; t++) begin
        for (int b = 0; b < B; b++) begin
          sample_t x;
          x = (iv == 2) ? sample_t'(-32768 + $urandom_range(0, 3)) : sample_t'($urandom);
          bunch = 3'(b); turn_start = (b == 0); din = x;
          swap = (t == len - 1 && b == 3);
          if (t == 0) begin
            mn[b] = longint'(x); mx[b] = longint'(x); sm[b] = longint'(x); s2[b] = longint'(x) * longint'(x);
          end else begin
            if (longint'(x) < mn[b]) mn[b] = longint'(x);
            if (longint'(x) > mx[b]) mx[b] = longint'(x);
            sm[b] += longint'(x);
            s2[b] += longint'(x) * longint'(x);
          end
          @(negedge clk);
        end
      end
      // first cycle of the next interval swaps the banks
      bunch = 0; turn_start = 1; swap = 0; din = '0;
      @(negedge clk);
      turn_start = 0;
      for (int b = 0; b < B; b++) begin
        rd_addr = 3'(b);
        bunch = 3'(b + 1);  // keep the stream going without a new turn
        @(negedge clk);
        if (iv > 0) begin
          check(longint'(rd_min) == mn[b], $sformatf("min iv%0d b%0d", iv, b));
          check(longint'(rd_max) == mx[b], "max");
          check(longint'(rd_sum) == sm[b], "sum");
          check(longint'(rd_sum2) == s2[b], "sum of squares");
        end
      end
      if (iv > 0) check(int'(turns) == len, $sformatf("turns %0d vs %0d", turns, len));
      // restart the interval model: the read cycles above fed bunch 0..7 with 0
      // (turn 0 of the next interval), continue from the next turn with t=0 data
      // by discarding them: restart with a clean swap
      swap = 1; @(negedge clk); swap = 0;
    end
    finish_tb();
  end
endmodule
