// Self-checking test of mem1_capture with a 4-bit address: result sets from
// four detectors under different masks are written one per cycle, lowest
// detector first, to consecutive addresses; the buffer stops when full and
// the start of a sequence rewinds it; a set arriving too early flags overrun.
module tb_mem1_capture;
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
  localparam int AW = 4;
  logic start, in_valid, wr_valid, full, overrun;
  logic [3:0] det_mask;
  logic signed [31:0] i_in [4], q_in [4];
  logic [AW-1:0] wr_addr;
  logic [63:0] wr_data;
  mem1_capture #(.ADDR_W(AW), .NDET(4)) dut (.*);

  logic [63:0] expq [$];
  int nwr = 0;
  int next_addr = 0;
  bit checking = 1;

  always @(negedge clk) if (!rst && wr_valid && checking) begin
    logic [63:0] e;
    nwr++;
    check(expq.size() > 0, "unexpected write");
    if (expq.size() > 0) begin
      e = expq.pop_front();
      check(wr_data == e, "write data");
      check(int'(wr_addr) == next_addr, $sformatf("write address %0d vs %0d", wr_addr, next_addr));
      next_addr++;
    end
  end

  task automatic result(input logic [3:0] mask);
    det_mask = mask;
    for (int d = 0; d < 4; d++) begin i_in[d] = $urandom; q_in[d] = $urandom; end
    for (int d = 0; d < 4; d++)
      if (mask[d] && next_addr + expq.size() < 16) expq.push_back({q_in[d], i_in[d]});
    in_valid = 1; @(negedge clk); in_valid = 0;
    repeat (6) @(negedge clk);
  endtask

  initial begin
    start = 0; in_valid = 0; det_mask = '0;
    for (int d = 0; d < 4; d++) begin i_in[d] = '0; q_in[d] = '0; end
    repeat (3) @(negedge clk);
    rst = 0;
    start = 1; @(negedge clk); start = 0;
    result(4'b1111); result(4'b0101); result(4'b1000); result(4'b0000);
    check(nwr == 7 && !full, "seven words");
    result(4'b1111); result(4'b1111); result(4'b1111);   // fills 16 and drops the rest
    check(full, "full flag");
    check(expq.size() == 0, "all expected words written");
    check(nwr == 16, $sformatf("write count %0d", nwr));
    start = 1; @(negedge clk); start = 0; next_addr = 0;
    check(!full, "rewound");
    result(4'b0011);
    check(nwr == 18, "writes after rewind");
    check(!overrun, "no overrun");
    checking = 0;
    det_mask = 4'b1111; in_valid = 1; @(negedge clk); @(negedge clk); in_valid = 0;
    check(overrun, "overrun flagged");
    finish_tb();
  end
endmodule
