// Self-checking test of sequencer with a 6-bunch turn: two programmed states
// (3 dwells of 2 turns stepping up, then 2 dwells of 1 turn stepping down).
// Checks the NCO frequency of every dwell, the dwell-end spacing in cycles,
// bank and gain per state, the idle bank, the start pulse and the done pulse.
module tb_sequencer;
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
  logic turn_start, trigger, wr_en, done;
  logic [2:0] last_state, state;
  logic [4:0] wr_addr;
  logic [31:0] wr_data;
  seq_ctrl_t ctrl;
  sequencer #(.STATES(8)) dut (.*);

  int cyc = 0;
  always @(posedge clk) if (!rst) cyc <= cyc + 1;
  always_comb turn_start = !rst && (cyc % B == 0);

  task automatic wr(input int a, input logic [31:0] d);
    wr_en = 1; wr_addr = 5'(a); wr_data = d; @(negedge clk); wr_en = 0;
  endtask

  initial begin
    int ends [$];
    logic [31:0] fr [$];
    automatic int nstart = 0, ndone = 0, tstart = 0, tdone = 0;
    automatic logic [31:0] exp_f [5] = '{32'd100, 32'd110, 32'd120, 32'd5000, 32'd4999};
    automatic int exp_gap [5] = '{2 * B, 2 * B, 2 * B, B, B};
    trigger = 0; wr_en = 0; wr_addr = '0; wr_data = '0; last_state = 3'd2;
    repeat (3) @(negedge clk);
    rst = 0;
    wr(0 * 4 + 3, {16'd0, 16'd3});
    wr(1 * 4 + 0, 32'd100); wr(1 * 4 + 1, 32'd10); wr(1 * 4 + 2, {16'd3, 16'd2});
    wr(1 * 4 + 3, {16'h1000, 16'd1});
    wr(2 * 4 + 0, 32'd5000); wr(2 * 4 + 1, 32'hFFFF_FFFF); wr(2 * 4 + 2, {16'd2, 16'd1});
    wr(2 * 4 + 3, {16'h0800, 16'd2});
    repeat (4) @(negedge clk);
    check(ctrl.bank == 2'd3 && !ctrl.busy && ctrl.gain == 0, "idle state");
    trigger = 1; @(negedge clk); trigger = 0;
    for (int n = 0; n < 200; n++) begin
      #0.5;
      if (ctrl.start) begin nstart++; tstart = cyc; end
      if (ctrl.dwell_end) begin ends.push_back(cyc); fr.push_back(ctrl.freq); end
      if (ctrl.busy && ctrl.freq >= 100 && ctrl.freq < 200)
        check(ctrl.bank == 2'd1 && ctrl.gain == 16'sh1000, "state 1 bank and gain");
      if (ctrl.busy && ctrl.freq >= 4000)
        check(ctrl.bank == 2'd2 && ctrl.gain == 16'sh0800, "state 2 bank and gain");
      if (done) begin ndone++; tdone = cyc; end
      @(negedge clk);
    end
    check(nstart == 1, "one start pulse");
    check(ends.size() == 5, $sformatf("dwell count %0d", ends.size()));
    check(ndone == 1, "one done pulse");
    if (ends.size() == 5) begin
      for (int k = 0; k < 5; k++) begin
        check(fr[k] == exp_f[k], $sformatf("dwell %0d frequency %0d", k, fr[k]));
        check(ends[k] - (k == 0 ? tstart : ends[k-1]) == exp_gap[k],
              $sformatf("dwell %0d length %0d", k, ends[k] - (k == 0 ? tstart : ends[k-1])));
      end
      check(tdone == ends[4] + 1, "done after last dwell");
    end
    check(ctrl.bank == 2'd3 && !ctrl.busy, "back to idle");
    finish_tb();
  end
endmodule
