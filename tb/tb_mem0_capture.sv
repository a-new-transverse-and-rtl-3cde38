// Self-checking test of mem0_capture with a 6-bit address: source selection
// for both channels, circular addressing with wrap-around, the trigger
// address, the number of words written after the trigger, the done pulse,
// an immediate stop, and no writes while idle.
module tb_mem0_capture;
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
  localparam int AW = 6;
  sample_t src0 [3], src1 [3];
  cap_src_e sel0, sel1;
  logic arm, stop, trigger, wr_valid, running, triggered, done;
  logic [AW-1:0] post_count, wr_addr, trig_addr;
  logic [31:0] wr_data;
  mem0_capture #(.ADDR_W(AW)) dut (.*);

  task automatic capture(input int pre, input int post, input cap_src_e s0, input cap_src_e s1);
    int nwr = 0, after = 0, ndone = 0;
    logic [AW-1:0] exp_addr;
    logic [31:0] exp_data;
    bit seen_trig = 0;
    sel0 = s0; sel1 = s1; post_count = AW'(post);
    arm = 1; @(negedge clk); arm = 0;
    exp_addr = wr_addr + AW'(wr_valid);  // continues from the last address
    for (int n = 0; n < pre + post + 20; n++) begin
      for (int i = 0; i < 3; i++) begin src0[i] = sample_t'($urandom); src1[i] = sample_t'($urandom); end
      exp_data = {src1[int'(s1)], src0[int'(s0)]};
      trigger = (n == pre);
      @(negedge clk);
      if (n < pre + post + 1) begin
        check(wr_valid, "writing");
        if (n == 0) exp_addr = wr_addr;
        check(wr_addr == exp_addr, "address sequence");
        check(wr_data == exp_data, "captured data");
        exp_addr = exp_addr + AW'(1);
      end else begin
        check(!wr_valid, "stopped after post count");
      end
      if (trigger) check(1, "trigger");
      if (done) ndone++;
    end
    trigger = 0;
    check(ndone == 1, "done once");
    check(!running && triggered, "status after capture");
  endtask

  initial begin
    sel0 = CAP_ADC; sel1 = CAP_ADC; arm = 0; stop = 0; trigger = 0; post_count = '0;
    for (int i = 0; i < 3; i++) begin src0[i] = '0; src1[i] = '0; end
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (5) begin @(negedge clk); check(!wr_valid, "idle"); end
    capture(10, 5, CAP_ADC, CAP_FIR);
    capture(80, 20, CAP_DAC, CAP_ADC);   // wraps the 64-word buffer
    capture(3, 0, CAP_FIR, CAP_DAC);
    // trigger address check on a fresh capture
    arm = 1; @(negedge clk); arm = 0;
    repeat (7) @(negedge clk);
    begin
      logic [AW-1:0] a;
      #0.5 a = wr_addr;
      trigger = 1; post_count = 6'd2; @(negedge clk); trigger = 0;
      check(trig_addr == a + AW'(1), "trigger address");
    end
    repeat (5) @(negedge clk);
    // stop
    arm = 1; @(negedge clk); arm = 0;
    repeat (4) @(negedge clk);
    stop = 1; @(negedge clk); stop = 0;
    @(negedge clk);
    check(!running && !wr_valid, "stopped");
    finish_tb();
  end
endmodule
