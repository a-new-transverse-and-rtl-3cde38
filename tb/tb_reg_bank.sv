// Self-checking test of reg_bank: writes, read-back, write strobes and
// status reads.
module tb_reg_bank;
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
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    finish_tb();
  end
  logic wr_en, rd_en;
  logic [5:0] addr;
  logic [31:0] wdata, rdata;
  logic [15:0][31:0] status;
  logic [31:0][31:0] regs;
  logic [31:0] wr_strobe;
  reg_bank #(.NREGS(32), .NSTAT(16)) dut (.*);

  initial begin
    logic [31:0] model [32];
    for (int i = 0; i < 32; i++) model[i] = '0;
    for (int i = 0; i < 16; i++) status[i] = $urandom;
    wr_en = 0; rd_en = 0; addr = '0; wdata = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 1000; n++) begin
      wr_en = 1'($urandom_range(0, 1));
      rd_en = !wr_en;
      addr  = 6'($urandom_range(0, 50));
      wdata = $urandom;
      @(negedge clk);
      if (wr_en) begin
        if (addr < 32) model[5'(addr)] = wdata;
        check(wr_strobe == ((addr < 32) ? 32'(1) << addr : 32'd0), "write strobe");
      end else begin
        check(wr_strobe == 0, "no strobe");
        check(rdata == ((addr < 32) ? model[5'(addr)] : (addr < 48) ? status[addr - 32] : 32'd0),
              $sformatf("read %0d", addr));
      end
      for (int i = 0; i < 32; i++) check(regs[i] == model[i], "register value");
    end
    finish_tb();
  end
endmodule
