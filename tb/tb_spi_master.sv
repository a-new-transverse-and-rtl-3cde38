// Self-checking test of spi_master: random transfers of random length to
// random devices against a model slave.  The slave records `sdo` on every
// rising `sclk` edge while its select is low, and answers with a random word.
// Checked per transfer: the bits received by the slave, the word returned in
// `rdata`, the number of clock edges, that only the addressed select is low,
// and the transfer time of (2*len+1)*DIV+1 cycles from `start` to `done`.
module tb_spi_master;
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
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    finish_tb();
  end
  localparam int DIV = 3;
  logic        start, sdi, sclk, sdo, busy, done;
  logic [1:0]  dev;
  logic [5:0]  len;
  logic [31:0] wdata, rdata;
  logic [2:0]  cs_n;
  spi_master #(.DIV(DIV), .NDEV(3)) dut (.*);

  logic [31:0] resp, got;
  int          edges;
  logic        sclk_q;

  // slave: answer bit for the next rising edge
  always_comb sdi = (edges < int'(len)) ? resp[int'(len) - 1 - edges] : 1'b0;

  initial begin
    start = 0; dev = '0; len = 6'd8; wdata = '0; resp = '0; edges = 0; sclk_q = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    check(cs_n == 3'b111 && !busy && !sclk, "idle after reset");
    for (int n = 0; n < 60; n++) begin
      int cycles;
      bit sel_ok;
      logic [31:0] mask;
      dev   = 2'($urandom_range(0, 2));
      len   = (n < 3) ? 6'(8 * (n + 1)) : 6'($urandom_range(1, 32));
      wdata = $urandom;
      resp  = $urandom;
      edges = 0; got = '0; sel_ok = 1; sclk_q = 0;
      start = 1;
      @(negedge clk);
      start = 0;
      cycles = 1;
      while (!done && cycles < 1000) begin
        if (cs_n != ~(3'd1 << dev)) sel_ok = 0;
        if (sclk && !sclk_q) begin
          got = {got[30:0], sdo};
          edges++;
        end
        sclk_q = sclk;
        @(negedge clk);
        cycles++;
      end
      mask = (len == 6'd32) ? 32'hFFFF_FFFF : ((32'd1 << len) - 1);
      check(sel_ok, $sformatf("only device %0d selected", dev));
      check(edges == int'(len), $sformatf("clock edges %0d for len %0d", edges, len));
      check(got == (wdata & mask), $sformatf("slave got %h, sent %h", got, wdata & mask));
      check(rdata == (resp & mask), $sformatf("rdata %h, slave sent %h", rdata, resp & mask));
      check(cycles == (2 * int'(len) + 1) * DIV + 1, $sformatf("transfer took %0d cycles", cycles));
      @(negedge clk);
      check(cs_n == 3'b111 && !busy, "deselected after transfer");
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    finish_tb();
  end
endmodule
