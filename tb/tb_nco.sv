// Self-checking test of nco: for several frequencies (including zero and
// negative) the cosine and sine outputs are compared with the ideal tone of
// amplitude 32000 at the accumulator phase 18 cycles earlier, within a small
// tolerance; a phase reset is also checked.
module tb_nco;
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
  logic [31:0] freq;
  logic phase_reset;
  sample_t cos_out, sin_out;
  nco dut (.*);

  localparam int LAT = 18;
  logic [31:0] ph_model;
  logic [31:0] ph_hist [$];

  always @(posedge clk) begin
    if (rst || phase_reset) ph_model <= '0;
    else                    ph_model <= ph_model + freq;
  end

  initial begin
    automatic logic [31:0] fs [5] = '{32'h0100_0000, 32'h0123_4567, 32'h4000_0000, 32'hF000_0001, 32'h0};
    automatic int maxerr = 0;
    freq = fs[0]; phase_reset = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int f = 0; f < 5; f++) begin
      freq = fs[f];
      for (int n = 0; n < 1000; n++) begin
        phase_reset = (f == 1 && n == 500);
        @(negedge clk);
        ph_hist.push_back(ph_model);
        if (ph_hist.size() > LAT) begin
          real a, ec, es;
          int dc, ds;
          a  = 2.0 * 3.14159265358979 * real'(ph_hist[ph_hist.size() - 1 - LAT]) / 4294967296.0;
          ec = 32000.0 * $cos(a);
          es = 32000.0 * $sin(a);
          dc = int'(real'(cos_out) - ec);
          ds = int'(real'(sin_out) - es);
          if (dc < 0) dc = -dc;
          if (ds < 0) ds = -ds;
          if (dc > maxerr) maxerr = dc;
          if (ds > maxerr) maxerr = ds;
          check(dc <= 12 && ds <= 12, $sformatf("tone error %0d %0d at phase %h", dc, ds,
                ph_hist[ph_hist.size() - 1 - LAT]));
        end
      end
    end
    $display("largest error %0d LSB", maxerr);
    finish_tb();
  end
endmodule
