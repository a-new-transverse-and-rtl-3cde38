// SPI master for the converter card's setup interfaces.
//
// The converter card carries three devices, a clock PLL, a dual ADC and a
// dual DAC, and each of them is set up over its own SPI interface.  This
// block runs those transfers: one shared clock and data line, and one active-
// low chip select per device.  A `start` pulse, accepted while idle, selects
// device `dev`, and shifts out the low `len` bits of `wdata` (1..32 bits,
// most significant first).  At the same time it shifts in `len` bits from
// `sdi`.  SPI mode 0 is used: `sdo` changes while `sclk` is low, and `sdi` is
// sampled on each rising edge of `sclk`.
//
// Timing: each half period of `sclk` lasts DIV clock cycles.  The chip select
// falls on the cycle after `start`, with the first data bit already on `sdo`.
// The select rises DIV cycles after the last falling edge, and at that point
// `done` pulses for one cycle and `rdata` holds the bits received, right-
// aligned.  A transfer takes (2*len+1)*DIV + 1 cycles, and `busy` stays high
// throughout.
//
// That each device has its own SPI interface follows the described system.
// The frame format (length, mode 0, shared data lines) and the clock divider
// are this design's choices.  The default DIV of 25 gives a 10 MHz serial
// clock from 500 MHz.
module spi_master #(
  parameter int DIV  = 25,
  parameter int NDEV = 3,
  localparam int DW  = $clog2(NDEV)
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            start,
  input  logic [DW-1:0]   dev,
  input  logic [5:0]      len,
  input  logic [31:0]     wdata,
  input  logic            sdi,
  output logic            sclk,
  output logic            sdo,
  output logic [NDEV-1:0] cs_n,
  output logic            busy,
  output logic            done,
  output logic [31:0]     rdata
);
  localparam int CW = $clog2(DIV + 1);

  logic [CW-1:0] divc;
  logic [5:0]    bits_left;
  logic [31:0]   tx, rx;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy      <= 1'b0;
      done      <= 1'b0;
      sclk      <= 1'b0;
      sdo       <= 1'b0;
      cs_n      <= '1;
      divc      <= '0;
      bits_left <= '0;
      tx        <= '0;
      rx        <= '0;
      rdata     <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start && len != 0) begin
          busy      <= 1'b1;
          cs_n      <= ~(NDEV'(1) << dev);
          tx        <= wdata << (6'd32 - len);   // first bit to the top
          sdo       <= wdata[5'(len - 6'd1)];
          rx        <= '0;
          divc      <= '0;
          sclk      <= 1'b0;
          bits_left <= len;
        end
      end else if (divc != CW'(DIV - 1)) begin
        divc <= divc + 1'b1;
      end else begin
        divc <= '0;
        if (bits_left == 0) begin             // trailing half period done
          busy  <= 1'b0;
          done  <= 1'b1;
          cs_n  <= '1;
          rdata <= rx;
        end else if (!sclk) begin             // rising edge: sample
          sclk <= 1'b1;
          rx   <= {rx[30:0], sdi};
        end else begin                        // falling edge: next bit
          sclk      <= 1'b0;
          bits_left <= bits_left - 1'b1;
          tx        <= tx << 1;
          sdo       <= tx[30];
        end
      end
    end
  end
endmodule
