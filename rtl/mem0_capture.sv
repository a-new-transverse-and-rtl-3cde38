// Fast full-rate capture to memory (MEM0).
//
// Two channels of 16-bit samples, each chosen from three points of the
// processing chain (after the ADC filter, after the bunch FIR, after the
// output multiplier), are packed into one 32-bit word per cycle and written to
// a circular buffer of 2**ADDR_W words (2 GB at the default size).  `arm`
// starts writing from the current address; on `trigger` the block writes
// `post_count` more words and stops, pulsing `done`, so the buffer ends with
// the history around the trigger.  `trig_addr` records where the trigger
// fell.  `stop` ends a capture at once.  The write stream (wr_valid, wr_addr,
// wr_data) goes to the memory interconnect.  Two channels at full rate into
// a 2 GB circular buffer follow the processor's description; the trigger and
// stop rules are this design's choice.
module mem0_capture
  import lmbf_pkg::*;
#(
  parameter int ADDR_W = 29
) (
  input  logic              clk,
  input  logic              rst,
  input  sample_t           src0 [3],  // channel 0: ADC, FIR, DAC taps
  input  sample_t           src1 [3],  // channel 1: ADC, FIR, DAC taps
  input  cap_src_e          sel0,
  input  cap_src_e          sel1,
  input  logic              arm,
  input  logic              stop,
  input  logic              trigger,
  input  logic [ADDR_W-1:0] post_count,
  output logic              wr_valid,
  output logic [ADDR_W-1:0] wr_addr,
  output logic [31:0]       wr_data,
  output logic              running,
  output logic              triggered,
  output logic [ADDR_W-1:0] trig_addr,
  output logic              done
);
  logic [ADDR_W-1:0] addr, remaining;
  sample_t           d0, d1;

  always_comb begin
    d0 = (sel0 == CAP_FIR) ? src0[1] : (sel0 == CAP_DAC) ? src0[2] : src0[0];
    d1 = (sel1 == CAP_FIR) ? src1[1] : (sel1 == CAP_DAC) ? src1[2] : src1[0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      addr      <= '0;
      remaining <= '0;
      running   <= 1'b0;
      triggered <= 1'b0;
      trig_addr <= '0;
      done      <= 1'b0;
      wr_valid  <= 1'b0;
      wr_addr   <= '0;
      wr_data   <= '0;
    end else begin
      done     <= 1'b0;
      wr_valid <= running;
      wr_addr  <= addr;
      wr_data  <= {d1, d0};
      if (running) addr <= addr + ADDR_W'(1);
      if (arm && !running) begin
        running   <= 1'b1;
        triggered <= 1'b0;
      end else if (running && stop) begin
        running <= 1'b0;
        done    <= 1'b1;
      end else if (running && !triggered && trigger) begin
        triggered <= 1'b1;
        trig_addr <= addr;
        remaining <= post_count;
        if (post_count == '0) begin
          running <= 1'b0;
          done    <= 1'b1;
        end
      end else if (running && triggered) begin
        if (remaining == ADDR_W'(1)) begin
          running <= 1'b0;
          done    <= 1'b1;
        end
        remaining <= remaining - ADDR_W'(1);
      end
    end
  end
endmodule
