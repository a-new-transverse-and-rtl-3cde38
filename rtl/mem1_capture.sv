// Detector capture to memory (MEM1).
//
// At the end of every dwell all detectors of a channel deliver an I/Q pair at
// once.  This block latches the pairs of the detectors enabled in `det_mask`
// and writes them one per cycle, lowest detector first, as 64-bit words
// {Q, I} to a linear buffer of 2**ADDR_W words (64 MB at the default size).
// `start` (the start of a sequence) rewinds the address; when the buffer is
// full further results are dropped and `full` is set.  A new set arriving
// before the previous one is written out sets `overrun` (dwells are at least
// one turn long, so this does not happen in normal use).  Detector results
// going to a 64 MB block per channel follow the processor's description; the
// word layout and ordering are this design's choice.
module mem1_capture
  import lmbf_pkg::*;
#(
  parameter int ADDR_W = 23,
  parameter int NDET   = DETECTORS
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               start,
  input  logic [NDET-1:0]    det_mask,
  input  logic               in_valid,
  input  logic signed [31:0] i_in [NDET],
  input  logic signed [31:0] q_in [NDET],
  output logic               wr_valid,
  output logic [ADDR_W-1:0]  wr_addr,
  output logic [63:0]        wr_data,
  output logic               full,
  output logic               overrun
);
  logic [NDET-1:0]    pend;
  logic signed [31:0] bi [NDET];
  logic signed [31:0] bq [NDET];
  logic [ADDR_W-1:0]  addr;
  int                 pick;

  always_comb begin
    pick = 0;
    for (int d = NDET - 1; d >= 0; d--)
      if (pend[d]) pick = d;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pend     <= '0;
      addr     <= '0;
      full     <= 1'b0;
      overrun  <= 1'b0;
      wr_valid <= 1'b0;
      wr_addr  <= '0;
      wr_data  <= '0;
    end else begin
      wr_valid <= 1'b0;
      if (start) begin
        addr <= '0;
        full <= 1'b0;
      end else if (pend != '0) begin
        pend[pick] <= 1'b0;
        if (!full) begin
          wr_valid <= 1'b1;
          wr_addr  <= addr;
          wr_data  <= {bq[pick], bi[pick]};
          addr     <= addr + ADDR_W'(1);
          if (addr == '1) full <= 1'b1;
        end
      end
      if (in_valid) begin
        if (pend != '0) overrun <= 1'b1;
        pend <= det_mask;
        for (int d = 0; d < NDET; d++) begin
          bi[d] <= i_in[d];
          bq[d] <= q_in[d];
        end
      end
    end
  end
endmodule
