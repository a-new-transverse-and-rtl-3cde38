// Bunch select: per-bunch configuration tables.
//
// For every bunch the processor can choose its own feedback filter, its own
// excitation and which detectors see it.  Those settings (bunch_cfg_t) are
// kept in BANKS tables of BUNCHES entries; the sequencer chooses the bank in
// use, so an experiment can switch, for example, excitation onto a chosen set
// of bunches.  Software writes entries with wr_addr = {bank, bunch}.  The
// settings of the current bunch appear one cycle after its index.  Per-bunch
// control follows the processor's description; banking by the sequencer and
// the table layout are this design's choice.
module bunch_select
  import lmbf_pkg::*;
#(
  parameter int BUNCHES = 936,
  parameter int NBANKS  = BANKS,
  localparam int BW     = $clog2(BUNCHES),
  localparam int KW     = $clog2(NBANKS)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [BW-1:0]    bunch,
  input  logic [KW-1:0]    bank,
  input  logic             wr_en,
  input  logic [KW+BW-1:0] wr_addr,
  input  bunch_cfg_t       wr_data,
  output bunch_cfg_t       cfg
);
  bunch_cfg_t tbl [NBANKS * (1 << BW)];

  always_ff @(posedge clk) begin
    if (wr_en) tbl[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rst) cfg <= '0;
    else     cfg <= tbl[{bank, bunch}];
  end
endmodule
