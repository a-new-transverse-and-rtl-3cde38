// Bunch counter.
//
// The processor handles one bunch per RF clock cycle.  This counter names the
// bunch in the current cycle: it counts 0..BUNCHES-1 and wraps, and a
// revolution marker `turn_sync` forces the next cycle to be bunch 0.
// `turn_start` is high in every bunch-0 cycle.  All per-bunch tables, the
// decimation turn count and the sequencer's dwell timing follow this index.
// Each stage reads the index as it arrives, so a fixed pipeline delay shifts
// which bunch a stage calls "bunch 0"; those skews are constant and are
// measured and compensated in software.
module bunch_counter #(
  parameter int BUNCHES = 936,
  localparam int BW = $clog2(BUNCHES)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          turn_sync,
  output logic [BW-1:0] bunch,
  output logic          turn_start
);
  always_ff @(posedge clk) begin
    if (rst || turn_sync)                bunch <= '0;
    else if (bunch == BW'(BUNCHES - 1))  bunch <= '0;
    else                                 bunch <= bunch + BW'(1);
  end

  always_comb turn_start = (bunch == '0);
endmodule
