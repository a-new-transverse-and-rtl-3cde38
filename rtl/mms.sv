// Bunch-by-bunch min/max/sum/sum-of-squares measurement (MMS).
//
// For every bunch the block keeps the minimum, maximum, sum and sum of squares
// of its samples over a measurement interval.  From these software derives the
// motion range (max - min), the mean position and the standard deviation of
// the motion.  Two banks are kept: one accumulates while the other holds the
// previous interval for readout.  Software ends an interval with `swap`; the
// banks change over at the next bunch-0 cycle, the new bank starts from the
// first sample of each bunch, and `turns` reports how many turns the readout
// bank holds.  Each cycle reads the bunch's entry, updates it and writes it
// back (read-modify-write in one cycle).  Readout (`rd_addr` to `rd_*`) has
// one cycle of latency.  Min/max/sum/sum of squares per bunch follow the
// processor's description; the banking and the swap rule are this design's.
module mms
  import lmbf_pkg::*;
#(
  parameter int BUNCHES = 936,
  parameter int TURN_W  = 17,
  localparam int BW     = $clog2(BUNCHES),
  localparam int SUM_W  = SAMPLE_W + TURN_W,
  localparam int SUM2_W = 2 * SAMPLE_W + TURN_W
) (
  input  logic                     clk,
  input  logic                     rst,
  input  sample_t                  din,
  input  logic [BW-1:0]            bunch,
  input  logic                     turn_start,
  input  logic                     swap,
  input  logic [BW-1:0]            rd_addr,
  output sample_t                  rd_min,
  output sample_t                  rd_max,
  output logic signed [SUM_W-1:0]  rd_sum,
  output logic [SUM2_W-1:0]        rd_sum2,
  output logic [TURN_W-1:0]        turns
);
  typedef struct packed {
    sample_t                  mn;
    sample_t                  mx;
    logic signed [SUM_W-1:0]  sum;
    logic [SUM2_W-1:0]        sum2;
  } entry_t;

  entry_t mem [2][BUNCHES];

  logic              acc_bank, fresh, swap_pending;
  logic [TURN_W-1:0] turn_count;
  logic              cur_bank, cur_fresh;
  entry_t            old_e, new_e;
  logic signed [2*SAMPLE_W-1:0] sq;

  always_comb begin
    cur_bank  = (turn_start && swap_pending) ? !acc_bank : acc_bank;
    cur_fresh = turn_start ? swap_pending : fresh;
    old_e     = mem[cur_bank][bunch];
    sq        = din * din;
    if (cur_fresh) begin
      new_e.mn   = din;
      new_e.mx   = din;
      new_e.sum  = SUM_W'(din);
      new_e.sum2 = SUM2_W'(unsigned'(sq));
    end else begin
      new_e.mn   = (din < old_e.mn) ? din : old_e.mn;
      new_e.mx   = (din > old_e.mx) ? din : old_e.mx;
      new_e.sum  = old_e.sum + SUM_W'(din);
      new_e.sum2 = old_e.sum2 + SUM2_W'(unsigned'(sq));
    end
  end

  always_ff @(posedge clk) begin
    mem[cur_bank][bunch] <= new_e;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      acc_bank     <= 1'b0;
      fresh        <= 1'b1;
      swap_pending <= 1'b1;   // first full turn after reset starts clean
      turn_count   <= '0;
      turns        <= '0;
    end else begin
      if (turn_start) begin
        acc_bank <= cur_bank;
        fresh    <= swap_pending;
        if (swap_pending) begin
          turns      <= turn_count;
          turn_count <= TURN_W'(1);
        end else if (turn_count != '1) begin
          turn_count <= turn_count + TURN_W'(1);
        end
        swap_pending <= swap;
      end else if (swap) begin
        swap_pending <= 1'b1;
      end
    end
  end

  entry_t rd_e;
  always_ff @(posedge clk) rd_e <= mem[!acc_bank][rd_addr];
  always_comb begin
    rd_min  = rd_e.mn;
    rd_max  = rd_e.mx;
    rd_sum  = rd_e.sum;
    rd_sum2 = rd_e.sum2;
  end
endmodule
