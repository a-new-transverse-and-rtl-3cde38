// Trigger unit.
//
// Produces one trigger for the sequencer and the fast capture.  The external
// trigger (a TTL input from the digital IO card) is synchronised with two
// flip-flops and its rising edge detected; software can also trigger.  After
// `arm`, the first enabled trigger source starts a delay of `delay` cycles,
// after which `fire` pulses once and the unit disarms.  A shared trigger for
// the processing chain follows the processor's description; arming, sources
// and delay are this design's choice.
module trigger_unit (
  input  logic        clk,
  input  logic        rst,
  input  logic        ext_trig,
  input  logic        ext_en,
  input  logic        soft_trig,
  input  logic        arm,
  input  logic        disarm,
  input  logic [15:0] delay,
  output logic        fire,
  output logic        armed,
  output logic        waiting
);
  logic [2:0]  sync;
  logic        ext_edge;
  logic [15:0] count;

  always_comb ext_edge = sync[1] && !sync[2];

  always_ff @(posedge clk) begin
    if (rst) begin
      sync    <= '0;
      armed   <= 1'b0;
      waiting <= 1'b0;
      count   <= '0;
      fire    <= 1'b0;
    end else begin
      sync <= {sync[1:0], ext_trig};
      fire <= 1'b0;
      if (disarm) begin
        armed   <= 1'b0;
        waiting <= 1'b0;
      end else if (arm && !armed && !waiting) begin
        armed <= 1'b1;
      end else if (armed && (soft_trig || (ext_en && ext_edge))) begin
        armed   <= 1'b0;
        waiting <= 1'b1;
        count   <= delay;
      end else if (waiting) begin
        if (count == '0) begin
          waiting <= 1'b0;
          fire    <= 1'b1;
        end else begin
          count <= count - 16'd1;
        end
      end
    end
  end
endmodule
