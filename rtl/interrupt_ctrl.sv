// Simple interrupt controller.
//
// Each event input is a one-cycle pulse.  A pulse sets its pending bit, which
// stays set until software writes a one to the matching bit of `clear`.  The
// interrupt line is raised, one cycle later, while any pending bit is enabled
// in `mask`.  The pending-bit behaviour is this design's choice.
module interrupt_ctrl #(
  parameter int N = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] events,
  input  logic [N-1:0] mask,
  input  logic [N-1:0] clear,
  output logic [N-1:0] pending,
  output logic         irq
);
  always_ff @(posedge clk) begin
    if (rst) begin
      pending <= '0;
      irq     <= 1'b0;
    end else begin
      pending <= (pending & ~clear) | events;
      irq     <= |(pending & mask);
    end
  end
endmodule
