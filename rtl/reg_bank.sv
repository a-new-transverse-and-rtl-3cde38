// Register bank.
//
// NREGS 32-bit control registers written from the host's register bus.  The
// current values drive the processing chain directly (`regs`), and a write
// also gives a one-cycle pulse on the register's `wr_strobe` bit, used for
// action registers such as "arm" or "swap".  Reads return, one cycle later,
// either a control register (address below NREGS) or one of NSTAT status
// words supplied by the logic (addresses NREGS and up).  Four instances make
// the processor's four banks: system, shared control, and one per channel.
// The register layout is this design's own.
module reg_bank #(
  parameter int NREGS = 32,
  parameter int NSTAT = 16,
  localparam int AW   = $clog2(NREGS + NSTAT),
  localparam int RW   = $clog2(NREGS)
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         wr_en,
  input  logic                         rd_en,
  input  logic [AW-1:0]                addr,
  input  logic [31:0]                  wdata,
  input  logic [NSTAT-1:0][31:0]       status,
  output logic [31:0]                  rdata,
  output logic [NREGS-1:0][31:0]       regs,
  output logic [NREGS-1:0]             wr_strobe
);
  always_ff @(posedge clk) begin
    if (rst) begin
      regs      <= '0;
      wr_strobe <= '0;
      rdata     <= '0;
    end else begin
      wr_strobe <= '0;
      if (wr_en && 32'(addr) < NREGS) begin
        regs[RW'(addr)]      <= wdata;
        wr_strobe[RW'(addr)] <= 1'b1;
      end
      if (rd_en) begin
        if (32'(addr) < NREGS)               rdata <= regs[RW'(addr)];
        else if (32'(addr) < NREGS + NSTAT)  rdata <= status[32'(addr) - NREGS];
        else                                 rdata <= '0;
      end
    end
  end
endmodule
