// reg_bank: the register bank of a PE's data register file.
//
// NUM_REGS registers of DATA_W bits with two combinational read ports
// (R1 -> rdata1, R2 -> rdata2) and one write port (W) written at the rising
// clock edge. The ports take physical indices: any rotation has already been
// applied by the surrounding register file. A read of the register being
// written in the same cycle returns the old value (no bypass). Reset clears
// every register. The two-read/one-write organisation follows the register
// bank drawn for the rotating and programmable register files; the reset and
// the absence of a bypass are this design's choices.
module reg_bank #(
  parameter int unsigned NUM_REGS = 4,
  parameter int unsigned DATA_W   = 32,
  localparam int unsigned IW      = (NUM_REGS > 1) ? $clog2(NUM_REGS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [IW-1:0]     raddr1,
  input  logic [IW-1:0]     raddr2,
  output logic [DATA_W-1:0] rdata1,
  output logic [DATA_W-1:0] rdata2,
  input  logic              we,
  input  logic [IW-1:0]     waddr,
  input  logic [DATA_W-1:0] wdata
);

  logic [DATA_W-1:0] regs [NUM_REGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_REGS; i++) regs[i] <= '0;
    end else if (we) begin
      regs[waddr] <= wdata;
    end
  end

  assign rdata1 = regs[raddr1];
  assign rdata2 = regs[raddr2];

endmodule
