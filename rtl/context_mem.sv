// context_mem: instruction (context) memory of one processing element.
//
// Holds one instruction per cycle of the loop kernel; the loop controller
// reads entries 0..II-1 over and over. Written word by word at configuration
// time (we/waddr/wdata); read combinationally so that the instruction at
// raddr executes in the same cycle. Reset fills it with NOPs. The depth is
// this design's choice: 16 entries hold every kernel of initiation interval
// up to 16.
module context_mem
  import cgra_pkg::*;
#(
  parameter int unsigned CTX_DEPTH = 16,
  localparam int unsigned AW       = (CTX_DEPTH > 1) ? $clog2(CTX_DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  instr_t        wdata,
  input  logic [AW-1:0] raddr,
  output instr_t        rdata
);

  instr_t mem [CTX_DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < CTX_DEPTH; i++) mem[i] <= '0;
    end else if (we) begin
      mem[waddr] <= wdata;
    end
  end

  assign rdata = mem[raddr];

endmodule
