// pred_rf: predicate register file of a processing element.
//
// NUM_PREGS one-bit registers holding the outcomes of compare operations;
// predicated instructions read them to execute conditionally. One
// combinational read port and one write port written at the rising edge;
// reset clears all predicates. The predicate file is non-rotating. Its size,
// port count and lack of rotation are this design's choices.
module pred_rf #(
  parameter int unsigned NUM_PREGS = 4,
  localparam int unsigned IW       = (NUM_PREGS > 1) ? $clog2(NUM_PREGS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [IW-1:0] raddr,
  output logic          rdata,
  input  logic          we,
  input  logic [IW-1:0] waddr,
  input  logic          wdata
);

  logic [NUM_PREGS-1:0] p;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  p <= '0;
    else if (we) p[waddr] <= wdata;
  end

  assign rdata = p[raddr];

endmodule
