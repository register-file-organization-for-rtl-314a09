// offset_counter: rotation offset of a rotating / programmable register file.
//
// A log2(NUM_REGS)-bit counter. It is incremented at the end of each loop
// iteration (inc, asserted once every II cycles) and cleared by the register
// control (clr), which has priority over inc. Without clr it wraps modulo
// NUM_REGS, which is the behaviour of a plain rotating register file; in the
// programmable register file the register control clears it explicitly when
// it would pass the threshold. Reset clears it. Output is the registered
// count.
module offset_counter #(
  parameter int unsigned NUM_REGS = 4,
  localparam int unsigned IW      = (NUM_REGS > 1) ? $clog2(NUM_REGS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          inc,
  input  logic          clr,
  output logic [IW-1:0] offset
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   offset <= '0;
    else if (clr) offset <= '0;
    else if (inc) offset <= offset + 1'b1;
  end

endmodule
