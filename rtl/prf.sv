// prf: programmable register file (PRF) of one processing element.
//
// A register bank whose indices are rotated in a configurable region. For
// each of the three ports (read R1, read R2, write W) the instruction's index
// is added to the offset counter (log2(NUM_REGS) bits, carry dropped), the
// sum is ANDed with the threshold T, and a multiplexer driven by the register
// control (prf_rc) passes either that masked sum (index <= T, rotating
// region) or the index itself (index > T, non-rotating region) to the bank.
// The offset counter advances at the end of every loop iteration (iter_end)
// and returns to zero after T, so a value written through a fixed index in
// one iteration is not overwritten by the same instruction in the next.
//
// Timing: reads are combinational in the cycle the index is presented;
// writes, the offset update and the threshold update take effect at the
// rising edge, so a write in the last cycle of an iteration still uses the
// old offset. The structure (adder, AND, multiplexer, RC and offset counter
// per port) follows the programmable register file design; port indices
// wider than log2(NUM_REGS) bits are truncated by the caller.
module prf #(
  parameter int unsigned NUM_REGS = 4,
  parameter int unsigned DATA_W   = 32,
  localparam int unsigned IW      = (NUM_REGS > 1) ? $clog2(NUM_REGS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_we,
  input  logic [IW-1:0]     cfg_thr,
  input  logic              iter_end,
  input  logic [IW-1:0]     r1,
  input  logic [IW-1:0]     r2,
  input  logic [IW-1:0]     w,
  input  logic              we,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata1,
  output logic [DATA_W-1:0] rdata2,
  output logic [IW-1:0]     offset,   // for observation
  output logic [IW-1:0]     thr       // for observation
);

  logic          off_inc, off_clr;
  logic [2:0]    rot_sel;
  logic [IW-1:0] idx  [3];
  logic [IW-1:0] phys [3];

  assign idx[0] = r1;
  assign idx[1] = r2;
  assign idx[2] = w;

  offset_counter #(.NUM_REGS(NUM_REGS)) u_off (
    .clk, .rst_n, .inc(off_inc), .clr(off_clr), .offset
  );

  prf_rc #(.NUM_REGS(NUM_REGS)) u_rc (
    .clk, .rst_n, .cfg_we, .cfg_thr, .iter_end, .offset,
    .idx, .rot_sel, .thr, .off_inc, .off_clr
  );

  always_comb begin
    for (int p = 0; p < 3; p++) begin
      logic [IW-1:0] sum;
      sum     = idx[p] + offset;
      phys[p] = rot_sel[p] ? (sum & thr) : idx[p];
    end
  end

  reg_bank #(.NUM_REGS(NUM_REGS), .DATA_W(DATA_W)) u_bank (
    .clk, .rst_n,
    .raddr1(phys[0]), .raddr2(phys[1]), .rdata1, .rdata2,
    .we, .waddr(phys[2]), .wdata
  );

endmodule
