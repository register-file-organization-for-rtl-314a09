// prf_rc: register control (RC) of the programmable register file.
//
// RC holds the threshold T that splits the register file: indices 0..T form
// the rotating region, indices above T the non-rotating one. T is written at
// configuration time (cfg_we) and must have the form 2^i - 1, so that
// "(index + offset) AND T" is the index modulo the size of the rotating
// region. Writing T also clears the offset counter.
//
// Per register port (R1, R2, W) RC compares the instruction's index with T
// and drives rot_sel: 1 selects the masked sum, 0 the raw index. At the end
// of an iteration (iter_end) RC increments the offset counter, or clears it
// when the incremented value would be greater than T, so the offset runs
// 0..T. Everything except the threshold register is combinational.
//
// The threshold form, the AND masking, the index comparison and the explicit
// counter reset follow the programmable register file design. Treating index
// T itself as rotating (index <= T) and clearing the counter on the
// incremented value are this design's reading of it: with them T = 0 makes
// the whole file non-rotating and T = NUM_REGS-1 the whole file rotating.
module prf_rc #(
  parameter int unsigned NUM_REGS = 4,
  localparam int unsigned IW      = (NUM_REGS > 1) ? $clog2(NUM_REGS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cfg_we,
  input  logic [IW-1:0] cfg_thr,
  input  logic          iter_end,
  input  logic [IW-1:0] offset,
  input  logic [IW-1:0] idx [3],   // R1, R2, W indices of the instruction
  output logic [2:0]    rot_sel,   // per port: use the rotated index
  output logic [IW-1:0] thr,
  output logic          off_inc,
  output logic          off_clr
);

  logic [IW-1:0] thr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      thr_q <= '0;
    else if (cfg_we) thr_q <= cfg_thr;
  end

  assign thr = thr_q;

  always_comb begin
    for (int p = 0; p < 3; p++) rot_sel[p] = (idx[p] <= thr_q);
  end

  logic [IW:0] next_off;
  assign next_off = {1'b0, offset} + 1'b1;

  assign off_inc = iter_end;
  assign off_clr = cfg_we || (iter_end && (next_off > {1'b0, thr_q}));

  // The compiler may only program thresholds of the form 2^i - 1.
  a_thr_form: assert property (@(posedge clk) disable iff (!rst_n)
    cfg_we |-> (((cfg_thr + 1'b1) & cfg_thr) == '0))
    else $error("prf_rc: threshold %0d is not of the form 2^i-1", cfg_thr);

endmodule
