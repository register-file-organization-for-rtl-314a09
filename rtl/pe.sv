// pe: processing element of the CGRA.
//
// Each cycle the PE executes the instruction its context memory presents.
// Operands a and b are picked from the programmable register file (ports R1
// and R2), the registered outputs of the four mesh neighbours (N, S, E, W),
// the PE's own output register, the sign-extended 16-bit immediate or zero.
// The functional unit computes in the same cycle; at the rising edge the
// result goes to the data output register (which the neighbours read) and,
// if wr_rf is set, to the register file through port W. Compares produce a
// predicate, kept in the predicate output register and optionally in the
// predicate register file.
//
// Memory accesses take two instructions, as on the evaluated architecture:
// LDA or STA drives the row address bus with a + b; a load's word is on the
// row data bus in the next cycle, where LDD takes it as its result; STD
// drives operand a on the row data bus after STA.
//
// A predicated instruction (pen) executes only if the selected predicate
// (own predicate file or a neighbour's predicate output, optionally negated)
// is 1; otherwise it writes nothing and drives no bus. Nothing executes
// while run is low. The register file rotates at iter_end whether or not the
// instruction executes. Its threshold T is written through cfg_thr_we.
//
// The PE organisation (operand multiplexers fed by neighbours and the bus, a
// functional unit, data and predicate register files, data and predicate
// output registers) follows the evaluated CGRA; the instruction fields, the
// operand sources and the predication rules are this design's own.
module pe
  import cgra_pkg::*;
#(
  parameter int unsigned NUM_REGS  = 4,
  parameter int unsigned DATA_W    = 32,
  parameter int unsigned NUM_PREGS = 4,
  localparam int unsigned IW       = (NUM_REGS > 1) ? $clog2(NUM_REGS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              run,
  input  logic              iter_end,
  input  instr_t            instr,
  input  logic              cfg_thr_we,
  input  logic [IW-1:0]     cfg_thr,
  input  logic [DATA_W-1:0] nbr_data [4],   // indexed by DIR_N/S/E/W
  input  logic [3:0]        nbr_pred,
  input  logic [DATA_W-1:0] bus_rdata,
  output mem_req_t          req,
  output logic [DATA_W-1:0] data_out,
  output logic              pred_out,
  output logic [IW-1:0]     rf_offset,      // for observation
  output logic              exec            // instruction executed this cycle
);

  localparam int unsigned PW = (NUM_PREGS > 1) ? $clog2(NUM_PREGS) : 1;

  logic [DATA_W-1:0] rf_a, rf_b, opa, opb, fu_y, result;
  logic [DATA_W-1:0] imm_ext;
  logic              fu_pred, prf_p, pred_sel, pred_ok;
  logic              is_cmp, is_value;

  assign imm_ext = DATA_W'($signed(instr.imm));

  function automatic logic [DATA_W-1:0] pick(input src_e s,
                                             input logic [DATA_W-1:0] rf,
                                             input logic [DATA_W-1:0] nb [4],
                                             input logic [DATA_W-1:0] self_v,
                                             input logic [DATA_W-1:0] imm);
    unique case (s)
      SRC_RF:   return rf;
      SRC_N:    return nb[DIR_N];
      SRC_S:    return nb[DIR_S];
      SRC_E:    return nb[DIR_E];
      SRC_W:    return nb[DIR_W];
      SRC_SELF: return self_v;
      SRC_IMM:  return imm;
      default:  return '0;
    endcase
  endfunction

  assign opa = pick(instr.src_a, rf_a, nbr_data, data_out, imm_ext);
  assign opb = pick(instr.src_b, rf_b, nbr_data, data_out, imm_ext);

  // Predication
  always_comb begin
    unique case (instr.psrc)
      PSRC_PRF: pred_sel = prf_p;
      PSRC_N:   pred_sel = nbr_pred[DIR_N];
      PSRC_S:   pred_sel = nbr_pred[DIR_S];
      PSRC_E:   pred_sel = nbr_pred[DIR_E];
      PSRC_W:   pred_sel = nbr_pred[DIR_W];
      default:  pred_sel = 1'b0;
    endcase
  end
  assign pred_ok = !instr.pen || (pred_sel ^ instr.pneg);
  assign exec    = run && pred_ok && (instr.op != OP_NOP);

  assign is_cmp   = instr.op inside {OP_CMPEQ, OP_CMPNE, OP_CMPLT};
  assign is_value = !(instr.op inside {OP_NOP, OP_LDA, OP_STA, OP_STD});

  fu #(.DATA_W(DATA_W)) u_fu (.op(instr.op), .a(opa), .b(opb), .y(fu_y), .pred(fu_pred));

  assign result = (instr.op == OP_LDD) ? bus_rdata : fu_y;

  prf #(.NUM_REGS(NUM_REGS), .DATA_W(DATA_W)) u_prf (
    .clk, .rst_n,
    .cfg_we(cfg_thr_we), .cfg_thr,
    .iter_end(run && iter_end),
    .r1(instr.ra[IW-1:0]), .r2(instr.rb[IW-1:0]), .w(instr.rw[IW-1:0]),
    .we(exec && is_value && instr.wr_rf), .wdata(result),
    .rdata1(rf_a), .rdata2(rf_b),
    .offset(rf_offset), .thr()
  );

  pred_rf #(.NUM_PREGS(NUM_PREGS)) u_pred (
    .clk, .rst_n,
    .raddr(instr.pidx[PW-1:0]), .rdata(prf_p),
    .we(exec && is_cmp && instr.wr_prf), .waddr(instr.pdst[PW-1:0]), .wdata(fu_pred)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data_out <= '0;
      pred_out <= 1'b0;
    end else if (exec) begin
      if (is_value) data_out <= result;
      if (is_cmp)   pred_out <= fu_pred;
    end
  end

  always_comb begin
    req          = '0;
    req.addr_v   = exec && (instr.op inside {OP_LDA, OP_STA});
    req.is_store = exec && (instr.op == OP_STA);
    req.addr     = fu_y;
    req.data_v   = exec && (instr.op == OP_STD);
    req.data     = opa;
  end

endmodule
