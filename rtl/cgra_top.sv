// cgra_top: 4 x 4 coarse-grained reconfigurable array whose processing
// elements each own a programmable register file (PRF).
//
// Structure: ROWS x COLS PEs in a mesh; each PE reads the registered data
// and predicate outputs of its north, south, east and west neighbours (no
// wrap-around; a missing neighbour reads as 0). Each PE has its own context
// memory. One loop controller steps every context memory through the
// kernel's II cycles in lockstep and marks the end of each iteration, when
// every PRF advances its rotation. The PEs of one row share an address bus
// and a data bus (row_bus) to one port of the data memory, whose read
// data is broadcast back to the row.
//
// Use: while idle, write each PE's kernel into its context memory (ctx_*),
// each PE's PRF threshold T (thr_*: 0 = all registers non-rotating,
// NUM_REGS-1 = all rotating, 2^i-1 in between) and the input data
// (host_*). Pulse start with ii and iters; busy stays high while the kernel
// runs and done pulses at the end. Registers that hold pointers and
// constants are set by instructions (a MOV of an immediate) in an
// initialisation kernel run before the loop kernel, since writing T resets
// only the rotation offset, not the registers. Host reads have one cycle of
// latency.
//
// The array size, the per-PE PRF with 4 registers and the shared row buses
// follow the evaluated configuration; the configuration and host interfaces
// are this design's own.
module cgra_top
  import cgra_pkg::*;
#(
  parameter int unsigned ROWS      = 4,
  parameter int unsigned COLS      = 4,
  parameter int unsigned NUM_REGS  = cgra_pkg::PE_NUM_REGS,
  parameter int unsigned DATA_W    = cgra_pkg::XLEN,
  parameter int unsigned CTX_DEPTH = 16,
  parameter int unsigned MEM_DEPTH = 1024,
  parameter int unsigned ITER_W    = 16,
  parameter bit          ROW_ONE_TXN = 1'b0,   // strict one-transaction-per-row check
  localparam int unsigned IW       = (NUM_REGS > 1) ? $clog2(NUM_REGS) : 1,
  localparam int unsigned CW       = (CTX_DEPTH > 1) ? $clog2(CTX_DEPTH) : 1,
  localparam int unsigned RW       = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned KW       = (COLS > 1) ? $clog2(COLS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // instruction memories
  input  logic              ctx_we,
  input  logic [RW-1:0]     ctx_row,
  input  logic [KW-1:0]     ctx_col,
  input  logic [CW-1:0]     ctx_addr,
  input  instr_t            ctx_wdata,
  // PRF thresholds
  input  logic              thr_we,
  input  logic [RW-1:0]     thr_row,
  input  logic [KW-1:0]     thr_col,
  input  logic [IW-1:0]     thr_value,
  // loop control
  input  logic              start,
  input  logic [CW:0]       ii,
  input  logic [ITER_W-1:0] iters,
  output logic              busy,
  output logic              done,
  output logic              iter_end,
  output logic [ITER_W-1:0] iter_cnt,
  // data memory host port
  input  logic              host_we,
  input  logic              host_re,
  input  logic [DATA_W-1:0] host_addr,
  input  logic [DATA_W-1:0] host_wdata,
  output logic [DATA_W-1:0] host_rdata,
  // observation
  output logic [DATA_W-1:0] pe_out    [ROWS][COLS],
  output logic [IW-1:0]     pe_offset [ROWS][COLS],
  output logic [ROWS-1:0]   bus_conflict,
  output logic [ROWS-1:0]   bus_load,     // row read its memory port this cycle
  output logic [ROWS-1:0]   bus_store     // row wrote its memory port this cycle
);

  logic [CW-1:0]     kaddr;
  logic              run;

  loop_ctrl #(.CTX_DEPTH(CTX_DEPTH), .ITER_W(ITER_W)) u_ctrl (
    .clk, .rst_n, .start, .ii, .iters,
    .ctx_addr(kaddr), .run, .iter_end, .iter_cnt, .done
  );
  assign busy = run;

  logic              pe_pred [ROWS][COLS];
  mem_req_t          reqs    [ROWS][COLS];
  logic              m_ren   [ROWS];
  logic [DATA_W-1:0] m_raddr [ROWS];
  logic [DATA_W-1:0] m_rdata [ROWS];
  logic              m_we    [ROWS];
  logic [DATA_W-1:0] m_waddr [ROWS];
  logic [DATA_W-1:0] m_wdata [ROWS];

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      instr_t            instr;
      logic [DATA_W-1:0] nd [4];
      logic [3:0]        np;

      assign nd[DIR_N] = (r > 0)        ? pe_out[(r > 0) ? r-1 : 0][c]               : '0;
      assign nd[DIR_S] = (r < ROWS - 1) ? pe_out[(r < ROWS - 1) ? r+1 : r][c]        : '0;
      assign nd[DIR_E] = (c < COLS - 1) ? pe_out[r][(c < COLS - 1) ? c+1 : c]        : '0;
      assign nd[DIR_W] = (c > 0)        ? pe_out[r][(c > 0) ? c-1 : 0]               : '0;
      assign np[DIR_N] = (r > 0)        ? pe_pred[(r > 0) ? r-1 : 0][c]              : 1'b0;
      assign np[DIR_S] = (r < ROWS - 1) ? pe_pred[(r < ROWS - 1) ? r+1 : r][c]       : 1'b0;
      assign np[DIR_E] = (c < COLS - 1) ? pe_pred[r][(c < COLS - 1) ? c+1 : c]       : 1'b0;
      assign np[DIR_W] = (c > 0)        ? pe_pred[r][(c > 0) ? c-1 : 0]              : 1'b0;

      context_mem #(.CTX_DEPTH(CTX_DEPTH)) u_ctx (
        .clk, .rst_n,
        .we(ctx_we && !run && ctx_row == RW'(r) && ctx_col == KW'(c)),
        .waddr(ctx_addr), .wdata(ctx_wdata),
        .raddr(kaddr), .rdata(instr)
      );

      pe #(.NUM_REGS(NUM_REGS), .DATA_W(DATA_W)) u_pe (
        .clk, .rst_n, .run, .iter_end, .instr,
        .cfg_thr_we(thr_we && !run && thr_row == RW'(r) && thr_col == KW'(c)),
        .cfg_thr(thr_value),
        .nbr_data(nd), .nbr_pred(np), .bus_rdata(m_rdata[r]),
        .req(reqs[r][c]), .data_out(pe_out[r][c]), .pred_out(pe_pred[r][c]),
        .rf_offset(pe_offset[r][c]), .exec()
      );
    end

    assign bus_load[r]  = m_ren[r];
    assign bus_store[r] = m_we[r];

    row_bus #(.COLS(COLS), .DATA_W(DATA_W), .ONE_TXN(ROW_ONE_TXN)) u_bus (
      .clk, .rst_n, .req(reqs[r]),
      .mem_ren(m_ren[r]), .mem_raddr(m_raddr[r]),
      .mem_we(m_we[r]), .mem_waddr(m_waddr[r]), .mem_wdata(m_wdata[r]),
      .conflict(bus_conflict[r])
    );
  end

  data_mem #(.ROWS(ROWS), .DEPTH(MEM_DEPTH), .DATA_W(DATA_W)) u_dmem (
    .clk, .rst_n,
    .ren(m_ren), .raddr(m_raddr), .rdata(m_rdata),
    .we(m_we), .waddr(m_waddr), .wdata(m_wdata),
    .host_we, .host_re, .host_addr, .host_wdata, .host_rdata
  );

endmodule
