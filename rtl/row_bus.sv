// row_bus: the shared address and data buses of one CGRA row.
//
// All PEs of a row share one address bus and one data bus, so each bus
// carries one transaction per cycle in a row. A load's data transaction is
// the memory's read data on the data bus in the cycle after its address; a
// store's data transaction is a PE driving the data bus. The compiler
// schedules around the sharing; this block merges the PEs' requests into one
// data memory port and checks the rules. If several PEs drive the address
// bus, or several drive the data bus, or a PE drives the data bus while it
// carries load data, conflict is raised and an assertion fires; the lowest
// column wins.
//
// A load address transaction becomes a memory read (mem_ren) in the same
// cycle; the word reaches the PEs in the next cycle. A store address
// transaction is latched; the following store-data transaction writes the
// word to that address (mem_we). The address transaction of one access may
// share a cycle with the data transaction of another. The bus sharing comes
// from the evaluated architecture; the timing and the conflict handling are
// this design's choices.
//
// The source also sums the sharing up as one memory transaction per row per
// cycle. Read strictly, that also forbids an address transaction and a data
// transaction in the same cycle. ONE_TXN = 1 adds that rule to the checks:
// conflict is then also raised when the row carries more than one
// transaction (address, store data or returning load data) in a cycle. The
// datapath is the same in both modes; only the checks differ.
module row_bus
  import cgra_pkg::*;
#(
  parameter int unsigned COLS   = 4,
  parameter int unsigned DATA_W = 32,
  parameter bit          ONE_TXN = 1'b0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  mem_req_t          req [COLS],
  output logic              mem_ren,
  output logic [DATA_W-1:0] mem_raddr,
  output logic              mem_we,
  output logic [DATA_W-1:0] mem_waddr,
  output logic [DATA_W-1:0] mem_wdata,
  output logic              conflict
);

  logic [COLS-1:0]   addr_vs, data_vs;
  logic [DATA_W-1:0] a_addr, d_data;
  logic              a_store;
  logic [DATA_W-1:0] st_addr_q;
  logic              st_pend_q;
  logic              ld_data_q;   // the data bus carries load data this cycle
  logic [1:0]        n_txn;       // transactions on the row this cycle

  always_comb begin
    a_addr  = '0;
    a_store = 1'b0;
    d_data  = '0;
    for (int c = COLS - 1; c >= 0; c--) begin
      addr_vs[c] = req[c].addr_v;
      data_vs[c] = req[c].data_v;
      if (req[c].addr_v) begin
        a_addr  = req[c].addr;
        a_store = req[c].is_store;
      end
      if (req[c].data_v) d_data = req[c].data;
    end
  end

  function automatic logic multi(input logic [COLS-1:0] v);
    return (v & (v - 1'b1)) != '0;
  endfunction

  assign n_txn     = 2'(addr_vs != '0) + 2'(data_vs != '0) + 2'(ld_data_q);
  assign conflict  = multi(addr_vs) || multi(data_vs) || (ld_data_q && data_vs != '0) ||
                     (ONE_TXN && n_txn > 2'd1);

  assign mem_ren   = (addr_vs != '0) && !a_store;
  assign mem_raddr = a_addr;
  assign mem_we    = (data_vs != '0);
  assign mem_waddr = st_addr_q;
  assign mem_wdata = d_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_addr_q <= '0;
      st_pend_q <= 1'b0;
      ld_data_q <= 1'b0;
    end else begin
      ld_data_q <= mem_ren;
      if (mem_we) st_pend_q <= 1'b0;
      if ((addr_vs != '0) && a_store) begin
        st_addr_q <= a_addr;
        st_pend_q <= 1'b1;
      end
    end
  end

  a_one_addr: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(addr_vs))
    else $error("row_bus: several PEs drive the address bus");
  a_one_data: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(data_vs))
    else $error("row_bus: several PEs drive the data bus");
  a_data_free: assert property (@(posedge clk) disable iff (!rst_n) ld_data_q |-> (data_vs == '0))
    else $error("row_bus: store data while the data bus carries load data");
  a_one_txn: assert property (@(posedge clk) disable iff (!rst_n) !ONE_TXN || n_txn <= 2'd1)
    else $error("row_bus: more than one transaction on the row in one cycle");
  a_store_order: assert property (@(posedge clk) disable iff (!rst_n) (data_vs != '0) |-> st_pend_q)
    else $error("row_bus: store data without a store address");

endmodule
