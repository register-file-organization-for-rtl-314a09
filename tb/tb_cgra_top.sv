// tb_cgra_top: end-to-end test of the CGRA at its default size (4 x 4 PEs,
// 4-register PRFs, 1024-word data memory).
//
// Workload: the first-difference loop x[k] = y[k+1] - y[k] (k = 0..N-1),
// software-pipelined with II = 3 and run on all four rows at once, each row
// on its own slice of y and x. A row's address bus carries LDA in cycle 0
// and STA in cycle 2; its data bus carries the load data in cycle 1 and the
// store data in cycle 0. Per row:
//   PE(r,0), T = 0 (all non-rotating): pointer to y in register 2.
//       c0 LDA [r2]   c2 r2 = r2 + 4
//   PE(r,1), T = 1 (registers 0,1 rotate): keeps the last two loaded words.
//       c1 LDD -> r0   c2 out = r0 - r1 (index 1 is the previous
//       iteration's index 0)
//   PE(r,3), T = 3 (all rotating): iteration counter carried through the
//       rotating file (written at index 0, read next iteration at index 3).
//       c0 out = r3 + 1 (-> r0)   c1 pred = (1 < out)
//   PE(r,2), T = 0: pointer to x in register 2; stores predicated on the
//       east neighbour's predicate so that iteration 0 stores nothing.
//       c0 STD W (pred)   c1 r2 = r2 + 4 (pred)   c2 STA [r2] (pred)
// The loop runs N + 2 iterations. An initialisation kernel first writes the
// pointers. Checked: every x word against the formula, guard words around
// each x slice untouched, run time of II * iterations cycles, and that the
// mechanisms occurred (rotation wrap at each threshold, loads and stores on
// every row, predicated-off stores, iteration ends, no bus conflict).
module tb_cgra_top;
  import cgra_pkg::*;
  localparam int unsigned ROWS = 4, COLS = 4, W = 32, N = 24;
  localparam int unsigned II = 3, ITERS = N + 2;
  localparam logic [W-1:0] Y_BASE = 32'h000, X_BASE = 32'h800, SLICE = 32'h100;

  logic clk = 0, rst_n = 0;
  logic ctx_we = 0, thr_we = 0, start = 0;
  logic [1:0] ctx_row = 0, ctx_col = 0, thr_row = 0, thr_col = 0, thr_value = 0;
  logic [3:0] ctx_addr = 0;
  instr_t ctx_wdata = '0;
  logic [4:0] ii = 0;
  logic [15:0] iters = 0, iter_cnt;
  logic busy, done, iter_end;
  logic host_we = 0, host_re = 0;
  logic [W-1:0] host_addr = 0, host_wdata = 0, host_rdata;
  logic [W-1:0] pe_out [ROWS][COLS];
  logic [1:0] pe_offset [ROWS][COLS];
  logic [ROWS-1:0] bus_conflict, bus_load, bus_store;

  int checks = 0, failures = 0;
  int n_iter_end = 0, n_conflict = 0;
  int n_load [ROWS], n_store [ROWS], n_pred_off = 0;
  int n_wrap [COLS];
  logic [1:0] prev_off [ROWS][COLS];
  logic [W-1:0] y [ROWS][N + 2];

  cgra_top dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic put_instr(input int r, input int c, input int a, input instr_t i);
    @(negedge clk);
    ctx_we = 1; ctx_row = 2'(r); ctx_col = 2'(c); ctx_addr = 4'(a); ctx_wdata = i;
    @(negedge clk);
    ctx_we = 0;
  endtask

  task automatic put_thr(input int r, input int c, input int t);
    @(negedge clk);
    thr_we = 1; thr_row = 2'(r); thr_col = 2'(c); thr_value = 2'(t);
    @(negedge clk);
    thr_we = 0;
  endtask

  task automatic mem_write(input logic [W-1:0] a, input logic [W-1:0] d);
    @(negedge clk);
    host_we = 1; host_addr = a; host_wdata = d;
    @(negedge clk);
    host_we = 0;
  endtask

  task automatic mem_read(input logic [W-1:0] a, output logic [W-1:0] d);
    @(negedge clk);
    host_re = 1; host_addr = a;
    @(negedge clk);
    host_re = 0;
    d = host_rdata;
  endtask

  task automatic run_kernel(input int n_ii, input int n_it, output int cycles);
    @(negedge clk);
    start = 1; ii = 5'(n_ii); iters = 16'(n_it);
    @(negedge clk);
    start = 0;
    cycles = 0;
    while (!done) begin
      @(negedge clk);
      cycles++;
      if (cycles > 10000) break;
    end
  endtask

  // monitors of the mechanisms
  always @(posedge clk) if (rst_n) begin
    if (iter_end) n_iter_end++;
    for (int r = 0; r < ROWS; r++) begin
      if (bus_conflict[r]) n_conflict++;
      if (bus_load[r]) n_load[r]++;
      if (bus_store[r]) n_store[r]++;
      for (int c = 0; c < COLS; c++) begin
        if (prev_off[r][c] != 0 && pe_offset[r][c] == 0) n_wrap[c]++;
        prev_off[r][c] <= pe_offset[r][c];
      end
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    instr_t i;
    int cycles;
    logic [W-1:0] d;
    for (int r = 0; r < ROWS; r++) begin
      n_load[r] = 0; n_store[r] = 0;
      for (int c = 0; c < COLS; c++) prev_off[r][c] = '0;
    end
    for (int c = 0; c < COLS; c++) n_wrap[c] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // input data and guard words
    for (int r = 0; r < ROWS; r++) begin
      for (int k = 0; k < N + 2; k++) begin
        y[r][k] = $urandom;
        mem_write(Y_BASE + SLICE * r + 4 * k, y[r][k]);
      end
      mem_write(X_BASE + SLICE * r - 4, 32'hCAFE_0000 + r);
      mem_write(X_BASE + SLICE * r + 4 * N, 32'hBEEF_0000 + r);
    end

    // initialisation kernel (all registers non-rotating after reset)
    for (int r = 0; r < ROWS; r++) begin
      put_instr(r, 0, 0, make_instr(OP_MOV, SRC_IMM, SRC_ZERO, 0, 0, 2, 1, int'(Y_BASE + SLICE * r)));
      put_instr(r, 2, 0, make_instr(OP_MOV, SRC_IMM, SRC_ZERO, 0, 0, 2, 1, int'(X_BASE + SLICE * r)));
      put_instr(r, 3, 0, make_instr(OP_MOV, SRC_IMM, SRC_ZERO, 0, 0, 3, 1, 0));
    end
    run_kernel(1, 1, cycles);
    check(cycles == 1, "initialisation kernel runs one cycle");

    // thresholds: column 0 and 2 non-rotating, column 1 T=1, column 3 T=3
    for (int r = 0; r < ROWS; r++) begin
      put_thr(r, 0, 0); put_thr(r, 1, 1); put_thr(r, 2, 0); put_thr(r, 3, 3);
    end

    // loop kernel
    for (int r = 0; r < ROWS; r++) begin
      put_instr(r, 0, 0, make_instr(OP_LDA, SRC_RF, SRC_ZERO, 2, 0, 0, 0, 0));
      put_instr(r, 0, 1, '0);
      put_instr(r, 0, 2, make_instr(OP_ADD, SRC_RF, SRC_IMM, 2, 0, 2, 1, 4));
      put_instr(r, 1, 0, '0);
      put_instr(r, 1, 1, make_instr(OP_LDD, SRC_ZERO, SRC_ZERO, 0, 0, 0, 1, 0));
      put_instr(r, 1, 2, make_instr(OP_SUB, SRC_RF, SRC_RF, 0, 1, 0, 0, 0));
      i = make_instr(OP_STD, SRC_W, SRC_ZERO, 0, 0, 0, 0, 0); i.pen = 1; i.psrc = PSRC_E;
      put_instr(r, 2, 0, i);
      i = make_instr(OP_ADD, SRC_RF, SRC_IMM, 2, 0, 2, 1, 4); i.pen = 1; i.psrc = PSRC_E;
      put_instr(r, 2, 1, i);
      i = make_instr(OP_STA, SRC_RF, SRC_ZERO, 2, 0, 0, 0, 0); i.pen = 1; i.psrc = PSRC_E;
      put_instr(r, 2, 2, i);
      put_instr(r, 3, 0, make_instr(OP_ADD, SRC_RF, SRC_IMM, 3, 0, 0, 1, 1));
      put_instr(r, 3, 1, make_instr(OP_CMPLT, SRC_IMM, SRC_SELF, 0, 0, 0, 0, 1));
      put_instr(r, 3, 2, '0);
    end
    run_kernel(II, ITERS, cycles);
    check(cycles == II * ITERS, $sformatf("loop took %0d cycles, expected II*iterations = %0d", cycles, II * ITERS));

    // results
    for (int r = 0; r < ROWS; r++) begin
      for (int k = 0; k < N; k++) begin
        mem_read(X_BASE + SLICE * r + 4 * k, d);
        check(d == y[r][k + 1] - y[r][k], $sformatf("row %0d x[%0d] = %h expected %h", r, k, d, y[r][k + 1] - y[r][k]));
      end
      mem_read(X_BASE + SLICE * r - 4, d);
      check(d == 32'hCAFE_0000 + r, "guard word below x untouched");
      mem_read(X_BASE + SLICE * r + 4 * N, d);
      check(d == 32'hBEEF_0000 + r, "guard word above x untouched");
      check(pe_out[r][1] == y[r][N + 1] - y[r][N], "last difference left in the output register");
      check(pe_out[r][3] == 1, "last compare of the iteration counter is true");
    end

    // mechanisms
    check(n_iter_end == ITERS + 1, $sformatf("iteration ends: %0d", n_iter_end));
    check(n_wrap[1] > 0, "rotation wrap with T = 1");
    check(n_wrap[3] > 0, "rotation wrap with T = 3");
    // the store-data instruction is issued in every iteration; the two
    // paired with no valid result (iterations 0 and 1) must be predicated off
    n_pred_off = ITERS - n_store[0];
    check(n_pred_off == 2, $sformatf("predicated-off stores: %0d", n_pred_off));
    for (int r = 0; r < ROWS; r++) begin
      check(n_load[r] == ITERS, $sformatf("row %0d loads %0d", r, n_load[r]));
      check(n_store[r] == N, $sformatf("row %0d stores %0d", r, n_store[r]));
    end
    check(n_conflict == 0, "no row bus conflicts");
    $display("mechanisms: iteration ends %0d, wraps T=1 %0d T=3 %0d, predicated-off %0d, loads row0 %0d, stores row0 %0d",
             n_iter_end, n_wrap[1], n_wrap[3], n_pred_off, n_load[0], n_store[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
