// tb_livermore: seven Livermore loop kernels run end to end on the default
// CGRA (4 x 4 PEs, 4-register PRFs), each hand-scheduled with II = 3 and
// checked word by word against the loop computed here.
//
//   first_sum   x[k] = x[k-1] + y[k]   (x[-1] = 0)
//       The running sum is a loop-carried value kept in a rotating region
//       (T = 1): written through index 0, read next iteration through
//       index 1. A neighbour predicate set at the end of iteration 0 blocks
//       the first store-data transaction. Stores put their data on the row
//       data bus in cycle 0, which loads leave free.
//   inner_prod  q = sum z[k] * x[k]
//       z and x stream in on rows 0 and 1 in parallel; the accumulator is a
//       non-rotating register; a second kernel stores q.
//   hydro_1d    x[k] = q + y[k] * (r * z[k+10] + t * z[k+11])
//       z[k+11] loaded in one iteration is reused as z[k+10] in the next
//       through the rotating region (T = 1) while the constants r and t sit
//       in the non-rotating registers 2 and 3 of the same PE; an iteration
//       counter in an all-rotating file (T = 3) predicates the stores of the
//       first three iterations away.
//   tridiag_elim  x[i] = z[i] * (y[i] - x[i-1])
//       A recurrence through a multiply: z and y stream in on rows 0 and 1,
//       x[i-1] stays in a register of PE(1,1). The outputs left by the
//       initialisation kernel make the first MUL (before any difference
//       exists) reproduce x[0].
//   mat_x_mat   px[j][i] += vy[k][i] * cx[j][k]   (innermost loop, over j)
//       Two columns i at once on rows 0 and 2, matrix rows of 25 words.
//       Each row's address bus is busy in every cycle (two LDA and a STA)
//       and so is its data bus (two loads' data and a store's data). px[j]
//       is loaded one iteration before it is added to, so it waits in a
//       rotating pair (T = 1); the iteration counters for the store
//       predicates run in rows 1 and 3 (T = 3). The whole px region is
//       checked, so a stray store would show.
//   iccg        x[k++] = x[i] - v[i] * x[i-1] - v[i+1] * x[i+1], i += 2
//       One pass of the inner loop. x[i+1] loaded in one iteration is
//       x[i-1] of the next: it waits in a rotating pair (T = 1), where the
//       two indices swap each iteration. Rows 0 and 1 stream x and v (two
//       loads per row per iteration); row 2 stores, predicated by an
//       iteration counter in PE(2,3).
//   band_lin_eq temp = x[5]; temp -= x[t] * y[4 + 5t] over t; x[5] = y[4] * temp
//       One pass of the outer loop: a strided dot product with the running
//       value in a non-rotating register, then a one-iteration kernel that
//       scales and stores it.
// Every run also checks its cycle count (II * iterations).
module tb_livermore;
  import cgra_pkg::*;
  localparam int unsigned W = 32, N = 40;

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
  logic [W-1:0] pe_out [4][4];
  logic [1:0] pe_offset [4][4];
  logic [3:0] bus_conflict, bus_load, bus_store;

  int checks = 0, failures = 0, n_conflict = 0;

  cgra_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && bus_conflict != 0) n_conflict++;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic do_reset();
    @(negedge clk); rst_n = 0;
    @(negedge clk); rst_n = 1;
  endtask

  task automatic put(input int r, input int c, input int a, input instr_t i);
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

  task automatic wr(input logic [W-1:0] a, input logic [W-1:0] d);
    @(negedge clk);
    host_we = 1; host_addr = a; host_wdata = d;
    @(negedge clk);
    host_we = 0;
  endtask

  task automatic rd(input logic [W-1:0] a, output logic [W-1:0] d);
    @(negedge clk);
    host_re = 1; host_addr = a;
    @(negedge clk);
    host_re = 0;
    d = host_rdata;
  endtask

  task automatic run(input int n_ii, input int n_it, input string what);
    int cycles = 0;
    @(negedge clk);
    start = 1; ii = 5'(n_ii); iters = 16'(n_it);
    @(negedge clk);
    start = 0;
    while (!done && cycles < 100000) begin
      @(negedge clk);
      cycles++;
    end
    check(cycles == n_ii * n_it, $sformatf("%s: %0d cycles, expected %0d", what, cycles, n_ii * n_it));
  endtask

  task automatic clear_ctx();
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        put(r, c, 0, '0); put(r, c, 1, '0); put(r, c, 2, '0);
      end
  endtask

  function automatic instr_t pred_on(input instr_t i, input psrc_e s);
    instr_t o;
    o = i; o.pen = 1; o.psrc = s;
    return o;
  endfunction

  // ---------------------------------------------------------------- first_sum
  task automatic first_sum();
    localparam logic [W-1:0] Y = 32'h000, X = 32'h400;
    logic [W-1:0] y [N], d, acc;
    do_reset();
    for (int k = 0; k < N; k++) begin y[k] = $urandom; wr(Y + 4 * k, y[k]); end
    wr(X - 4, 32'h5A5A_5A5A);
    wr(X + 4 * N, 32'hA5A5_A5A5);
    // pointers: y in PE(0,0) r2; x - 4 in PE(0,2) r2
    put(0, 0, 0, make_instr(OP_MOV, SRC_IMM, SRC_ZERO, 0, 0, 2, 1, int'(Y)));
    put(0, 2, 0, make_instr(OP_MOV, SRC_IMM, SRC_ZERO, 0, 0, 2, 1, int'(X - 4)));
    run(1, 1, "first_sum init");
    put_thr(0, 1, 1);
    put(0, 0, 0, make_instr(OP_LDA, SRC_RF, SRC_ZERO, 2, 0, 0, 0, 0));
    put(0, 0, 1, make_instr(OP_LDD, SRC_ZERO, SRC_ZERO, 0, 0, 0, 0, 0));
    put(0, 0, 2, make_instr(OP_ADD, SRC_RF, SRC_IMM, 2, 0, 2, 1, 4));
    put(0, 1, 2, make_instr(OP_ADD, SRC_W, SRC_RF, 0, 1, 0, 1, 0));
    put(0, 2, 0, pred_on(make_instr(OP_STD, SRC_W, SRC_ZERO, 0, 0, 0, 0, 0), PSRC_E));
    put(0, 2, 1, make_instr(OP_ADD, SRC_RF, SRC_IMM, 2, 0, 2, 1, 4));
    put(0, 2, 2, make_instr(OP_STA, SRC_RF, SRC_ZERO, 2, 0, 0, 0, 0));
    put(0, 3, 2, make_instr(OP_CMPEQ, SRC_ZERO, SRC_ZERO, 0, 0, 0, 0, 0));
    run(3, N + 1, "first_sum loop");
    acc = 0;
    for (int k = 0; k < N; k++) begin
      acc = acc + y[k];
      rd(X + 4 * k, d);
      check(d == acc, $sformatf("first_sum x[%0d] = %h expected %h", k, d, acc));
    end
    rd(X - 4, d);    check(d == 32'h5A5A_5A5A, "first_sum guard below");
    rd(X + 4 * N, d); check(d == 32'hA5A5_A5A5, "first_sum guard above");
  endtask

  // --------------------------------------------------------------- inner_prod
  task automatic inner_prod();
    localparam logic [W-1:0] Z = 32'h000, X = 32'h400, Q = 32'hC00;
    logic [W-1:0] z [N], x [N], d, q;
    do_reset();
    q = 0;
    for (int k = 0; k < N; k++) begin
      z[k] = $urandom; x[k] = $urandom;
      wr(Z + 4 * k, z[k]); wr(X + 4 * k, x[k]);
      q = q + z[k] * x[k];
    end
    put(0, 0, 0, make_instr(OP_MOV, SRC_IMM, SRC_ZERO, 0, 0, 2, 1, int'(Z)));
    put(1, 0, 0, make_instr(OP_MOV, SRC_IMM, SRC_ZERO, 0, 0, 2, 1, int'(X)));
    run(1, 1, "inner_prod init");
    for (int r = 0; r < 2; r++) begin
      put(r, 0, 0, make_instr(OP_LDA, SRC_RF, SRC_ZERO, 2, 0, 0, 0, 0));
      put(r, 0, 1, make_instr(OP_LDD, SRC_ZERO, SRC_ZERO, 0, 0, 0, 0, 0));
      put(r, 0, 2, make_instr(OP_ADD, SRC_RF, SRC_IMM, 2, 0, 2, 1, 4));
    end
    put(0, 1, 2, make_instr(OP_MOV, SRC_W, SRC_ZERO, 0, 0, 0, 0, 0));         // z[k] south-bound
    put(1, 1, 0, make_instr(OP_MUL, SRC_RF, SRC_N, 0, 0, 0, 0, 0));           // x[k-1] * z[k-1]
    put(1, 1, 1, make_instr(OP_ADD, SRC_RF, SRC_SELF, 2, 0, 2, 1, 0));        // q += product
    put(1, 1, 2, make_instr(OP_MOV, SRC_W, SRC_ZERO, 0, 0, 0, 1, 0));         // keep x[k]
    run(3, N + 1, "inner_prod loop");
    clear_ctx();
    put(1, 1, 0, make_instr(OP_STA, SRC_IMM, SRC_ZERO, 0, 0, 0, 0, int'(Q)));
    put(1, 1, 1, make_instr(OP_STD, SRC_RF, SRC_ZERO, 2, 0, 0, 0, 0));
    run(2, 1, "inner_prod store");
    rd(Q, d);
    check(d == q, $sformatf("inner_prod q = %h expected %h", d, q));
  endtask

  // ----------------------------------------------------------------- hydro_1d
  task automatic hydro_1d();
    localparam logic [W-1:0] Y = 32'h008, Z = 32'h400, X = 32'h800;
    localparam int QC = 1234, RC = -3, TC = 17;
    logic [W-1:0] y [N], z [N + 14], d, e;
    do_reset();
    for (int k = 0; k < N; k++) begin y[k] = $urandom; wr(Y + 4 * k, y[k]); end
    for (int k = 0; k < N + 14; k++) begin z[k] = $urandom; wr(Z + 4 * k, z[k]); end
    wr(X - 4, 32'h1111_1111);
    wr(X + 4 * N, 32'h2222_2222);
    // constants and pointers
    put(0, 0, 0, make_instr(OP_MOV, SRC_IMM, SRC_ZERO, 0, 0, 2, 1, int'(Z + 40)));
    put(0, 1, 0, make_instr(OP_MOV, SRC_IMM, SRC_ZERO, 0, 0, 2, 1, RC));
    put(0, 1, 1, make_instr(OP_MOV, SRC_IMM, SRC_ZERO, 0, 0, 3, 1, TC));
    put(1, 0, 0, make_instr(OP_MOV, SRC_IMM, SRC_ZERO, 0, 0, 2, 1, int'(Y - 8)));
    put(1, 2, 0, make_instr(OP_MOV, SRC_IMM, SRC_ZERO, 0, 0, 2, 1, QC));
    put(1, 3, 0, make_instr(OP_MOV, SRC_IMM, SRC_ZERO, 0, 0, 2, 1, int'(X)));
    run(2, 1, "hydro_1d init");
    put_thr(0, 1, 1);
    put_thr(0, 3, 3);
    // row 0: z stream and r*z[k+10] + t*z[k+11]
    put(0, 0, 0, make_instr(OP_LDA, SRC_RF, SRC_ZERO, 2, 0, 0, 0, 0));
    put(0, 0, 1, make_instr(OP_LDD, SRC_ZERO, SRC_ZERO, 0, 0, 0, 0, 0));
    put(0, 0, 2, make_instr(OP_ADD, SRC_RF, SRC_IMM, 2, 0, 2, 1, 4));
    put(0, 1, 0, make_instr(OP_MUL, SRC_RF, SRC_RF, 0, 2, 0, 0, 0));          // r * z[k+10]
    put(0, 1, 1, make_instr(OP_MUL, SRC_RF, SRC_RF, 1, 3, 0, 0, 0));          // t * z[k+11]
    put(0, 1, 2, make_instr(OP_MOV, SRC_W, SRC_ZERO, 0, 0, 0, 1, 0));         // rotate new z in
    put(0, 2, 1, make_instr(OP_MOV, SRC_W, SRC_ZERO, 0, 0, 0, 1, 0));
    put(0, 2, 2, make_instr(OP_ADD, SRC_W, SRC_RF, 0, 0, 0, 0, 0));
    // iteration counter through the all-rotating file, predicate = (count > 3)
    put(0, 3, 0, make_instr(OP_ADD, SRC_RF, SRC_IMM, 3, 0, 0, 1, 1));
    put(0, 3, 1, make_instr(OP_CMPLT, SRC_IMM, SRC_SELF, 0, 0, 0, 0, 3));
    // row 1: y stream, multiply, add q, store
    put(1, 0, 0, make_instr(OP_LDA, SRC_RF, SRC_ZERO, 2, 0, 0, 0, 0));
    put(1, 0, 1, make_instr(OP_LDD, SRC_ZERO, SRC_ZERO, 0, 0, 0, 0, 0));
    put(1, 0, 2, make_instr(OP_ADD, SRC_RF, SRC_IMM, 2, 0, 2, 1, 4));
    put(1, 1, 2, make_instr(OP_MOV, SRC_W, SRC_ZERO, 0, 0, 0, 0, 0));
    put(1, 2, 0, make_instr(OP_MUL, SRC_N, SRC_W, 0, 0, 0, 0, 0));
    put(1, 2, 1, make_instr(OP_ADD, SRC_SELF, SRC_RF, 0, 2, 0, 0, 0));
    put(1, 3, 0, pred_on(make_instr(OP_STD, SRC_W, SRC_ZERO, 0, 0, 0, 0, 0), PSRC_N));
    put(1, 3, 1, pred_on(make_instr(OP_ADD, SRC_RF, SRC_IMM, 2, 0, 2, 1, 4), PSRC_N));
    put(1, 3, 2, pred_on(make_instr(OP_STA, SRC_RF, SRC_ZERO, 2, 0, 0, 0, 0), PSRC_N));
    run(3, N + 4, "hydro_1d loop");
    for (int k = 0; k < N; k++) begin
      e = W'(QC) + y[k] * (W'(RC) * z[k + 10] + W'(TC) * z[k + 11]);
      rd(X + 4 * k, d);
      check(d == e, $sformatf("hydro_1d x[%0d] = %h expected %h", k, d, e));
    end
    rd(X - 4, d);     check(d == 32'h1111_1111, "hydro_1d guard below");
    rd(X + 4 * N, d); check(d == 32'h2222_2222, "hydro_1d guard above");
  endtask


  // ------------------------------------------------------------- tridiag_elim
  task automatic tridiag_elim();
    localparam logic [W-1:0] Y = 32'h000, Z = 32'h400, X = 32'h800;
    logic [W-1:0] y [N + 1], z [N + 1], x [N], d;
    int x0;
    do_reset();
    for (int k = 0; k <= N; k++) begin
      y[k] = $urandom; z[k] = $urandom;
      wr(Y + 4 * k, y[k]); wr(Z + 4 * k, z[k]);
    end
    x0 = int'($urandom_range(0, 60000)) - 30000;
    x[0] = W'(x0);
    for (int k = 1; k < N; k++) x[k] = z[k] * (y[k] - x[k - 1]);
    wr(X, 32'h3333_3333);
    wr(X + 4 * N, 32'h4444_4444);
    put(0, 0, 0, make_instr(OP_MOV, SRC_IMM, SRC_ZERO, 0, 0, 2, 1, int'(Z + 4)));
    put(1, 0, 0, make_instr(OP_MOV, SRC_IMM, SRC_ZERO, 0, 0, 2, 1, int'(Y + 4)));
    // outputs left by the initialisation make the first MUL yield 1 * x[0]
    put(0, 1, 0, make_instr(OP_MOV, SRC_IMM, SRC_ZERO, 0, 0, 0, 0, 1));
    put(1, 1, 0, make_instr(OP_MOV, SRC_IMM, SRC_ZERO, 0, 0, 0, 1, x0));
    put(1, 2, 0, make_instr(OP_MOV, SRC_IMM, SRC_ZERO, 0, 0, 2, 1, int'(X)));
    run(1, 1, "tridiag_elim init");
    for (int r = 0; r < 2; r++) begin
      put(r, 0, 0, make_instr(OP_LDA, SRC_RF, SRC_ZERO, 2, 0, 0, 0, 0));
      put(r, 0, 1, make_instr(OP_LDD, SRC_ZERO, SRC_ZERO, 0, 0, 0, 0, 0));
      put(r, 0, 2, make_instr(OP_ADD, SRC_RF, SRC_IMM, 2, 0, 2, 1, 4));
    end
    put(0, 1, 2, make_instr(OP_MOV, SRC_W, SRC_ZERO, 0, 0, 0, 0, 0));         // z[i] south-bound
    put(1, 1, 2, make_instr(OP_SUB, SRC_W, SRC_RF, 0, 0, 0, 0, 0));          // y[i] - x[i-1]
    put(1, 1, 0, make_instr(OP_MUL, SRC_N, SRC_SELF, 0, 0, 0, 1, 0));        // x[i] -> r0
    put(1, 2, 0, pred_on(make_instr(OP_ADD, SRC_RF, SRC_IMM, 2, 0, 2, 1, 4), PSRC_E));
    put(1, 2, 1, pred_on(make_instr(OP_STA, SRC_RF, SRC_ZERO, 2, 0, 0, 0, 0), PSRC_E));
    put(1, 2, 2, pred_on(make_instr(OP_STD, SRC_W, SRC_ZERO, 0, 0, 0, 0, 0), PSRC_E));
    put(1, 3, 2, make_instr(OP_CMPEQ, SRC_ZERO, SRC_ZERO, 0, 0, 0, 0, 0));
    run(3, N, "tridiag_elim loop");
    for (int k = 1; k < N; k++) begin
      rd(X + 4 * k, d);
      check(d == x[k], $sformatf("tridiag_elim x[%0d] = %h expected %h", k, d, x[k]));
    end
    rd(X, d);         check(d == 32'h3333_3333, "tridiag_elim x[0] untouched");
    rd(X + 4 * N, d); check(d == 32'h4444_4444, "tridiag_elim guard above");
  endtask

  // --------------------------------------------------------------------- iccg
  // One pass of the inner loop: for i = I0, I0+2, ...:
  //   x[k++] = x[i] - v[i] * x[i-1] - v[i+1] * x[i+1]
  task automatic iccg();
    localparam int I0 = 1, M = 20, NX = 48, K0 = 64;
    localparam logic [W-1:0] X = 32'h000, V = 32'h400;
    logic [W-1:0] x [K0 + M + 1], v [NX], d, e;
    do_reset();
    for (int k = 0; k < NX; k++) begin
      x[k] = $urandom; v[k] = $urandom;
      wr(X + 4 * k, x[k]); wr(V + 4 * k, v[k]);
    end
    wr(X + 4 * (K0 - 1), 32'h6666_6666);
    wr(X + 4 * (K0 + M), 32'h7777_7777);
    put(0, 0, 0, make_instr(OP_MOV, SRC_IMM, SRC_ZERO, 0, 0, 2, 1, int'(X) + 4 * I0));
    put(1, 0, 0, make_instr(OP_MOV, SRC_IMM, SRC_ZERO, 0, 0, 2, 1, int'(V) + 4 * I0));
    put(0, 1, 0, make_instr(OP_LDA, SRC_IMM, SRC_ZERO, 0, 0, 0, 0, int'(X) + 4 * (I0 - 1)));
    put(0, 1, 1, make_instr(OP_LDD, SRC_ZERO, SRC_ZERO, 0, 0, 1, 1, 0));     // x[I0-1] -> r1
    put(2, 2, 0, make_instr(OP_MOV, SRC_IMM, SRC_ZERO, 0, 0, 2, 1, int'(X) + 4 * K0 - 8));
    run(2, 1, "iccg init");
    clear_ctx();
    put_thr(0, 1, 1);
    put_thr(0, 2, 1);
    put_thr(2, 3, 3);
    for (int r = 0; r < 2; r++) begin                                         // x and v streams
      put(r, 0, 0, make_instr(OP_LDA, SRC_RF, SRC_ZERO, 2, 0, 0, 0, 0));    // [i]
      put(r, 0, 1, make_instr(OP_LDA, SRC_RF, SRC_IMM, 2, 0, 0, 0, 4));     // [i+1]
      put(r, 0, 2, make_instr(OP_ADD, SRC_RF, SRC_IMM, 2, 0, 2, 1, 8));
    end
    put(0, 1, 2, make_instr(OP_LDD, SRC_ZERO, SRC_ZERO, 0, 0, 0, 1, 0));     // x[i+1] -> r0
    put(0, 1, 0, make_instr(OP_MUL, SRC_RF, SRC_S, 0, 0, 0, 0, 0));          // v[i] * x[i-1]
    put(1, 1, 1, make_instr(OP_LDD, SRC_ZERO, SRC_ZERO, 0, 0, 0, 0, 0));     // v[i]
    put(1, 1, 0, make_instr(OP_MUL, SRC_N, SRC_E, 0, 0, 0, 0, 0));           // x[i+1] * v[i+1]
    put(1, 2, 2, make_instr(OP_LDD, SRC_ZERO, SRC_ZERO, 0, 0, 0, 0, 0));     // v[i+1]
    put(1, 2, 1, make_instr(OP_MOV, SRC_W, SRC_ZERO, 0, 0, 0, 1, 0));        // keep second product
    put(1, 2, 0, make_instr(OP_SUB, SRC_N, SRC_RF, 0, 0, 0, 0, 0));          // result
    put(0, 2, 1, make_instr(OP_LDD, SRC_ZERO, SRC_ZERO, 0, 0, 0, 1, 0));     // x[i] -> r0
    put(0, 2, 2, make_instr(OP_SUB, SRC_RF, SRC_W, 1, 0, 0, 0, 0));          // x[i] - first product
    put(2, 2, 0, pred_on(make_instr(OP_STA, SRC_RF, SRC_ZERO, 2, 0, 0, 0, 0), PSRC_E));
    put(2, 2, 1, pred_on(make_instr(OP_STD, SRC_N, SRC_ZERO, 0, 0, 0, 0, 0), PSRC_E));
    put(2, 2, 2, make_instr(OP_ADD, SRC_RF, SRC_IMM, 2, 0, 2, 1, 4));
    put(2, 3, 0, make_instr(OP_ADD, SRC_RF, SRC_IMM, 3, 0, 0, 1, 1));
    put(2, 3, 1, make_instr(OP_CMPLT, SRC_IMM, SRC_SELF, 0, 0, 0, 0, 1));
    run(3, M + 2, "iccg loop");
    for (int m = 0; m < M; m++) begin
      int i;
      i = I0 + 2 * m;
      e = x[i] - v[i] * x[i - 1] - v[i + 1] * x[i + 1];
      rd(X + 4 * (K0 + m), d);
      check(d == e, $sformatf("iccg x[%0d] = %h expected %h", K0 + m, d, e));
    end
    for (int k = 0; k < NX; k++) begin
      rd(X + 4 * k, d);
      check(d == x[k], $sformatf("iccg input x[%0d] changed", k));
    end
    rd(X + 4 * (K0 - 1), d); check(d == 32'h6666_6666, "iccg guard below");
    rd(X + 4 * (K0 + M), d); check(d == 32'h7777_7777, "iccg guard above");
  endtask

  // -------------------------------------------------------------- band_lin_eq
  // One pass of the outer loop (k = 6): temp = x[5];
  //   for t: temp -= x[t] * y[4 + 5t];   then x[5] = y[4] * temp
  task automatic band_lin_eq();
    localparam int J = 30, KX = 5, NXW = J + 2, NYW = 4 + 5 * (J + 1) + 1;
    localparam logic [W-1:0] X = 32'h000, Y = 32'h400;
    logic [W-1:0] x [NXW], y [NYW], d, tmp;
    do_reset();
    for (int k = 0; k < NXW; k++) begin x[k] = $urandom; wr(X + 4 * k, x[k]); end
    for (int k = 0; k < NYW; k++) begin y[k] = $urandom; wr(Y + 4 * k, y[k]); end
    tmp = x[KX];
    for (int t = 0; t < J; t++) tmp = tmp - x[t] * y[4 + 5 * t];
    put(0, 0, 0, make_instr(OP_MOV, SRC_IMM, SRC_ZERO, 0, 0, 2, 1, int'(X)));
    put(1, 0, 0, make_instr(OP_MOV, SRC_IMM, SRC_ZERO, 0, 0, 2, 1, int'(Y) + 16));
    put(1, 1, 0, make_instr(OP_LDA, SRC_IMM, SRC_ZERO, 0, 0, 0, 0, int'(X) + 4 * KX));
    put(1, 1, 1, make_instr(OP_LDD, SRC_ZERO, SRC_ZERO, 0, 0, 2, 1, 0));     // temp -> r2
    run(2, 1, "band_lin_eq init");
    clear_ctx();
    put(0, 0, 0, make_instr(OP_LDA, SRC_RF, SRC_ZERO, 2, 0, 0, 0, 0));
    put(0, 0, 1, make_instr(OP_LDD, SRC_ZERO, SRC_ZERO, 0, 0, 0, 0, 0));
    put(0, 0, 2, make_instr(OP_ADD, SRC_RF, SRC_IMM, 2, 0, 2, 1, 4));
    put(1, 0, 0, make_instr(OP_LDA, SRC_RF, SRC_ZERO, 2, 0, 0, 0, 0));
    put(1, 0, 1, make_instr(OP_LDD, SRC_ZERO, SRC_ZERO, 0, 0, 0, 0, 0));
    put(1, 0, 2, make_instr(OP_ADD, SRC_RF, SRC_IMM, 2, 0, 2, 1, 20));       // y stride 5
    put(0, 1, 2, make_instr(OP_MOV, SRC_W, SRC_ZERO, 0, 0, 0, 0, 0));        // x[t] south-bound
    put(1, 1, 0, make_instr(OP_MUL, SRC_RF, SRC_N, 0, 0, 0, 0, 0));          // y * x of last iteration
    put(1, 1, 1, make_instr(OP_SUB, SRC_RF, SRC_SELF, 2, 0, 2, 1, 0));       // temp -= product
    put(1, 1, 2, make_instr(OP_MOV, SRC_W, SRC_ZERO, 0, 0, 0, 1, 0));        // keep y
    run(3, J + 1, "band_lin_eq loop");
    clear_ctx();
    put(1, 0, 0, make_instr(OP_LDA, SRC_IMM, SRC_ZERO, 0, 0, 0, 0, int'(Y) + 16));
    put(1, 0, 1, make_instr(OP_LDD, SRC_ZERO, SRC_ZERO, 0, 0, 0, 0, 0));     // y[4]
    put(1, 1, 2, make_instr(OP_MUL, SRC_W, SRC_RF, 0, 2, 0, 0, 0));          // y[4] * temp
    put(1, 2, 2, make_instr(OP_STA, SRC_IMM, SRC_ZERO, 0, 0, 0, 0, int'(X) + 4 * KX));
    put(1, 2, 3, make_instr(OP_STD, SRC_W, SRC_ZERO, 0, 0, 0, 0, 0));
    run(4, 1, "band_lin_eq scale");
    x[KX] = y[4] * tmp;
    for (int k = 0; k < NXW; k++) begin
      rd(X + 4 * k, d);
      check(d == x[k], $sformatf("band_lin_eq x[%0d] = %h expected %h", k, d, x[k]));
    end
  endtask

  // ---------------------------------------------------------------- mat_x_mat
  // Innermost loop of px[j][i] += vy[k][i] * cx[j][k] over j, for one k and
  // two columns i at once (rows 0 and 2); both matrices have rows of MS words.
  task automatic mat_x_mat();
    localparam int MS = 25, NJ = 16, NR = NJ + 2, KC = 5;
    localparam logic [W-1:0] PX = 32'h000, CX = 32'h800;
    localparam int IC [2] = '{3, 17};
    logic [W-1:0] px [NR * MS], cx [NR * MS], d, e;
    int sv [2];
    do_reset();
    for (int k = 0; k < NR * MS; k++) begin
      px[k] = $urandom; cx[k] = $urandom;
      wr(PX + 4 * k, px[k]); wr(CX + 4 * k, cx[k]);
    end
    for (int h = 0; h < 2; h++) sv[h] = int'($urandom_range(0, 60000)) - 30000;
    for (int h = 0; h < 2; h++) begin
      // row 2h: r1 = &cx[0][k], r2 = byte offset of row j, r3 = &px[0][i]
      put(2 * h, 0, 0, make_instr(OP_MOV, SRC_IMM, SRC_ZERO, 0, 0, 1, 1, int'(CX) + 4 * KC));
      put(2 * h, 0, 1, make_instr(OP_MOV, SRC_IMM, SRC_ZERO, 0, 0, 2, 1, 0));
      put(2 * h, 0, 2, make_instr(OP_MOV, SRC_IMM, SRC_ZERO, 0, 0, 3, 1, int'(PX) + 4 * IC[h]));
      put(2 * h, 1, 0, make_instr(OP_MOV, SRC_IMM, SRC_ZERO, 0, 0, 3, 1, sv[h]));
      put(2 * h, 3, 0, make_instr(OP_MOV, SRC_IMM, SRC_ZERO, 0, 0, 2, 1, int'(PX) + 4 * IC[h]));
    end
    run(3, 1, "mat_x_mat init");
    clear_ctx();
    for (int h = 0; h < 2; h++) begin
      put_thr(2 * h, 2, 1);
      put_thr(2 * h + 1, 3, 3);
      put(2 * h, 0, 0, make_instr(OP_LDA, SRC_RF, SRC_RF, 2, 3, 0, 0, 0));     // &px[j][i]
      put(2 * h, 0, 1, make_instr(OP_LDA, SRC_RF, SRC_RF, 2, 1, 0, 0, 0));     // &cx[j][k]
      put(2 * h, 0, 2, make_instr(OP_ADD, SRC_RF, SRC_IMM, 2, 0, 2, 1, 4 * MS));
      put(2 * h, 1, 2, make_instr(OP_LDD, SRC_ZERO, SRC_ZERO, 0, 0, 0, 0, 0)); // cx[j][k]
      put(2 * h, 1, 0, make_instr(OP_MUL, SRC_SELF, SRC_RF, 0, 3, 0, 0, 0));   // * vy[k][i]
      put(2 * h, 2, 1, make_instr(OP_LDD, SRC_ZERO, SRC_ZERO, 0, 0, 0, 1, 0)); // px[j][i] -> r0
      put(2 * h, 2, 2, make_instr(OP_ADD, SRC_W, SRC_RF, 0, 1, 0, 0, 0));      // + px of last iteration
      put(2 * h, 3, 0, pred_on(make_instr(OP_STD, SRC_W, SRC_ZERO, 0, 0, 0, 0, 0), PSRC_S));
      put(2 * h, 3, 1, pred_on(make_instr(OP_ADD, SRC_RF, SRC_IMM, 2, 0, 2, 1, 4 * MS), PSRC_S));
      put(2 * h, 3, 2, pred_on(make_instr(OP_STA, SRC_RF, SRC_ZERO, 2, 0, 0, 0, 0), PSRC_S));
      put(2 * h + 1, 3, 0, make_instr(OP_ADD, SRC_RF, SRC_IMM, 3, 0, 0, 1, 1));
      put(2 * h + 1, 3, 1, make_instr(OP_CMPLT, SRC_IMM, SRC_SELF, 0, 0, 0, 0, 1));
    end
    run(3, NJ + 2, "mat_x_mat loop");
    for (int j = 0; j < NJ; j++)
      for (int h = 0; h < 2; h++)
        px[j * MS + IC[h]] = px[j * MS + IC[h]] + W'(sv[h]) * cx[j * MS + KC];
    for (int k = 0; k < NR * MS; k++) begin
      rd(PX + 4 * k, d);
      e = px[k];
      check(d == e, $sformatf("mat_x_mat px word %0d = %h expected %h", k, d, e));
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    first_sum();
    inner_prod();
    hydro_1d();
    tridiag_elim();
    mat_x_mat();
    iccg();
    band_lin_eq();
    check(n_conflict == 0, "no row bus conflicts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
