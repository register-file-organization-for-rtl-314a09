// tb_loop_ctrl: self-checking test of the kernel sequencer.
// For several (II, iterations) pairs it checks the context address sequence
// 0..II-1, iter_end in the last cycle of each iteration, the total run time
// of II * iterations cycles, the single done pulse, and that zero
// iterations finish at once without running.
module tb_loop_ctrl;
  localparam int unsigned D = 16, IW = 16;
  logic clk = 0, rst_n = 0, start = 0;
  logic [4:0] ii = 0;
  logic [IW-1:0] iters = 0, iter_cnt;
  logic [3:0] ctx_addr;
  logic run, iter_end, done;
  int checks = 0, failures = 0;

  loop_ctrl dut (.clk, .rst_n, .start, .ii, .iters,
    .ctx_addr, .run, .iter_end, .iter_cnt, .done);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run_loop(input int n_ii, input int n_it);
    int cyc = 0, ends = 0, dones = 0;
    @(negedge clk);
    start = 1; ii = 5'(n_ii); iters = IW'(n_it);
    @(negedge clk);
    start = 0;
    while (run) begin
      check(ctx_addr == 4'(cyc % n_ii), $sformatf("II=%0d cycle %0d ctx %0d", n_ii, cyc, ctx_addr));
      check(iter_end == ((cyc % n_ii) == n_ii - 1), "iter_end position");
      if (iter_end) ends++;
      cyc++;
      @(negedge clk);
      if (done) dones++;
    end
    check(cyc == n_ii * n_it, $sformatf("run length %0d expected %0d", cyc, n_ii * n_it));
    check(ends == n_it, "one iter_end per iteration");
    check(dones == 1, "one done pulse");
    @(negedge clk);
    check(!done, "done is a single pulse");
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!run && !done, "idle after reset");
    run_loop(1, 5);
    run_loop(2, 3);
    run_loop(5, 4);
    run_loop(16, 2);
    // zero iterations
    @(negedge clk);
    start = 1; ii = 5'd3; iters = '0;
    @(negedge clk);
    start = 0;
    check(done && !run, "zero iterations: immediate done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
