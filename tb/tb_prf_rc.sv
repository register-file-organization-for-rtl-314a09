// tb_prf_rc: self-checking test of the register control of the PRF.
// For every legal threshold T (0, 1, 3) it checks the rotating/non-rotating
// decision for all indices on all three ports, the increment and explicit
// clear of the offset at the end of an iteration, and that writing T clears
// the offset.
module tb_prf_rc;
  localparam int unsigned N = 4;
  logic clk = 0, rst_n = 0, cfg_we = 0, iter_end = 0;
  logic [1:0] cfg_thr = 0, offset = 0, thr;
  logic [1:0] idx [3];
  logic [2:0] rot_sel;
  logic off_inc, off_clr;
  int checks = 0, failures = 0;
  int thr_list [4] = '{0, 1, 3, 3};

  prf_rc dut (.clk, .rst_n, .cfg_we, .cfg_thr, .iter_end, .offset,
    .idx, .rot_sel, .thr, .off_inc, .off_clr);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #50000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    idx[0] = 0; idx[1] = 0; idx[2] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    #1 check(thr == 0, "threshold resets to 0");
    foreach (thr_list[k]) begin
      int t;
      t = thr_list[k];
      @(negedge clk);
      cfg_we = 1; cfg_thr = 2'(t);
      #1 check(off_clr == 1'b1, "writing T clears the offset");
      @(negedge clk);
      cfg_we = 0;
      check(thr == 2'(t), "threshold stored");
      for (int p = 0; p < 3; p++)
        for (int i = 0; i < N; i++) begin
          idx[p] = 2'(i); #1;
          check(rot_sel[p] == (i <= t), $sformatf("T=%0d port %0d index %0d rotating=%0b", t, p, i, rot_sel[p]));
        end
      for (int o = 0; o <= t; o++) begin
        offset = 2'(o); iter_end = 0; #1;
        check(!off_inc && !off_clr, "no counter action inside an iteration");
        iter_end = 1; #1;
        check(off_inc == 1'b1, "increment at iteration end");
        check(off_clr == (o + 1 > t), $sformatf("T=%0d offset %0d clear=%0b", t, o, off_clr));
      end
      iter_end = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
