// tb_offset_counter: self-checking test of the rotation offset counter.
// Checks reset, increment on inc, natural wrap modulo NUM_REGS, hold
// without inc and priority of clr over inc, against a reference count.
module tb_offset_counter;
  localparam int unsigned N = 4;
  logic clk = 0, rst_n = 0, inc = 0, clr = 0;
  logic [1:0] offset;
  int checks = 0, failures = 0;
  int exp_off = 0;
  int wraps = 0;

  offset_counter dut (.clk, .rst_n, .inc, .clr, .offset);

  always #5 clk = ~clk;

  initial begin
    #50000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    checks++; if (offset != 0) begin failures++; $display("FAIL reset"); end
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      inc = 1'($urandom);
      clr = ($urandom % 8) == 0;
      @(posedge clk);
      if (clr) exp_off = 0;
      else if (inc) begin
        if (exp_off == N - 1) wraps++;
        exp_off = (exp_off + 1) % N;
      end
      #1;
      checks++;
      if (offset != 2'(exp_off)) begin
        failures++;
        $display("FAIL t=%0d offset %0d expected %0d", t, offset, exp_off);
      end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL wrap never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
