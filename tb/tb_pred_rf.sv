// tb_pred_rf: self-checking test of the predicate register file.
// Reset value, then random writes and reads against a reference vector.
module tb_pred_rf;
  logic clk = 0, rst_n = 0, we = 0, wdata = 0, rdata;
  logic [1:0] raddr = 0, waddr = 0;
  logic [3:0] model = '0;
  int checks = 0, failures = 0;

  pred_rf dut (.clk, .rst_n, .raddr, .rdata, .we, .waddr, .wdata);

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
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      raddr = 2'($urandom); waddr = 2'($urandom); we = 1'($urandom); wdata = 1'($urandom);
      #1;
      checks++;
      if (rdata !== model[raddr]) begin failures++; $display("FAIL read %0d", raddr); end
      @(posedge clk);
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
