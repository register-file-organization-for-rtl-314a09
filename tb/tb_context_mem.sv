// tb_context_mem: self-checking test of a PE's instruction memory.
// Checks NOP contents after reset, then writes random instruction words and
// reads them back in random order.
module tb_context_mem;
  import cgra_pkg::*;
  localparam int unsigned D = 16;
  logic clk = 0, rst_n = 0, we = 0;
  logic [3:0] waddr = 0, raddr = 0;
  instr_t wdata, rdata;
  instr_t model [D];
  int checks = 0, failures = 0;

  context_mem dut (.clk, .rst_n, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    #50000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wdata = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < D; i++) begin
      raddr = 4'(i); #1;
      checks++;
      if (rdata !== '0) begin failures++; $display("FAIL entry %0d not NOP after reset", i); end
      model[i] = '0;
    end
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      we = 1'($urandom);
      waddr = 4'($urandom);
      wdata = instr_t'({$urandom, $urandom});
      raddr = 4'($urandom);
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
