// tb_reg_bank: self-checking test of the register bank.
// Random writes and dual reads against a reference array; checks reset
// clearing, same-cycle read-before-write and independence of the two read
// ports.
module tb_reg_bank;
  localparam int unsigned N = 4, W = 32;
  logic clk = 0, rst_n = 0;
  logic [1:0] ra1, ra2, wa;
  logic [W-1:0] rd1, rd2, wd;
  logic we;
  int checks = 0, failures = 0;
  logic [W-1:0] model [N];

  reg_bank dut (.clk, .rst_n, .raddr1(ra1), .raddr2(ra2),
    .rdata1(rd1), .rdata2(rd2), .we, .waddr(wa), .wdata(wd));

  always #5 clk = ~clk;

  task automatic check(input logic [W-1:0] got, input logic [W-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; ra1 = 0; ra2 = 0; wa = 0; wd = 0;
    for (int i = 0; i < N; i++) model[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) begin
      ra1 = 2'(i); ra2 = 2'(N - 1 - i); #1;
      check(rd1, '0, "reset value port 1");
      check(rd2, '0, "reset value port 2");
    end
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      we  = 1'($urandom);
      wa  = 2'($urandom);
      wd  = $urandom;
      ra1 = 2'($urandom);
      ra2 = 2'($urandom);
      #1;
      check(rd1, model[ra1], "read port 1");
      check(rd2, model[ra2], "read port 2");
      @(posedge clk);
      if (we) model[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
