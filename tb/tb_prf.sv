// tb_prf: self-checking test of the programmable register file.
// A reference model keeps the registers, the offset and T and computes the
// physical index of every port as ((index + offset) AND T) for index <= T
// and index otherwise. Random traffic runs under every legal T with random
// iteration ends; a directed part replays the pointer-and-loop-carried-value
// case: with T = 1 a value written through index 0 in one iteration is read
// back through index 1 in the next, while pointers in indices 2 and 3 stay
// put.
module tb_prf;
  localparam int unsigned N = 4, W = 32;
  logic clk = 0, rst_n = 0;
  logic cfg_we = 0, iter_end = 0, we = 0;
  logic [1:0] cfg_thr = 0, r1 = 0, r2 = 0, w = 0, offset, thr;
  logic [W-1:0] wdata = 0, rdata1, rdata2;
  int checks = 0, failures = 0;
  logic [W-1:0] m_regs [N];
  int m_off = 0, m_thr = 0;
  int rot_clears = 0, nonrot_hits = 0, rot_hits = 0;

  prf dut (.clk, .rst_n, .cfg_we, .cfg_thr, .iter_end,
    .r1, .r2, .w, .we, .wdata, .rdata1, .rdata2, .offset, .thr);

  always #5 clk = ~clk;

  function automatic int phys(int idx);
    return (idx <= m_thr) ? ((idx + m_off) % N) & m_thr : idx;
  endfunction

  task automatic check(input logic [W-1:0] got, input logic [W-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  // one clock with the given inputs; model updated at the edge
  task automatic step(input bit c_we, input int c_thr, input bit ie, input int i1, input int i2,
                      input int iw, input bit wen, input logic [W-1:0] wd);
    @(negedge clk);
    cfg_we = c_we; cfg_thr = 2'(c_thr); iter_end = ie;
    r1 = 2'(i1); r2 = 2'(i2); w = 2'(iw); we = wen; wdata = wd;
    #1;
    check(rdata1, m_regs[phys(i1)], $sformatf("R1 idx %0d off %0d T %0d", i1, m_off, m_thr));
    check(rdata2, m_regs[phys(i2)], $sformatf("R2 idx %0d off %0d T %0d", i2, m_off, m_thr));
    if (i1 <= m_thr) rot_hits++; else nonrot_hits++;
    @(posedge clk);
    if (wen) m_regs[phys(iw)] = wd;
    if (c_we) begin m_thr = c_thr; m_off = 0; end
    else if (ie) begin
      if (m_off + 1 > m_thr) begin m_off = 0; rot_clears++; end
      else m_off = m_off + 1;
    end
    #1;
    checks++;
    if (offset != 2'(m_off)) begin failures++; $display("FAIL offset %0d expected %0d", offset, m_off); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int thrs [3] = '{0, 1, 3};
    logic [W-1:0] v0, v1;
    for (int i = 0; i < N; i++) m_regs[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (thrs[k]) begin
      step(1, thrs[k], 0, 0, 0, 0, 0, 0);
      for (int t = 0; t < 200; t++)
        step(0, 0, ($urandom % 3) == 0, $urandom % N, $urandom % N, $urandom % N,
             1'($urandom), $urandom);
    end
    // Directed: T = 1, pointers p1/p2 in indices 2 and 3, loop value through index 0.
    step(1, 1, 0, 0, 0, 0, 0, 0);
    step(0, 0, 0, 0, 0, 2, 1, 32'h1000);         // p1
    step(0, 0, 0, 0, 0, 3, 1, 32'h2000);         // p2
    v0 = 32'hA0;
    step(0, 0, 1, 2, 3, 0, 1, v0);               // iteration j writes index 0, ends iteration
    v1 = 32'hA1;
    step(0, 0, 1, 1, 2, 0, 1, v1);               // j+1: previous value now at index 1
    check(m_regs[0], v0, "model: iteration j value kept");
    step(0, 0, 0, 1, 3, 0, 0, 0);                // j+2: v1 at index 1, p2 at index 3
    r1 = 2'd1; r2 = 2'd2; we = 0; iter_end = 0; #1;
    check(rdata1, v1, "loop-carried value read through index 1");
    check(rdata2, 32'h1000, "pointer p1 unchanged at index 2");
    checks++;
    if (rot_clears == 0 || rot_hits == 0 || nonrot_hits == 0) begin
      failures++; $display("FAIL coverage: clears %0d rot %0d nonrot %0d", rot_clears, rot_hits, nonrot_hits);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
