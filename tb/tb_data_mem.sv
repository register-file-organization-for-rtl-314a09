// tb_data_mem: self-checking test of the multi-port data memory.
// Host writes fill the memory; then random reads and writes on all row
// ports and the host port are compared with a reference array, including
// the one-cycle read latency and the write priority of higher rows.
// The depth is cut to 64 words so that random addresses hit the same
// words often; the full 1024-word memory runs in the top-level tests.
module tb_data_mem;
  localparam int unsigned R = 4, D = 64, W = 32;
  logic clk = 0, rst_n = 0;
  logic ren [R], we [R];
  logic [W-1:0] raddr [R], rdata [R], waddr [R], wdata [R];
  logic host_we = 0, host_re = 0;
  logic [W-1:0] host_addr = 0, host_wdata = 0, host_rdata;
  logic [W-1:0] model [D];
  logic [W-1:0] exp_rd [R];
  logic [W-1:0] exp_host;
  int checks = 0, failures = 0;

  data_mem #(.ROWS(R), .DEPTH(D), .DATA_W(W)) dut (.clk, .rst_n, .ren, .raddr, .rdata,
    .we, .waddr, .wdata, .host_we, .host_re, .host_addr, .host_wdata, .host_rdata);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < R; r++) begin ren[r] = 0; we[r] = 0; raddr[r] = 0; waddr[r] = 0; wdata[r] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      host_we = 1; host_addr = W'(i * 4); host_wdata = $urandom; model[i] = host_wdata;
    end
    @(negedge clk);
    host_we = 0;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      for (int r = 0; r < R; r++) begin
        ren[r] = 1'($urandom); raddr[r] = W'(($urandom % D) * 4);
        we[r] = ($urandom % 3) == 0; waddr[r] = W'(($urandom % 8) * 4); wdata[r] = $urandom;
      end
      host_re = 1'($urandom); host_addr = W'(($urandom % D) * 4);
      @(posedge clk);
      for (int r = 0; r < R; r++) if (ren[r]) exp_rd[r] = model[raddr[r][7:2]];
      if (host_re) exp_host = model[host_addr[7:2]];
      for (int r = 0; r < R; r++) if (we[r]) model[waddr[r][7:2]] = wdata[r];
      #1;
      for (int r = 0; r < R; r++) if (ren[r]) begin
        checks++;
        if (rdata[r] !== exp_rd[r]) begin failures++; $display("FAIL row %0d read", r); end
      end
      if (host_re) begin
        checks++;
        if (host_rdata !== exp_host) begin failures++; $display("FAIL host read"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
