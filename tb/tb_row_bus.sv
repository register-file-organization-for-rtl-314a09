// tb_row_bus: self-checking test of a row's shared buses.
// Random load and store transactions from one PE at a time: loads must reach
// the read port in the same cycle, stores must write the latched address
// with the data of the following cycle. Then two PEs drive the address bus
// together and the conflict flag must rise (its assertion is expected to
// report that cycle). A second instance with the strict one-transaction-
// per-row check sees the same requests; every cycle its conflict flag is
// compared with a count of the row's transactions kept here.
module tb_row_bus;
  import cgra_pkg::*;
  localparam int unsigned C = 4, W = 32;
  logic clk = 0, rst_n = 0;
  mem_req_t req [C];
  logic mem_ren, mem_we, conflict;
  logic [W-1:0] mem_raddr, mem_waddr, mem_wdata;
  int checks = 0, failures = 0;
  int loads = 0, stores = 0, conflicts = 0;

  row_bus dut (.clk, .rst_n, .req, .mem_ren, .mem_raddr,
    .mem_we, .mem_waddr, .mem_wdata, .conflict);

  logic s_ren, s_we, s_conflict, ld_prev = 0;
  logic [W-1:0] s_raddr, s_waddr, s_wdata;
  int s_hits = 0, s_clear = 0;
  row_bus #(.ONE_TXN(1'b1)) strict (.clk, .rst_n, .req,
    .mem_ren(s_ren), .mem_raddr(s_raddr), .mem_we(s_we), .mem_waddr(s_waddr),
    .mem_wdata(s_wdata), .conflict(s_conflict));

  // strict-mode reference: more than one of {address, store data, load data}
  always @(posedge clk) begin
    if (rst_n) begin
      int n;
      logic any_a, any_d;
      any_a = 0; any_d = 0;
      for (int c = 0; c < C; c++) begin any_a |= req[c].addr_v; any_d |= req[c].data_v; end
      n = int'(any_a) + int'(any_d) + int'(ld_prev);
      check(s_conflict == (conflict || n > 1), "strict conflict flag");
      if (s_conflict) s_hits++; else s_clear++;
    end
    ld_prev <= rst_n && mem_ren;
  end

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic idle();
    for (int c = 0; c < C; c++) req[c] = '0;
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    idle();
    $assertoff(0, strict);   // its rule is broken on purpose by the overlaps
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 100; t++) begin
      int c1, c2;
      logic [W-1:0] a, d;
      c1 = $urandom % C; c2 = $urandom % C;
      a = $urandom; d = $urandom;
      @(negedge clk);
      idle();
      if (t % 2 == 0) begin
        req[c1].addr_v = 1; req[c1].addr = a; #1;
        check(mem_ren && mem_raddr == a && !mem_we && !conflict, "load address reaches read port");
        loads++;
      end else begin
        req[c1].addr_v = 1; req[c1].is_store = 1; req[c1].addr = a; #1;
        check(!mem_ren && !mem_we, "store address alone does not access memory");
        @(negedge clk);
        idle();
        req[c2].data_v = 1; req[c2].data = d; #1;
        check(mem_we && mem_waddr == a && mem_wdata == d, "store writes latched address");
        stores++;
      end
    end
    // overlapping: store data of one access with the load address of the next
    @(negedge clk); idle();
    req[0].addr_v = 1; req[0].is_store = 1; req[0].addr = 32'h40;
    @(negedge clk); idle();
    req[1].data_v = 1; req[1].data = 32'h55; req[2].addr_v = 1; req[2].addr = 32'h80; #1;
    check(mem_we && mem_waddr == 32'h40 && mem_ren && mem_raddr == 32'h80 && !conflict,
          "address and data transactions overlap");
    // conflict: two PEs on the address bus (the bus-rule assertions are
    // switched off for this deliberate violation)
    $assertoff(0, dut);
    @(negedge clk); idle();
    req[1].addr_v = 1; req[1].addr = 32'h10; req[3].addr_v = 1; req[3].addr = 32'h20; #1;
    check(conflict && mem_raddr == 32'h10, "conflict flagged, lowest column wins");
    if (conflict) conflicts++;
    @(negedge clk); idle(); #1;
    check(!conflict, "conflict clears");
    // store data in the cycle the data bus returns load data
    req[0].addr_v = 1; req[0].is_store = 1; req[0].addr = 32'h30;
    @(negedge clk); idle();
    req[2].addr_v = 1; req[2].addr = 32'h34;
    @(negedge clk); idle();
    req[1].data_v = 1; req[1].data = 32'h77; #1;
    check(conflict, "store data during load data flagged");
    if (conflict) conflicts++;
    @(negedge clk); idle(); #1;
    check(!conflict, "data bus conflict clears");
    $asserton(0, dut);
    check(loads > 0 && stores > 0 && conflicts > 0, "all cases exercised");
    check(s_hits > 0 && s_clear > 0, "strict mode both flagged and clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
