// tb_pe: self-checking test of one processing element.
// Directed instruction sequence with expected values worked out here:
// immediates into non-rotating registers, register and neighbour operands,
// compares into the predicate file, predicated execution from the own
// predicate file and from a neighbour (taken and not taken, negated), a
// two-step load and a two-step store on the row bus, rotation of the
// register file at iteration ends (T = 1), and no execution while run is
// low. Every mechanism is counted and must occur.
module tb_pe;
  import cgra_pkg::*;
  localparam int unsigned W = 32;
  logic clk = 0, rst_n = 0, run = 0, iter_end = 0, cfg_thr_we = 0;
  logic [1:0] cfg_thr = 0, rf_offset;
  instr_t instr;
  logic [W-1:0] nbr_data [4];
  logic [3:0] nbr_pred = '0;
  logic [W-1:0] bus_rdata = '0, data_out;
  mem_req_t req;
  logic pred_out, exec;
  int checks = 0, failures = 0;
  int n_pred_skip = 0, n_pred_take = 0, n_load = 0, n_store = 0, n_rot = 0, n_nbr = 0;

  pe dut (.clk, .rst_n, .run, .iter_end, .instr, .cfg_thr_we,
    .cfg_thr, .nbr_data, .nbr_pred, .bus_rdata, .req, .data_out, .pred_out, .rf_offset, .exec);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // present an instruction for one cycle; returns after the clock edge
  task automatic issue(input instr_t i, input bit ie = 0);
    @(negedge clk);
    instr = i; iter_end = ie;
    #1;
  endtask

  task automatic settle();
    @(posedge clk); #1;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    instr_t i;
    logic [W-1:0] held;
    for (int d = 0; d < 4; d++) nbr_data[d] = '0;
    instr = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // threshold T = 1: registers 0,1 rotate, 2,3 do not
    @(negedge clk); cfg_thr_we = 1; cfg_thr = 2'd1;
    @(negedge clk); cfg_thr_we = 0; run = 1;
    // constants / pointers
    issue(make_instr(OP_MOV, SRC_IMM, SRC_ZERO, 0, 0, 2, 1, 'h100)); settle();
    check(data_out == 32'h100, "MOV immediate to output");
    issue(make_instr(OP_MOV, SRC_IMM, SRC_ZERO, 0, 0, 3, 1, -7)); settle();
    check(data_out == 32'hFFFF_FFF9, "negative immediate sign-extended");
    issue(make_instr(OP_ADD, SRC_RF, SRC_RF, 2, 3, 0, 0, 0)); settle();
    check(data_out == 32'hF9, "ADD of two non-rotating registers");
    // neighbours
    nbr_data[DIR_N] = 32'd1000; nbr_data[DIR_E] = 32'd234;
    nbr_data[DIR_S] = 32'd5;    nbr_data[DIR_W] = 32'd9;
    issue(make_instr(OP_ADD, SRC_N, SRC_E, 0, 0, 0, 0, 0)); settle();
    check(data_out == 32'd1234, "ADD of N and E neighbours"); n_nbr++;
    issue(make_instr(OP_SUB, SRC_SELF, SRC_S, 0, 0, 0, 0, 0)); settle();
    check(data_out == 32'd1229, "SUB own output minus S"); n_nbr++;
    issue(make_instr(OP_MUL, SRC_W, SRC_IMM, 0, 0, 0, 0, 3)); settle();
    check(data_out == 32'd27, "MUL W by immediate"); n_nbr++;
    // compare into predicate register 1: -7 < 10 (signed) is true
    i = make_instr(OP_CMPLT, SRC_RF, SRC_IMM, 3, 0, 0, 0, 10);
    i.wr_prf = 1; i.pdst = 2'd1;
    issue(i); settle();
    check(pred_out == 1'b1, "CMPLT true to predicate output");
    // predicated on p1 (true): executes
    i = make_instr(OP_MOV, SRC_IMM, SRC_ZERO, 0, 0, 0, 0, 55);
    i.pen = 1; i.pidx = 2'd1;
    issue(i); check(exec, "predicate true: executes"); settle();
    check(data_out == 32'd55, "predicated MOV taken"); n_pred_take++;
    // negated: skipped
    i.pneg = 1; i.imm = 16'd66;
    issue(i); check(!exec, "negated predicate: skipped"); settle();
    check(data_out == 32'd55, "predicated MOV not taken"); n_pred_skip++;
    // predicate from north neighbour (0): skipped; then 1: taken
    i = make_instr(OP_MOV, SRC_IMM, SRC_ZERO, 0, 0, 0, 0, 77);
    i.pen = 1; i.psrc = PSRC_N; nbr_pred = 4'b0000;
    issue(i); settle();
    check(data_out == 32'd55, "neighbour predicate 0 skips"); n_pred_skip++;
    nbr_pred[DIR_N] = 1'b1;
    issue(i); settle();
    check(data_out == 32'd77, "neighbour predicate 1 executes"); n_pred_take++;
    // load: address p1 + 8 on the row address bus, data one cycle later
    issue(make_instr(OP_LDA, SRC_RF, SRC_IMM, 2, 0, 0, 0, 8));
    check(req.addr_v && !req.is_store && req.addr == 32'h108 && !req.data_v, "LDA address transaction");
    settle();
    bus_rdata = 32'hDEAD_BEEF;
    issue(make_instr(OP_LDD, SRC_ZERO, SRC_ZERO, 0, 0, 1, 1, 0));
    check(!req.addr_v && !req.data_v, "LDD drives no bus");
    settle();
    check(data_out == 32'hDEAD_BEEF, "LDD result from row data bus"); n_load++;
    // store: address p1, data = loaded value
    issue(make_instr(OP_STA, SRC_RF, SRC_ZERO, 2, 0, 0, 0, 0));
    check(req.addr_v && req.is_store && req.addr == 32'h100, "STA address transaction");
    settle();
    issue(make_instr(OP_STD, SRC_SELF, SRC_ZERO, 0, 0, 0, 0, 0));
    check(req.data_v && req.data == 32'hDEAD_BEEF && !req.addr_v, "STD data transaction");
    settle(); n_store++;
    // a skipped store drives nothing
    i = make_instr(OP_STA, SRC_RF, SRC_ZERO, 2, 0, 0, 0, 0);
    i.pen = 1; i.psrc = PSRC_S;
    issue(i); check(!req.addr_v, "predicated-off STA drives no bus"); settle();
    // rotation: the load above wrote index 1 at offset 0 -> physical 1.
    // write 0x11 via index 0 (physical 0) and end the iteration
    check(rf_offset == 2'd0, "offset 0 before iteration end");
    issue(make_instr(OP_MOV, SRC_IMM, SRC_ZERO, 0, 0, 0, 1, 'h11), 1); settle();
    check(rf_offset == 2'd1, "offset advanced at iteration end");
    // now index 1 -> physical (1+1)&1 = 0 (0x11); index 0 -> physical 1 (loaded word)
    issue(make_instr(OP_MOV, SRC_RF, SRC_ZERO, 1, 0, 0, 0, 0)); settle();
    check(data_out == 32'h11, "previous iteration's value through index 1"); n_rot++;
    issue(make_instr(OP_MOV, SRC_RF, SRC_ZERO, 0, 0, 0, 0, 0), 1); settle();
    check(data_out == 32'hDEAD_BEEF, "rotated index 0 reads physical 1"); n_rot++;
    check(rf_offset == 2'd0, "offset cleared after passing T");
    issue(make_instr(OP_MOV, SRC_RF, SRC_ZERO, 2, 0, 0, 0, 0)); settle();
    check(data_out == 32'h100, "non-rotating register unaffected by rotation");
    // not running: nothing executes
    run = 0;
    held = data_out;
    issue(make_instr(OP_MOV, SRC_IMM, SRC_ZERO, 0, 0, 2, 1, 5)); settle();
    check(data_out == held && !exec, "idle array does not execute");
    check(n_pred_skip > 0 && n_pred_take > 0 && n_load > 0 && n_store > 0 && n_rot > 0 && n_nbr > 0,
          "all mechanisms exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
