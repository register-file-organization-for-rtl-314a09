// tb_fu: self-checking test of the PE functional unit.
// Every opcode with random and corner-case operands, compared with results
// computed in the testbench.
module tb_fu;
  import cgra_pkg::*;
  localparam int unsigned W = 32;
  opcode_e op;
  logic [W-1:0] a, b, y;
  logic pred;
  int checks = 0, failures = 0;

  fu dut (.op, .a, .b, .y, .pred);

  function automatic logic [W:0] ref_fu(opcode_e o, logic [W-1:0] x, logic [W-1:0] z);
    // returns {pred, y}
    logic [4:0] s;
    s = z[4:0];
    case (o)
      OP_MOV:   return {1'b0, x};
      OP_ADD:   return {1'b0, x + z};
      OP_SUB:   return {1'b0, x - z};
      OP_MUL:   return {1'b0, W'(longint'(x) * longint'(z))};
      OP_AND:   return {1'b0, x & z};
      OP_OR:    return {1'b0, x | z};
      OP_XOR:   return {1'b0, x ^ z};
      OP_SHL:   return {1'b0, x << s};
      OP_SRL:   return {1'b0, x >> s};
      OP_SRA:   return {1'b0, W'($signed(x) >>> s)};
      OP_CMPEQ: return (x == z) ? {1'b1, W'(1)} : '0;
      OP_CMPNE: return (x != z) ? {1'b1, W'(1)} : '0;
      OP_CMPLT: return (int'(x) < int'(z)) ? {1'b1, W'(1)} : '0;
      OP_LDA, OP_STA: return {1'b0, x + z};
      OP_LDD, OP_STD: return {1'b0, x};
      default:  return '0;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W:0] e;
    logic [W-1:0] corners [5] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF};
    for (int o = 0; o <= int'(OP_STD); o++) begin
      for (int t = 0; t < 60; t++) begin
        op = opcode_e'(o);
        if (t < 25) begin a = corners[t % 5]; b = corners[t / 5]; end
        else begin a = $urandom; b = (t % 2) ? $urandom : $urandom % 40; end
        #1;
        e = ref_fu(op, a, b);
        checks++;
        if ({pred, y} !== e) begin
          failures++;
          $display("FAIL op %s a=%h b=%h: y=%h pred=%b expected y=%h pred=%b",
                   op.name(), a, b, y, pred, e[W-1:0], e[W]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
