// fu: functional unit of a processing element.
//
// Purely combinational, so every operation completes in the PE's single
// execute cycle. y is the data result; pred is the result of the compare
// operations (CMPEQ, CMPNE, CMPLT signed). For the memory operations LDA and
// STA, y is the byte address a + b that the PE puts on its row's address
// bus; for STD it is the store data a; LDD takes its result from the row
// data bus in the PE, so the FU passes a through. The operation set is this
// design's choice; only the one-cycle latency and the split of a memory
// access into an address and a data operation come from the evaluated
// architecture.
module fu
  import cgra_pkg::*;
#(
  parameter int unsigned DATA_W = 32
) (
  input  opcode_e           op,
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  output logic [DATA_W-1:0] y,
  output logic              pred
);

  localparam int unsigned SH_W = $clog2(DATA_W);

  always_comb begin
    y    = '0;
    pred = 1'b0;
    unique case (op)
      OP_MOV:   y = a;
      OP_ADD:   y = a + b;
      OP_SUB:   y = a - b;
      OP_MUL:   y = a * b;
      OP_AND:   y = a & b;
      OP_OR:    y = a | b;
      OP_XOR:   y = a ^ b;
      OP_SHL:   y = a << b[SH_W-1:0];
      OP_SRL:   y = a >> b[SH_W-1:0];
      OP_SRA:   y = DATA_W'($signed(a) >>> b[SH_W-1:0]);
      OP_CMPEQ: begin pred = (a == b); y = DATA_W'(pred); end
      OP_CMPNE: begin pred = (a != b); y = DATA_W'(pred); end
      OP_CMPLT: begin pred = ($signed(a) < $signed(b)); y = DATA_W'(pred); end
      OP_LDA,
      OP_STA:   y = a + b;
      OP_LDD,
      OP_STD:   y = a;
      default:  y = '0;   // OP_NOP
    endcase
  end

endmodule
