// cgra_pkg: types and constants shared by the CGRA with programmable
// register files (PRF).
//
// The array is a 4 x 4 mesh of processing elements (PEs); every PE has a
// 4-entry data register file that can be split at configuration time into a
// rotating region (indices 0..T) and a non-rotating region (indices above T),
// with T = 2^i - 1. Array size and register count follow the evaluated
// configuration; the data width, the instruction format and the opcode set
// are this design's own choices. The only instruction detail fixed from the
// evaluated ISA is the 16-bit signed immediate field.
package cgra_pkg;

  localparam int unsigned XLEN      = 32;  // integer data and byte addresses
  localparam int unsigned PE_NUM_REGS = 4; // data registers per PE
  localparam int unsigned PE_NUM_PREGS = 4; // predicate registers per PE
  localparam int unsigned IMM_W     = 16;  // signed immediate field
  localparam int unsigned RIDX_W    = 4;   // register index field: up to 16 registers
  localparam int unsigned PIDX_W    = 2;   // predicate index field

  // Functional unit operations. LDA/STA put an address (a+b) on the row
  // address bus; LDD takes the loaded word from the row data bus one cycle
  // later; STD puts operand a on the row data bus after STA.
  typedef enum logic [4:0] {
    OP_NOP   = 5'd0,
    OP_MOV   = 5'd1,
    OP_ADD   = 5'd2,
    OP_SUB   = 5'd3,
    OP_MUL   = 5'd4,
    OP_AND   = 5'd5,
    OP_OR    = 5'd6,
    OP_XOR   = 5'd7,
    OP_SHL   = 5'd8,
    OP_SRL   = 5'd9,
    OP_SRA   = 5'd10,
    OP_CMPEQ = 5'd11,
    OP_CMPNE = 5'd12,
    OP_CMPLT = 5'd13,
    OP_LDA   = 5'd14,
    OP_LDD   = 5'd15,
    OP_STA   = 5'd16,
    OP_STD   = 5'd17
  } opcode_e;

  // Operand sources. Neighbour sources read the neighbour's registered
  // data output; SRC_SELF reads this PE's own output register.
  typedef enum logic [2:0] {
    SRC_RF   = 3'd0,
    SRC_N    = 3'd1,
    SRC_S    = 3'd2,
    SRC_E    = 3'd3,
    SRC_W    = 3'd4,
    SRC_SELF = 3'd5,
    SRC_IMM  = 3'd6,
    SRC_ZERO = 3'd7
  } src_e;

  // Predicate source of a predicated instruction.
  typedef enum logic [2:0] {
    PSRC_PRF = 3'd0,  // own predicate register file, entry pidx
    PSRC_N   = 3'd1,
    PSRC_S   = 3'd2,
    PSRC_E   = 3'd3,
    PSRC_W   = 3'd4
  } psrc_e;

  // Direction order used for neighbour arrays.
  localparam int unsigned DIR_N = 0;
  localparam int unsigned DIR_S = 1;
  localparam int unsigned DIR_E = 2;
  localparam int unsigned DIR_W = 3;

  typedef struct packed {
    opcode_e            op;
    src_e               src_a;   // operand a source
    src_e               src_b;   // operand b source
    logic [RIDX_W-1:0]  ra;      // register index read on port R1 (operand a)
    logic [RIDX_W-1:0]  rb;      // register index read on port R2 (operand b)
    logic [RIDX_W-1:0]  rw;      // register index written (port W)
    logic               wr_rf;   // write the result to the register file
    logic               pen;     // instruction is predicated
    psrc_e              psrc;    // where the predicate comes from
    logic               pneg;    // execute when the predicate is 0
    logic [PIDX_W-1:0]  pidx;    // predicate register read (PSRC_PRF)
    logic [PIDX_W-1:0]  pdst;    // predicate register written by compares
    logic               wr_prf;  // compares: write the predicate register file
    logic [IMM_W-1:0]   imm;     // signed immediate
  } instr_t;

  localparam int unsigned INSTR_W = $bits(instr_t);

  // Request of one PE on its row's shared buses.
  typedef struct packed {
    logic              addr_v;   // address transaction this cycle
    logic              is_store; // the address belongs to a store
    logic [XLEN-1:0]   addr;     // byte address
    logic              data_v;   // store-data transaction this cycle
    logic [XLEN-1:0]   data;     // store data
  } mem_req_t;

  // Builds an unpredicated instruction; predicate fields can be set on the
  // returned value.
  function automatic instr_t make_instr(input opcode_e op, input src_e a, input src_e b,
                                        input int unsigned ra, input int unsigned rb,
                                        input int unsigned rw, input logic wr_rf,
                                        input int imm);
    instr_t i;
    i       = '0;
    i.op    = op;
    i.src_a = a;
    i.src_b = b;
    i.ra    = RIDX_W'(ra);
    i.rb    = RIDX_W'(rb);
    i.rw    = RIDX_W'(rw);
    i.wr_rf = wr_rf;
    i.psrc  = PSRC_PRF;
    i.imm   = IMM_W'(imm);
    return i;
  endfunction

  function automatic logic is_pow2m1(input logic [RIDX_W-1:0] t);
    // true for 0, 1, 3, 7, 15: the only thresholds the RC accepts
    return ((t + 1'b1) & t) == '0;
  endfunction

endpackage
