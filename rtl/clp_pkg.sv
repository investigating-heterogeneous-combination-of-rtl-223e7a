// clp_pkg: types and constants shared by the criticality-based low-power
// integer back end.
//
// The back end steers each integer instruction either to a fast ALU
// (one-cycle, high supply voltage) or to a slow ALU (two-cycle, low supply
// voltage) according to a critical path prediction. This package holds the
// predictor sizes (2K-entry table of 6-bit counters, +8 on critical, -1
// otherwise, threshold 8, 8-instruction criticality history, 8-outcome
// branch history), which follow the described configuration, and the
// instruction, operand and result-bus types, which are this design's own.
// The integer operation set is a MIPS-like subset chosen for this design.
package clp_pkg;

  localparam int unsigned XLEN    = 32;  // integer data width
  localparam int unsigned NAREG   = 32;  // architectural integer registers
  localparam int unsigned AREG_W  = 5;
  localparam int unsigned SEQ_W   = 8;   // instruction tag / age counter width

  // Critical path predictor configuration
  localparam int unsigned CPHT_ENTRIES = 2048;
  localparam int unsigned CPHT_IDX_W   = 11;   // index width carried with an instruction
  localparam int unsigned CTR_W        = 6;
  localparam int unsigned CTR_INC      = 8;
  localparam int unsigned CTR_DEC      = 1;
  localparam int unsigned CTR_THRESH   = 8;
  localparam int unsigned GCPH_LEN     = 8;
  localparam int unsigned GBH_LEN      = 8;
  localparam int unsigned PC_SHIFT     = 3;    // instructions are 8 bytes apart

  typedef logic [XLEN-1:0]       word_t;
  typedef logic [SEQ_W-1:0]      tag_t;
  typedef logic [AREG_W-1:0]     areg_t;
  typedef logic [CPHT_IDX_W-1:0] cpht_idx_t;

  typedef enum logic [3:0] {
    OP_ADD  = 4'd0,
    OP_SUB  = 4'd1,
    OP_AND  = 4'd2,
    OP_OR   = 4'd3,
    OP_XOR  = 4'd4,
    OP_NOR  = 4'd5,
    OP_SLL  = 4'd6,
    OP_SRL  = 4'd7,
    OP_SRA  = 4'd8,
    OP_SLT  = 4'd9,
    OP_SLTU = 4'd10,
    OP_LUI  = 4'd11
  } alu_op_e;

  // Decoded integer instruction as delivered by the front end.
  typedef struct packed {
    word_t   pc;
    alu_op_e op;
    areg_t   rs1;
    areg_t   rs2;
    areg_t   rd;       // rd == 0 discards the result
    logic    use_imm;  // second operand is imm instead of rs2
    word_t   imm;
  } dinstr_t;

  // Source operand: either a captured value or the tag of its producer.
  typedef struct packed {
    logic  rdy;
    tag_t  tag;
    word_t val;
  } opnd_t;

  // Instruction queue payload.
  typedef struct packed {
    alu_op_e   op;
    opnd_t     s1;
    opnd_t     s2;
    tag_t      tag;
    logic      crit;   // predicted critical
    cpht_idx_t idx;    // CPHT index used for the prediction
  } iq_entry_t;

  // Request sent to an ALU at issue.
  typedef struct packed {
    alu_op_e op;
    word_t   a;
    word_t   b;
    tag_t    tag;
  } alu_req_t;

  // One result bus per ALU.
  typedef struct packed {
    logic  valid;
    tag_t  tag;
    word_t value;
  } result_t;

  // Event counters of the back end.
  typedef struct packed {
    logic [31:0] cycles;
    logic [31:0] dispatched;
    logic [31:0] pred_crit;    // dispatched instructions predicted critical
    logic [31:0] issued_fast;
    logic [31:0] issued_slow;
    logic [31:0] qold;         // issued instructions found critical (oldest in queue)
    logic [31:0] bypass;       // issues that took an operand straight off a result bus
    logic [31:0] disp_stall;   // cycles a dispatch group waited for queue slots
    logic [31:0] branches;     // resolved branches shifted into the branch history
  } perf_t;

  // a is older than b (tags are allotted in program order and wrap).
  function automatic logic tag_older(tag_t a, tag_t b);
    tag_t d;
    d = a - b;
    return d[SEQ_W-1];
  endfunction

  function automatic word_t alu_compute(alu_op_e op, word_t a, word_t b);
    word_t r;
    unique case (op)
      OP_ADD:  r = a + b;
      OP_SUB:  r = a - b;
      OP_AND:  r = a & b;
      OP_OR:   r = a | b;
      OP_XOR:  r = a ^ b;
      OP_NOR:  r = ~(a | b);
      OP_SLL:  r = a << b[4:0];
      OP_SRL:  r = a >> b[4:0];
      OP_SRA:  r = word_t'($signed(a) >>> b[4:0]);
      OP_SLT:  r = {31'd0, $signed(a) < $signed(b)};
      OP_SLTU: r = {31'd0, a < b};
      OP_LUI:  r = {b[15:0], 16'd0};
      default: r = '0;
    endcase
    return r;
  endfunction

endpackage
