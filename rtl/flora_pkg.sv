// flora_pkg: types and constants shared by the FloRA reconfigurable computing
// module (RCM).
//
// The RCM is an array of 16-bit integer processing elements (PEs). Floating-point
// values are carried as a pair of PE words: the mantissa PE holds {sign, 15-bit
// fraction} and the exponent PE holds the 8-bit biased exponent zero-extended to
// 16 bits (the 24-bit reduced single-precision format). A PE executes one context
// word per cycle; a floating-point opcode hands control to the PE's FSM for the
// multi-cycle operation (6 cycles for FADD/FSUB, 4 for FMUL, 7 for FDIV/FSQRT).
//
// The opcode encoding, the context-word layout, the source-select encoding and
// the pair-link message are this design's own choices.
package flora_pkg;

  localparam int unsigned DW       = 16;   // PE data-path width
  localparam int unsigned FRAC_W   = 15;   // reduced mantissa fraction width
  localparam int unsigned EXP_W    = 8;
  localparam int unsigned BIAS     = 127;
  localparam int unsigned CTX_W    = 32;   // context (configuration) word width
  localparam int unsigned RF_DEPTH = 4;    // local register file entries
  localparam int unsigned MEM_AW   = 6;    // data-memory bank address width

  // Latencies of the multi-cycle floating-point operations (clock edges from
  // the issuing cycle to the registered result).
  localparam int unsigned LAT_FADD  = 6;
  localparam int unsigned LAT_FMUL  = 4;
  localparam int unsigned LAT_FDIV  = 7;
  localparam int unsigned LAT_FSQRT = 7;
  localparam int unsigned LAT_IMUL  = 2;

  // Internal mantissa of the FP data path of a mantissa PE:
  // [19] carry, [18] hidden one, [17:3] fraction, [2:0] guard bits.
  localparam int unsigned MI_W = 20;

  typedef enum logic [4:0] {
    OP_NOP   = 5'd0,   // hold output register
    OP_MOV   = 5'd1,   // out = A
    OP_ADD   = 5'd2,
    OP_SUB   = 5'd3,
    OP_ABS   = 5'd4,   // out = |A|
    OP_AND   = 5'd5,
    OP_OR    = 5'd6,
    OP_XOR   = 5'd7,
    OP_SHL   = 5'd8,   // A << B[3:0]
    OP_SHR   = 5'd9,   // logical
    OP_SRA   = 5'd10,  // arithmetic
    OP_MIN   = 5'd11,  // compare and select (signed)
    OP_MAX   = 5'd12,
    OP_SLT   = 5'd13,  // out = (A < B) signed
    OP_MUL   = 5'd14,  // low 16 bits of A*B on the row's shared multiplier
    OP_FADD  = 5'd16,
    OP_FSUB  = 5'd17,
    OP_FMUL  = 5'd18,
    OP_FDIV  = 5'd19,
    OP_FSQRT = 5'd20
  } op_e;

  // Operand source select
  typedef enum logic [3:0] {
    SRC_W    = 4'd0,  SRC_E  = 4'd1,  SRC_N  = 4'd2,  SRC_S  = 4'd3,
    SRC_W2   = 4'd4,  SRC_E2 = 4'd5,  SRC_N2 = 4'd6,  SRC_S2 = 4'd7,
    SRC_PAIR = 4'd8,  SRC_RF = 4'd9,  SRC_IMM = 4'd10,
    SRC_BUS0 = 4'd11, SRC_BUS1 = 4'd12, SRC_SELF = 4'd13, SRC_ZERO = 4'd14
  } src_e;

  // One context word for one PE for one cycle.
  typedef struct packed {
    logic [6:0]        imm;    // sign-extended immediate
    logic [MEM_AW-1:0] addr;   // data-memory address offset for bus accesses
    logic              st;     // drive the output register onto the row write bus
    logic [1:0]        rf_wa;  // register-file write address
    logic              rf_we;  // write the result into the register file
    logic [1:0]        rf_ra;  // register-file read address
    src_e              sb;
    src_e              sa;
    op_e               op;
  } ctx_t;

  // Dedicated link between the two PEs of an FPU-PE cluster. Registered at the
  // sender, so a message sent in cycle k is seen in cycle k+1.
  typedef struct packed {
    logic          valid;
    logic [3:0]    tag;    // sender's FSM step that produced the message
    logic [7:0]    flags;
    logic [DW-1:0] data;
  } pair_msg_t;

  function automatic logic is_fp_op(op_e op);
    return op inside {OP_FADD, OP_FSUB, OP_FMUL, OP_FDIV, OP_FSQRT};
  endfunction

  function automatic int unsigned op_latency(op_e op);
    case (op)
      OP_FADD, OP_FSUB: return LAT_FADD;
      OP_FMUL:          return LAT_FMUL;
      OP_FDIV:          return LAT_FDIV;
      OP_FSQRT:         return LAT_FSQRT;
      OP_MUL:           return LAT_IMUL;
      default:          return 1;
    endcase
  endfunction

  // Rows of an 8-row array that hold mantissa PEs (Fig. 3.5(a) arrangement:
  // M/E, E/M, M/E, E/M from top to bottom).
  function automatic logic is_mant_row(int unsigned r);
    return (r % 4 == 0) || (r % 4 == 3);
  endfunction

endpackage
