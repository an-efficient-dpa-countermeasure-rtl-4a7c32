// Shared types and constants of the dual-field ECC (DF-ECC) processor.
//
// The processor keeps every field element of a scalar multiplication in a
// randomized Montgomery domain a*2^lambda, where lambda is the Hamming weight
// of a fresh random value r. This package holds the encodings that the
// arithmetic unit, the controller, its micro-sequence table and the bus
// wrapper share: GFAU function codes, register-file slot names, micro-op and
// instruction formats. All encodings here are this design's own choices.
package dfecc_pkg;

  // GFAU function select (2 bits, as on the GFAU funcsel bus)
  typedef enum logic [1:0] {
    FS_ADD = 2'd0,   // modular addition (XOR in GF(2^m))
    FS_SUB = 2'd1,   // modular subtraction (XOR in GF(2^m))
    FS_MUL = 2'd2,   // randomized Montgomery multiplication  X*Y*2^-lambda
    FS_DIV = 2'd3    // randomized Montgomery division        X*Y^-1*2^lambda
  } funcsel_e;

  // Operand held by the RS arithmetic unit's adder in one step
  typedef enum logic [1:0] {
    RS_NONE = 2'd0,  // T = A
    RS_ADD  = 2'd1,  // T = A + B
    RS_SUB  = 2'd2   // T = A - B
  } rs_comb_e;

  // Control of one RS-datapath step: A' = half ? (A op B)/2 : (A op B),
  // B' = dbl ? 2B : B, all modulo the field modulus.
  typedef struct packed {
    logic     valid;
    logic     group;   // 0: A is R, B is S; 1: A is S, B is R
    rs_comb_e comb;
    logic     half;
    logic     dbl;
  } rs_ctrl_t;

  // Register-file operand slots. Each slot holds one field element in
  // consecutive words. Slots 9..12 are resolved by the controller to the
  // destination (D) or other (O) working point; 13/14 are constants.
  typedef enum logic [3:0] {
    SL_A    = 4'd0,  SL_Q0X = 4'd1,  SL_Q0Y = 4'd2,
    SL_Q1X  = 4'd3,  SL_Q1Y = 4'd4,  SL_Q2X = 4'd5,  SL_Q2Y = 4'd6,
    SL_QTX  = 4'd7,  SL_QTY = 4'd8,
    SL_DX   = 4'd9,  SL_DY  = 4'd10, SL_OX  = 4'd11, SL_OY  = 4'd12,
    SL_ZERO = 4'd13, SL_ONE = 4'd14, SL_NONE = 4'd15
  } slot_e;

  // One field operation of a micro-sequence: dst = funcsel(src1, src2)
  typedef struct packed {
    funcsel_e fs;
    slot_e    src1;
    slot_e    src2;
    slot_e    dst;
  } uop_t;

  // Micro-sequences (routines) kept by ecc_microcode
  typedef enum logic [2:0] {
    RT_PRE  = 3'd0,  // domain conversion of P and a, copies P1 = P2 = P
    RT_PD_P = 3'd1,  // affine point doubling, GF(p)
    RT_PA_P = 3'd2,  // affine point addition, GF(p)
    RT_PD_B = 3'd3,  // affine point doubling, GF(2^m)
    RT_PA_B = 3'd4,  // affine point addition, GF(2^m)
    RT_POST = 3'd5   // conversion of the result back to the integer domain
  } routine_e;

  // Host instruction opcodes
  typedef enum logic [1:0] {
    OP_NOP   = 2'd0,
    OP_ECSM  = 2'd1,  // scalar multiplication Q1 = K * Q0
    OP_FIELD = 2'd2   // one field operation on register-file slots
  } opcode_e;

  // Decoded instruction
  typedef struct packed {
    opcode_e  op;
    funcsel_e fs;
    slot_e    src1;
    slot_e    src2;
    slot_e    dst;
    logic     valid;
  } instr_t;

  // Host bus targets (see addr_decoder for the address map)
  typedef enum logic [2:0] {
    T_NONE     = 3'd0,
    T_CTRL     = 3'd1,   // instruction (write) / status (read)
    T_FIELDLEN = 3'd2,   // field length m and field type
    T_PRIME    = 3'd3,   // prime / field polynomial, 32-bit words
    T_KEY      = 3'd4,   // private key, 32-bit words, write only
    T_RF       = 3'd5    // register file, 32-bit sub-words of 132-bit words
  } target_e;

  typedef struct packed {
    target_e     target;
    logic [4:0]  word;     // 32-bit word index within PRIME / KEY
    logic [5:0]  entry;    // register-file word
    logic [2:0]  sub;      // 32-bit sub-word of a register-file word
  } decode_t;

endpackage
