// vpiac_pkg: types and constants shared by the variable-precision, interval
// arithmetic coprocessor (VPIAC).
//
// A variable-precision number is a 32-bit header plus L+1 significand words
// of M bits. The header carries a 16-bit exponent biased by 32768, a sign
// bit, a 2-bit type, a 5-bit length L and an 8-bit index that points at the
// most significant significand word F[0] in the significand memory. The field
// widths of exponent, sign, type and length follow the published format; the
// bit order inside the header word, the type encoding, the 8-bit index (the
// significand memory has 256 words) and all opcode encodings are this
// design's own choices.
package vpiac_pkg;

  localparam int unsigned EXP_BIAS = 32768;
  localparam int unsigned NREGS    = 64;   // header words
  localparam int unsigned NSIG     = 256;  // significand words

  typedef enum logic [1:0] {
    T_NORMAL = 2'd0,
    T_ZERO   = 2'd1,
    T_INF    = 2'd2,
    T_NAN    = 2'd3
  } vp_type_e;

  // Header word: [31:16] exponent, [15] sign, [14:13] type, [12:8] length,
  // [7:0] index of F[0].
  typedef struct packed {
    logic [15:0] exp;
    logic        sign;
    vp_type_e    vtype;
    logic [4:0]  len;
    logic [7:0]  idx;
  } vp_hdr_t;

  // IEEE 754 rounding directions.
  typedef enum logic [1:0] {
    RM_NEAREST = 2'd0,   // to nearest, ties to even
    RM_ZERO    = 2'd1,   // toward zero
    RM_UP      = 2'd2,   // toward +infinity (the "delta" rounding)
    RM_DOWN    = 2'd3    // toward -infinity (the "nabla" rounding)
  } vp_rmode_e;

  // Long accumulator segment flags.
  typedef enum logic [1:0] {
    F_ZEROS   = 2'd0,
    F_ONES    = 2'd1,
    F_NEITHER = 2'd2
  } la_flag_e;

  // Micro-operations executed by the data path control unit on point
  // (single variable-precision) operands.
  typedef enum logic [4:0] {
    U_NOP    = 5'd0,
    U_ADD    = 5'd1,   // dst = round(a + b)
    U_SUB    = 5'd2,   // dst = round(a - b)
    U_MUL    = 5'd3,   // dst = round(a * b)
    U_SQR    = 5'd4,   // dst = round(a * a), symmetric partial products
    U_MID    = 5'd5,   // dst = round(a + b) / 2
    U_ACCCLR = 5'd6,   // clear the long accumulator
    U_MAC    = 5'd7,   // long accumulator += a * b (exact)
    U_ACCRND = 5'd8,   // dst = round(long accumulator)
    U_CMP    = 5'd9,   // compare a with b (signed, or magnitudes if cmp_abs)
    U_MOV    = 5'd10,  // dst = a (significand words copied)
    U_ZERO   = 5'd11,  // dst = +0
    U_CLS    = 5'd12,  // report sign and type of a and b
    U_DIV    = 5'd13,  // dst = round(a / b)
    U_SQRT   = 5'd14,  // dst = round(sqrt(a))
    U_INF    = 5'd15,  // dst = -infinity if rmode is RM_DOWN, else +infinity
    U_ACCADD = 5'd16   // long accumulator += a (exact)
  } vp_uop_e;

  // Instructions accepted by the coprocessor.
  typedef enum logic [4:0] {
    I_NOP    = 5'd0,
    // point operations
    P_ADD    = 5'd1,
    P_SUB    = 5'd2,
    P_MUL    = 5'd3,
    P_SQR    = 5'd4,
    P_ACCCLR = 5'd5,
    P_MAC    = 5'd6,
    P_ACCRND = 5'd7,
    P_MOV    = 5'd8,
    P_CMP    = 5'd9,
    P_DIV    = 5'd10,
    P_SQRT   = 5'd11,
    X_DISJ   = 5'd12,  // X and Y disjoint (interval relational operator)
    // interval operations (an interval occupies registers r and r+1)
    X_ADD    = 5'd16,
    X_SUB    = 5'd17,
    X_MUL    = 5'd18,
    X_SQR    = 5'd19,
    X_HULL   = 5'd20,
    X_ISECT  = 5'd21,
    X_MID    = 5'd22,
    X_WID    = 5'd23,
    X_DIV    = 5'd24,
    X_SQRT   = 5'd25,
    X_DOTLO  = 5'd26,  // accumulator += lower end of X * Y (interval dot product)
    X_DOTHI  = 5'd27,  // accumulator += upper end of X * Y
    X_EQ     = 5'd28,  // relational operators, outcome in rel
    X_SUBSET = 5'd29,  // X within Y
    X_SUPSET = 5'd30,  // Y within X
    X_INSIDE = 5'd31   // X in the interior of Y
  } vp_op_e;

  // Comparison outcome.
  typedef enum logic [1:0] {
    C_LT = 2'd0,
    C_EQ = 2'd1,
    C_GT = 2'd2,
    C_UN = 2'd3    // unordered (a NaN is involved)
  } vp_cmp_e;

endpackage
