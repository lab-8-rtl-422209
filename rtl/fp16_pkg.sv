// fp16_pkg: the 16-bit floating-point format and the helpers shared by the FPU
// and the processor that sequences it.
//
// Format (bit 15 sign, bits 14..10 exponent, bits 9..0 mantissa):
//   value = (-1)^sign * 1.mantissa * 2^(exponent - 15)
// The field layout is the one the design is specified with. The bias of 15 is
// what the reference data words imply (0x4980 = 11.0, 0x5040 = 34.0). The
// treatment of special values is this design's own choice:
//   * an exponent field of 0 means zero (the mantissa is ignored, so there are
//     no subnormals); the FPU always produces +0 (0x0000) for a zero result;
//   * exponent 31 is an ordinary exponent: there is no infinity and no NaN;
//   * a result too large to represent saturates to +/-0x7FFF, one too small
//     flushes to zero;
//   * results are rounded to nearest, ties to even.
package fp16_pkg;

  localparam int EXP_W = 5;
  localparam int MAN_W = 10;
  localparam int BIAS  = 15;

  typedef struct packed {
    logic             sign;
    logic [EXP_W-1:0] exp;
    logic [MAN_W-1:0] man;
  } fp16_t;

  // FPU opcode, as in the FPU's state diagram: "0X" add/subtract, "10"
  // multiply, "11" divide. The low bit selects subtract within "0X".
  typedef enum logic [1:0] {
    FPU_ADD = 2'b00,
    FPU_SUB = 2'b01,
    FPU_MUL = 2'b10,
    FPU_DIV = 2'b11
  } fpu_op_e;

  // Number of working states on each path of the FPU state machine (the
  // states between FPU_wait and the return to it). The result register
  // FPU_out is loaded at the clock edge that leaves the last of them.
  localparam int ADD_STATES = 4;   // align, add, normalise, round
  localparam int MUL_STATES = 3;   // multiply, normalise, round
  localparam int DIV_BITS   = 14;  // quotient bits, one per state
  localparam int DIV_STATES = DIV_BITS + 2;  // setup, 14 x iterate, round

  // Working states of the path that an opcode selects.
  function automatic int unsigned fpu_states(fpu_op_e op);
    case (op)
      FPU_ADD, FPU_SUB: return ADD_STATES;
      FPU_MUL:          return MUL_STATES;
      default:          return DIV_STATES;
    endcase
  endfunction

  // Round a normalised magnitude to nearest-even and pack it.
  //   mant   : 11 bits with the hidden 1 in bit 10
  //   rnd    : the bit just below mant's lsb
  //   sticky : OR of all bits below rnd
  //   exp_u  : unbiased exponent of mant (value = mant/1024 * 2^exp_u)
  function automatic fp16_t round_pack(logic sign, logic signed [11:0] exp_u,
                                       logic [10:0] mant, logic rnd,
                                       logic sticky);
    logic [11:0]        m;
    logic signed [11:0] e;
    logic signed [11:0] eb;
    fp16_t              r;
    m = {1'b0, mant} + {11'd0, (rnd & (sticky | mant[0]))};
    e = exp_u;
    if (m[11]) begin
      m = m >> 1;
      e = e + 12'sd1;
    end
    eb = e + 12'(BIAS);
    if (eb > 12'sd31)     r = '{sign: sign, exp: '1, man: '1};
    else if (eb < 12'sd1) r = '0;
    else                  r = '{sign: sign, exp: eb[EXP_W-1:0], man: m[MAN_W-1:0]};
    return r;
  endfunction

endpackage
