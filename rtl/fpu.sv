// fpu: 16-bit floating-point unit (add, subtract, multiply, divide) built as a
// multi-cycle state machine.
//
// Interface: the port list is the FPU entity the processor expects - clock,
// data_rdy, a 2-bit opcode, operands A_in and B_in and the result FPU_out -
// with no reset and no busy or done output.
//
// Operation: the machine idles in FPU_wait. When data_rdy is 1 it latches
// opcode, A_in and B_in and follows the path the opcode selects ("0X"
// add/subtract, "10" multiply, "11" divide), one state per clock, then
// returns to FPU_wait. FPU_out is a register loaded at the edge that leaves the
// last state of a path and held until the next operation ends. With an
// operation started at edge 0, FPU_out is valid after edge N, where N is
// ADD_STATES (4), MUL_STATES (3) or DIV_STATES (16) from fp16_pkg. data_rdy must
// be 0 while the machine is on a path; it is ignored there.
//
// Paths:
//   add/sub  align   - order the operands by magnitude, shift the smaller
//                      mantissa right by the exponent difference into a
//                      44-bit field wide enough to lose no bit;
//            add     - add or subtract the aligned mantissas;
//            norm    - shift the leading one to the top, adjust the exponent;
//            round   - round to nearest-even and pack.
//   multiply mult    - 11x11-bit mantissa product, exponents added;
//            norm    - one-place normalisation, round and sticky bits;
//            round   - round and pack.
//   divide   setup   - then 14 restoring-division steps, one quotient bit per
//                      state, then round and pack.
// The state diagram (a wait state, a test of data_rdy and opcode, three
// chains of states) and the opcode encoding follow the design's
// specification; the split of each path into states, the number format's
// special cases (see fp16_pkg) and the divide-by-zero result (saturation to
// the largest magnitude, sign of the quotient) are this design's own.
//
// Without a reset, the state register may start anywhere: every unused code
// goes to FPU_wait and every path ends there, so the machine is idle at most
// DIV_STATES cycles after power-up if data_rdy is held at 0.
module fpu
  import fp16_pkg::*;
(
  input  logic        clock,
  input  logic        data_rdy,
  input  logic [1:0]  opcode,
  input  logic [15:0] A_in,
  input  logic [15:0] B_in,
  output logic [15:0] FPU_out
);

  typedef enum logic [3:0] {
    S_WAIT,
    S_AS_ALIGN, S_AS_ADD, S_AS_NORM, S_AS_ROUND,
    S_MUL_MULT, S_MUL_NORM, S_MUL_ROUND,
    S_DIV_SETUP, S_DIV_ITER, S_DIV_ROUND
  } state_e;

  localparam int GUARD = 32;                 // extra alignment bits
  localparam int SUM_W = 11 + GUARD + 1;     // 44: carry + mantissa + guard

  state_e state;

  // Latched operands, unpacked.
  logic               sa, sb;
  logic signed [11:0] ea, eb;
  logic [10:0]        ma, mb;
  logic               za, zb;

  // Working registers shared by the paths.
  logic               rs;           // result sign
  logic signed [11:0] re;           // result exponent (unbiased)
  logic               rzero;        // result is zero
  logic               sub_eff;      // add/sub: effective subtraction
  logic [SUM_W-1:0]   big_al, small_al, sum;
  logic [21:0]        prod;
  logic [10:0]        rm;           // normalised mantissa
  logic               rr, rst_b;    // round and sticky bits
  logic [12:0]        rem;          // division remainder
  logic [DIV_BITS-1:0] quo;
  logic [3:0]         bitn;         // division step counter

  // Unpack a word: exponent field 0 is zero.
  function automatic logic signed [11:0] unb_exp(logic [4:0] e);
    return $signed({7'd0, e}) - 12'sd15;
  endfunction

  // Leading-zero count of the 44-bit sum.
  function automatic logic [5:0] lzc(logic [SUM_W-1:0] v);
    logic [5:0] n;
    n = 6'(SUM_W);
    for (int i = 0; i < SUM_W; i++)
      if (v[i]) n = 6'(SUM_W - 1 - i);
    return n;
  endfunction

  // Combinational helpers for the current state.
  logic               a_lt_b;
  logic [11:0]        ediff;
  logic [5:0]         lz;
  logic [SUM_W-1:0]   sum_norm;
  logic [12:0]        rem_try;
  logic [DIV_BITS-1:0] q_fin;
  logic [10:0]        m_big, m_small;

  always_comb begin
    a_lt_b   = (zb && !za) ? 1'b0 :
               (za && !zb) ? 1'b1 :
               ((ea < eb) || ((ea == eb) && (ma < mb)));
    ediff    = a_lt_b ? 12'(eb - ea) : 12'(ea - eb);
    lz       = lzc(sum);
    sum_norm = sum << lz;
    rem_try  = rem - {2'b00, mb};
    q_fin    = quo;
    m_big    = a_lt_b ? (zb ? 11'd0 : mb) : (za ? 11'd0 : ma);
    m_small  = a_lt_b ? (za ? 11'd0 : ma) : (zb ? 11'd0 : mb);
  end

  always_ff @(posedge clock) begin
    case (state)
      S_WAIT: begin
        if (data_rdy) begin
          sa <= A_in[15];
          sb <= B_in[15] ^ (opcode == FPU_SUB);
          ea <= unb_exp(A_in[14:10]);
          eb <= unb_exp(B_in[14:10]);
          ma <= {1'b1, A_in[9:0]};
          mb <= {1'b1, B_in[9:0]};
          za <= (A_in[14:10] == '0);
          zb <= (B_in[14:10] == '0);
          case (fpu_op_e'(opcode))
            FPU_ADD, FPU_SUB: state <= S_AS_ALIGN;
            FPU_MUL:          state <= S_MUL_MULT;
            default:          state <= S_DIV_SETUP;
          endcase
        end
      end

      // ---------------- add / subtract ----------------
      S_AS_ALIGN: begin
        big_al   <= {1'b0, m_big, GUARD'(0)};
        small_al <= (ediff >= 12'(SUM_W)) ? '0 : ({1'b0, m_small, GUARD'(0)} >> ediff);
        rs       <= a_lt_b ? sb : sa;
        re       <= a_lt_b ? eb : ea;
        sub_eff  <= sa ^ sb;
        state    <= S_AS_ADD;
      end
      S_AS_ADD: begin
        sum   <= sub_eff ? (big_al - small_al) : (big_al + small_al);
        state <= S_AS_NORM;
      end
      S_AS_NORM: begin
        rzero <= (sum == '0);
        rm    <= sum_norm[SUM_W-1 -: 11];
        rr    <= sum_norm[SUM_W-12];
        rst_b <= |sum_norm[SUM_W-13:0];
        re    <= re + 12'sd1 - $signed({6'd0, lz});
        state <= S_AS_ROUND;
      end
      S_AS_ROUND: begin
        FPU_out <= rzero ? 16'h0000 : round_pack(rs, re, rm, rr, rst_b);
        state   <= S_WAIT;
      end

      // ---------------- multiply ----------------
      S_MUL_MULT: begin
        prod  <= ma * mb;
        re    <= ea + eb;
        rs    <= sa ^ sb;
        rzero <= za | zb;
        state <= S_MUL_NORM;
      end
      S_MUL_NORM: begin
        if (prod[21]) begin
          rm    <= prod[21:11];
          rr    <= prod[10];
          rst_b <= |prod[9:0];
          re    <= re + 12'sd1;
        end else begin
          rm    <= prod[20:10];
          rr    <= prod[9];
          rst_b <= |prod[8:0];
        end
        state <= S_MUL_ROUND;
      end
      S_MUL_ROUND: begin
        FPU_out <= rzero ? 16'h0000 : round_pack(rs, re, rm, rr, rst_b);
        state   <= S_WAIT;
      end

      // ---------------- divide ----------------
      S_DIV_SETUP: begin
        rs    <= sa ^ sb;
        re    <= ea - eb;
        rzero <= za;
        rem   <= {2'b00, ma};
        quo   <= '0;
        bitn  <= 4'(DIV_BITS - 1);
        state <= S_DIV_ITER;
      end
      S_DIV_ITER: begin
        // Quotient bit = (remainder >= divisor); restore otherwise.
        if (!rem_try[12]) begin
          rem <= {rem_try[11:0], 1'b0};
          quo <= {quo[DIV_BITS-2:0], 1'b1};
        end else begin
          rem <= {rem[11:0], 1'b0};
          quo <= {quo[DIV_BITS-2:0], 1'b0};
        end
        if (bitn == 4'd0) state <= S_DIV_ROUND;
        bitn <= bitn - 4'd1;
      end
      S_DIV_ROUND: begin
        // quo = floor(ma * 2^13 / mb), in [2^12, 2^14).
        if (rzero)
          FPU_out <= 16'h0000;
        else if (zb)
          FPU_out <= {rs, 15'h7FFF};
        else if (q_fin[DIV_BITS-1])
          FPU_out <= round_pack(rs, re, q_fin[13:3], q_fin[2],
                                (|q_fin[1:0]) | (rem != '0));
        else
          FPU_out <= round_pack(rs, re - 12'sd1, q_fin[12:2], q_fin[1],
                                q_fin[0] | (rem != '0));
        state <= S_WAIT;
      end

      default: state <= S_WAIT;
    endcase
  end

  // An operation may only be started while the machine is idle.
  a_rdy_when_idle: assert property (@(posedge clock) data_rdy |-> state == S_WAIT)
    else $error("fpu: data_rdy while busy");

endmodule
