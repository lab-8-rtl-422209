// fp16_ref_pkg: reference model of the 16-bit floating-point format for the
// testbenches, written with real (double) arithmetic and independent of the
// RTL. A word with exponent field 0 is zero; results round to nearest-even,
// saturate to +/-0x7FFF on overflow and flush to +0 on underflow. Sums,
// products and quotients of two 11-bit mantissas are exact or far from a
// rounding tie in double precision, so the model rounds only once in effect.
package fp16_ref_pkg;

  function automatic real fp_to_real(logic [15:0] w);
    real v;
    if (w[14:10] == 5'd0) return 0.0;
    v = 1.0 + real'(w[9:0]) / 1024.0;
    for (int i = 0; i < int'(w[14:10]); i++) v = v * 2.0;
    for (int i = 0; i < 15; i++) v = v / 2.0;
    return w[15] ? -v : v;
  endfunction

  function automatic logic [15:0] real_to_fp(real v);
    real a, mi, fl;
    int  e;
    logic s;
    if (v == 0.0) return 16'h0000;
    s = (v < 0.0);
    a = s ? -v : v;
    e = 0;
    while (a >= 2.0) begin a = a / 2.0; e++; end
    while (a < 1.0)  begin a = a * 2.0; e--; end
    mi = a * 1024.0;
    fl = $floor(mi);
    if ((mi - fl > 0.5) || ((mi - fl == 0.5) && ($rtoi(fl) % 2 == 1))) fl = fl + 1.0;
    if (fl >= 2048.0) begin fl = 1024.0; e++; end
    if (e + 15 > 31) return {s, 15'h7FFF};
    if (e + 15 < 1)  return 16'h0000;
    return {s, 5'(e + 15), 10'($rtoi(fl) - 1024)};
  endfunction

  // op: 0 add, 1 subtract, 2 multiply, 3 divide
  function automatic logic [15:0] ref_op(int op, logic [15:0] a, logic [15:0] b);
    real x, y;
    x = fp_to_real(a);
    y = fp_to_real(b);
    case (op)
      0: return real_to_fp(x + y);
      1: return real_to_fp(x - y);
      2: return real_to_fp(x * y);
      default: begin
        if (x == 0.0) return 16'h0000;
        if (y == 0.0) return {a[15] ^ b[15], 15'h7FFF};
        return real_to_fp(x / y);
      end
    endcase
  endfunction

endpackage
