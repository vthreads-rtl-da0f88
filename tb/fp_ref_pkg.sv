// fp_ref_pkg: reference single-precision arithmetic for the floating-point
// testbenches, computed independently of the RTL through the simulator's
// double-precision `real`.
//
// Operands are widened exactly to double, the operation is done in double,
// and the double result is rounded to single precision (nearest, ties to
// even) by `to_single`. For add, subtract, multiply and divide of single
// operands this double rounding gives the correctly rounded single result.
// Conventions match the design under test: denormal operands count as zero,
// results below the normal range become a signed zero, above it a signed
// infinity, and every NaN is 0x7FC00000.
package fp_ref_pkg;
  function automatic real to_real(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0)  return f[31] ? -0.0 : 0.0;
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] to_single(input real r);
    logic [63:0] d;
    int          e;
    logic [23:0] m;
    logic        g, st;
    d = $realtobits(r);
    if (d[62:52] == 11'h7FF) return (d[51:0] != 0) ? 32'h7FC0_0000 : {d[63], 8'hFF, 23'd0};
    if (d[62:0] == 0) return {d[63], 31'd0};
    e  = int'(d[62:52]) - 1023 + 127;
    m  = {1'b0, d[51:29]};
    g  = d[28];
    st = d[27:0] != 0;
    if (g && (st || m[0])) m = m + 1;
    if (m[23]) begin m = 0; e = e + 1; end
    if (e <= 0)   return {d[63], 31'd0};
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    return {d[63], 8'(e), m[22:0]};
  endfunction

  function automatic bit is_nan(input logic [31:0] f);
    return f[30:23] == 8'hFF && f[22:0] != 0;
  endfunction
  function automatic bit is_inf(input logic [31:0] f);
    return f[30:23] == 8'hFF && f[22:0] == 0;
  endfunction

  // op: 0 add, 1 sub, 2 mul, 3 int-to-float, 4 div
  function automatic logic [31:0] ref_op(input int op, input logic [31:0] a, input logic [31:0] b);
    real x, y;
    bit  az, bz;
    if (op == 3) return to_single(real'($signed(a)));
    if (is_nan(a) || is_nan(b)) return 32'h7FC0_0000;
    az = a[30:23] == 0; bz = b[30:23] == 0;
    if (op == 1) b[31] = ~b[31];
    x = to_real(a); y = to_real(b);
    case (op)
      0, 1: begin
        if (is_inf(a) && is_inf(b)) return (a[31] != b[31]) ? 32'h7FC0_0000 : a;
        if (is_inf(a)) return {a[31], 8'hFF, 23'd0};
        if (is_inf(b)) return {b[31], 8'hFF, 23'd0};
        if (az && bz) return {a[31] & b[31], 31'd0};
        if (az) return b;
        if (bz) return a;
        if (x + y == 0.0) return 32'd0;
        return to_single(x + y);
      end
      2: begin
        if ((is_inf(a) && bz) || (is_inf(b) && az)) return 32'h7FC0_0000;
        if (is_inf(a) || is_inf(b)) return {a[31] ^ b[31], 8'hFF, 23'd0};
        if (az || bz) return {a[31] ^ b[31], 31'd0};
        return to_single(x * y);
      end
      default: begin
        if ((is_inf(a) && is_inf(b)) || (az && bz)) return 32'h7FC0_0000;
        if (is_inf(a) || bz) return {a[31] ^ b[31], 8'hFF, 23'd0};
        if (az || is_inf(b)) return {a[31] ^ b[31], 31'd0};
        return to_single(x / y);
      end
    endcase
  endfunction

  // random normal number with a biased exponent in [elo, ehi]
  function automatic logic [31:0] rnd_fp(input int elo, input int ehi);
    return {1'($urandom), 8'(elo + int'($urandom % (ehi - elo + 1))), 23'($urandom)};
  endfunction
endpackage
