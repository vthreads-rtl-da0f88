// fp_pkg: IEEE-754 single-precision helpers shared by the floating-point
// data-paths (fp_dp) and the iterative divider (fdiv).
//
// Values are 32-bit binary32 words. The format handling chosen here:
// round to nearest, ties to even; denormal inputs are read as zero and
// results below the normal range are flushed to a signed zero; results
// beyond the normal range become a signed infinity; every NaN result is the
// quiet NaN 0x7FC00000. `fp_round` takes a sign, a biased exponent (wide
// and signed, so that overflow and underflow can be seen) and a 27-bit
// mantissa normalised to bit 26, with a guard bit, a round bit and a
// sticky bit below the 24 mantissa bits, and returns the packed result.
// The choice of rounding and denormal handling is this design's: the
// architecture only states that the data-paths are single precision.
package fp_pkg;
  localparam logic [31:0] FP_QNAN = 32'h7FC0_0000;

  function automatic logic [31:0] fp_inf(input logic s);
    return {s, 8'hFF, 23'd0};
  endfunction

  function automatic logic [31:0] fp_round(input logic s, input logic signed [11:0] e,
                                           input logic [26:0] m);
    logic [24:0]        mr;
    logic               inc;
    logic signed [11:0] ef;
    inc = m[2] && (m[1] || m[0] || m[3]);
    mr  = {1'b0, m[26:3]} + 25'(inc);
    ef  = e;
    if (mr[24]) begin mr = mr >> 1; ef = ef + 1; end
    if (ef <= 0)        return {s, 31'd0};
    else if (ef >= 255) return fp_inf(s);
    else                return {s, ef[7:0], mr[22:0]};
  endfunction

  // count of leading zeros of a 27-bit value (27 when it is zero)
  function automatic logic [4:0] clz27(input logic [26:0] v);
    logic [4:0] n;
    logic       seen;
    n = 5'd0; seen = 1'b0;
    for (int i = 26; i >= 0; i--)
      if (!seen) begin
        if (v[i]) seen = 1'b1;
        else n = n + 1'b1;
      end
    return n;
  endfunction

  function automatic logic [4:0] clz32(input logic [31:0] v);
    logic [4:0] n;
    logic       seen;
    n = 5'd0; seen = 1'b0;
    for (int i = 31; i >= 0; i--)
      if (!seen) begin
        if (v[i]) seen = 1'b1;
        else n = n + 1'b1;
      end
    return n;
  endfunction
endpackage
