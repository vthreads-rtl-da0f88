// fp_dp: one generic single-precision floating-point data-path of FPCORE.
//
// Performs FADD, FSUB, FMUL and ITOF (signed 32-bit integer to single
// precision) on binary32 words held in the general registers. The result
// appears LATENCY (4) clocks after `in_valid`, with `in_tag` carried along;
// a new operation can start every clock. Rounding, denormal and NaN
// handling are those of fp_pkg (round to nearest even, flush to zero,
// one quiet NaN).
// The operations, single precision and the 4-stage pipeline follow the
// architecture. How the work is split over the stages is this design's:
// the result is computed in one level of logic and carried through LATENCY
// registers, which a synthesis tool can retime into the stages (the
// architecture uses a vendor library component here).
module fp_dp
  import vt_pkg::*;
  import fp_pkg::*;
#(
  parameter int LATENCY = 4,
  parameter int TW      = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  opcode_e       op,
  input  logic [31:0]   a,
  input  logic [31:0]   b,
  input  logic [TW-1:0] in_tag,
  output logic          out_valid,
  output logic [31:0]   result,
  output logic [TW-1:0] out_tag
);
  // ---------------------------------------------------------------- unpack
  wire        sa = a[31];
  wire        sb = b[31] ^ (op == OP_FSUB);
  wire [7:0]  ea = a[30:23], eb = b[30:23];
  wire        za = ea == 8'd0, zb = eb == 8'd0;          // zero or denormal
  wire        ia = ea == 8'hFF && a[22:0] == '0, ib = eb == 8'hFF && b[22:0] == '0;
  wire        na = ea == 8'hFF && a[22:0] != '0, nb = eb == 8'hFF && b[22:0] != '0;
  wire [23:0] ma = za ? 24'd0 : {1'b1, a[22:0]};
  wire [23:0] mb = zb ? 24'd0 : {1'b1, b[22:0]};

  // ---------------------------------------------------------------- add/sub
  logic        swap, s_big, s_sml;
  logic [7:0]  e_big, e_sml, d;
  logic [23:0] m_big, m_sml;
  logic [49:0] sh;
  logic [26:0] a27, b27, n27;
  logic [27:0] sum;
  logic [4:0]  lz;
  logic signed [11:0] e_add;
  logic [31:0] r_add;
  always_comb begin
    swap  = {eb, mb} > {ea, ma};
    s_big = swap ? sb : sa;  s_sml = swap ? sa : sb;
    e_big = swap ? eb : ea;  e_sml = swap ? ea : eb;
    m_big = swap ? mb : ma;  m_sml = swap ? ma : mb;
    d     = e_big - e_sml;
    sh    = (d > 8'd49) ? 50'd0 : ({m_sml, 26'd0} >> d);
    b27   = {sh[49:24], |sh[23:0]};
    a27   = {m_big, 3'b000};
    e_add = 12'(e_big);
    n27   = '0; lz = '0;
    r_add = '0;
    if (s_big == s_sml) begin
      sum = 28'(a27) + 28'(b27);
      if (sum[27]) begin n27 = {sum[27:2], sum[1] | sum[0]}; e_add = e_add + 1; end
      else n27 = sum[26:0];
    end else begin
      sum = 28'(a27) - 28'(b27);
      lz  = clz27(sum[26:0]);
      n27 = sum[26:0] << lz;
      e_add = e_add - 12'(lz);
    end
    if (na || nb || (ia && ib && sa != sb)) r_add = FP_QNAN;
    else if (ia)                             r_add = fp_inf(sa);
    else if (ib)                             r_add = fp_inf(sb);
    else if (n27 == '0)                      r_add = (sa && sb) ? 32'h8000_0000 : 32'd0;
    else                                     r_add = fp_round(s_big, e_add, n27);
  end

  // ---------------------------------------------------------------- multiply
  logic [47:0] p;
  logic [26:0] p27;
  logic signed [11:0] e_mul;
  logic [31:0] r_mul;
  wire         s_mul = a[31] ^ b[31];
  always_comb begin
    p     = 48'(ma) * 48'(mb);
    e_mul = 12'(ea) + 12'(eb) - 12'd127;
    if (p[47]) begin p27 = {p[47:22], |p[21:0]}; e_mul = e_mul + 1; end
    else             p27 = {p[46:21], |p[20:0]};
    if (na || nb || (ia && zb) || (ib && za)) r_mul = FP_QNAN;
    else if (ia || ib)                        r_mul = fp_inf(s_mul);
    else if (za || zb)                        r_mul = {s_mul, 31'd0};
    else                                      r_mul = fp_round(s_mul, e_mul, p27);
  end

  // ---------------------------------------------------------------- int to float
  logic [31:0] mag, nrm;
  logic [4:0]  lzi;
  logic [31:0] r_itof;
  always_comb begin
    mag    = a[31] ? 32'(-a) : a;
    lzi    = clz32(mag);
    nrm    = mag << lzi;
    r_itof = (mag == '0) ? 32'd0
           : fp_round(a[31], 12'(158) - 12'(lzi), {nrm[31:6], |nrm[5:0]});
  end

  logic [31:0] r;
  always_comb
    unique case (op)
      OP_FMUL: r = r_mul;
      OP_ITOF: r = r_itof;
      default: r = r_add;
    endcase

  // ---------------------------------------------------------------- pipeline
  logic          v [LATENCY];
  logic [31:0]   q [LATENCY];
  logic [TW-1:0] t [LATENCY];
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int i = 0; i < LATENCY; i++) begin v[i] <= 1'b0; q[i] <= '0; t[i] <= '0; end
    end else begin
      v[0] <= in_valid; q[0] <= r; t[0] <= in_tag;
      for (int i = 1; i < LATENCY; i++) begin v[i] <= v[i-1]; q[i] <= q[i-1]; t[i] <= t[i-1]; end
    end
  assign out_valid = v[LATENCY-1];
  assign result    = q[LATENCY-1];
  assign out_tag   = t[LATENCY-1];
endmodule
