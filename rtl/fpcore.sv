// fpcore: floating-point core of a Cluster (FPCORE).
//
// Holds W generic single-precision data-paths (fp_dp: FADD, FSUB, FMUL,
// ITOF, LATENCY 4 clocks, one new operation per clock each) and one shared
// iterative divider (fdiv, 30 clocks, one division at a time). Syllable
// slot i of a long instruction word uses data-path i; the divider takes the
// lowest slot that presents an FDIV while it is idle, and `div_busy` tells
// the issuing logic that it cannot take another one. Each result leaves
// with the tag it entered with.
// Interface: per slot `in_valid/op/a/b/in_tag`; per data-path
// `dp_valid/dp_result/dp_tag`; for the divider `div_done/div_result/
// div_tag`. Two 4-stage generic data-paths with add/subtract, multiply and
// integer conversion, plus an iterative divider, follow the architecture;
// one data-path per issue slot (two at the default width) and the
// divider's sharing are this design's choices.
module fpcore
  import vt_pkg::*;
#(
  parameter int W       = 2,
  parameter int LATENCY = 4,
  parameter int TW      = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [W-1:0]  in_valid,
  input  opcode_e       op      [W],
  input  logic [31:0]   a       [W],
  input  logic [31:0]   b       [W],
  input  logic [TW-1:0] in_tag  [W],
  output logic [W-1:0]  dp_valid,
  output logic [31:0]   dp_result [W],
  output logic [TW-1:0] dp_tag    [W],
  output logic          div_busy,
  output logic          div_done,
  output logic [31:0]   div_result,
  output logic [TW-1:0] div_tag
);
  for (genvar i = 0; i < W; i++) begin : g_dp
    fp_dp #(.LATENCY(LATENCY), .TW(TW)) u_dp (.clk, .rst_n,
      .in_valid(in_valid[i] && op[i] != OP_FDIV), .op(op[i]), .a(a[i]), .b(b[i]),
      .in_tag(in_tag[i]), .out_valid(dp_valid[i]), .result(dp_result[i]), .out_tag(dp_tag[i]));
  end

  // lowest slot with a division
  logic          d_any;
  logic [31:0]   d_a, d_b;
  logic [TW-1:0] d_t;
  always_comb begin
    d_any = 1'b0; d_a = '0; d_b = '0; d_t = '0;
    for (int i = W - 1; i >= 0; i--)
      if (in_valid[i] && op[i] == OP_FDIV) begin
        d_any = 1'b1; d_a = a[i]; d_b = b[i]; d_t = in_tag[i];
      end
  end

  fdiv #(.TW(TW)) u_div (.clk, .rst_n, .start(d_any), .a(d_a), .b(d_b), .in_tag(d_t),
    .busy(div_busy), .done(div_done), .result(div_result), .out_tag(div_tag));
endmodule
