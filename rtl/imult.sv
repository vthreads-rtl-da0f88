// imult: pipelined integer multiplier with a configurable latency.
//
// 32x32 unsigned multiply; OP_MUL returns the low word and OP_MULHU the
// high word of the 64-bit product. The product appears LATENCY clocks after
// `in_valid` (LATENCY >= 1) with `in_tag` carried alongside; a new
// operation may start every clock. The architecture instantiates a vendor
// multiplier with an explicit latency annotation; here the product is
// formed in one level of logic followed by LATENCY registers that a
// synthesis tool can retime. Low/high selection is this design's.
module imult
  import vt_pkg::*;
#(
  parameter int LATENCY = 2,
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
  logic [63:0] p;
  assign p = 64'(a) * 64'(b);

  logic          v [LATENCY];
  logic [31:0]   d [LATENCY];
  logic [TW-1:0] t [LATENCY];
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int i = 0; i < LATENCY; i++) begin v[i] <= 1'b0; d[i] <= '0; t[i] <= '0; end
    end else begin
      v[0] <= in_valid; d[0] <= (op == OP_MULHU) ? p[63:32] : p[31:0]; t[0] <= in_tag;
      for (int i = 1; i < LATENCY; i++) begin v[i] <= v[i-1]; d[i] <= d[i-1]; t[i] <= t[i-1]; end
    end
  assign out_valid = v[LATENCY-1];
  assign result    = d[LATENCY-1];
  assign out_tag   = t[LATENCY-1];
endmodule
