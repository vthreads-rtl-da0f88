// ialu: integer ALU with a configurable pipeline latency.
//
// Computes add, subtract, and/or/xor, logical and arithmetic shifts, signed
// and unsigned set-less-than, add-immediate, load-upper and CPUID on two
// 32-bit operands; the result appears LATENCY clocks after `in_valid`
// (LATENCY >= 1), with the tag `in_tag` carried alongside. The operation is
// single-cycle logic followed by LATENCY registers, so a synthesis tool can
// retime the logic across them, which is how the architecture uses the
// latency setting to raise the clock rate. The operation list is this
// design's (see vt_pkg); shifts use the low 5 bits of operand b.
module ialu
  import vt_pkg::*;
#(
  parameter int LATENCY = 1,
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
  logic [31:0] r;
  always_comb
    unique case (op)
      OP_ADD, OP_ADDI: r = a + b;
      OP_SUB:  r = a - b;
      OP_AND:  r = a & b;
      OP_OR:   r = a | b;
      OP_XOR:  r = a ^ b;
      OP_SHL:  r = a << b[4:0];
      OP_SHR:  r = a >> b[4:0];
      OP_SRA:  r = 32'($signed(a) >>> b[4:0]);
      OP_SLT:  r = {31'd0, $signed(a) < $signed(b)};
      OP_SLTU: r = {31'd0, a < b};
      OP_LUI, OP_CPUID: r = b;
      default: r = '0;
    endcase

  logic          v [LATENCY];
  logic [31:0]   d [LATENCY];
  logic [TW-1:0] t [LATENCY];
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int i = 0; i < LATENCY; i++) begin v[i] <= 1'b0; d[i] <= '0; t[i] <= '0; end
    end else begin
      v[0] <= in_valid; d[0] <= r; t[0] <= in_tag;
      for (int i = 1; i < LATENCY; i++) begin v[i] <= v[i-1]; d[i] <= d[i-1]; t[i] <= t[i-1]; end
    end
  assign out_valid = v[LATENCY-1];
  assign result    = d[LATENCY-1];
  assign out_tag   = t[LATENCY-1];
endmodule
