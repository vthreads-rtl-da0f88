// declogic: decoder of one syllable (RISCop).
//
// Combinational. Turns a 32-bit syllable into the control fields that
// schedule the rest of the pipeline: the execution unit (IALU, IMULT, LSU,
// BRU, thread primitive, peripheral access), the register sources (up to
// two here) and destination, and the sign-extended immediate. `valid`
// qualifies the slot (slots beyond the LIW length are not valid).
//
// The architecture has one such decoder per issue slot feeding a
// per-bundle read-port allocator; that arrangement is kept. The syllable
// format (see vt_pkg) is this design's own, as the binary encoding of the
// 32-bit partially-predicated ISA is not published; predicates, vector
// registers and the 64-bit multi-operand custom syllables are not decoded.
module declogic
  import vt_pkg::*;
(
  input  logic        valid,
  input  logic [31:0] syll,
  output dec_t        d,
  output logic        bad_op
);
  opcode_e op;
  assign op = opcode_e'(syll[30:25]);

  always_comb begin
    d          = '0;
    bad_op     = 1'b0;
    d.valid    = valid;
    d.op       = op;
    d.rd       = syll[24:19];
    d.rs1      = syll[18:13];
    d.rs2      = syll[12:7];
    d.imm      = {{19{syll[12]}}, syll[12:0]};
    unique case (op)
      OP_NOP: d.unit = U_NONE;
      OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SHL, OP_SHR, OP_SRA, OP_SLT, OP_SLTU: begin
        d.unit = U_ALU; d.rs1_used = 1'b1; d.rs2_used = 1'b1; d.rd_used = 1'b1;
      end
      OP_ADDI: begin
        d.unit = U_ALU; d.rs1_used = 1'b1; d.rd_used = 1'b1; d.use_imm = 1'b1;
      end
      OP_LUI: begin
        d.unit = U_ALU; d.rd_used = 1'b1; d.use_imm = 1'b1;
        d.imm  = {syll[18:0], 13'd0};
      end
      OP_MUL, OP_MULHU: begin
        d.unit = U_MUL; d.rs1_used = 1'b1; d.rs2_used = 1'b1; d.rd_used = 1'b1;
      end
      OP_LDW: begin
        d.unit = U_LSU; d.rs1_used = 1'b1; d.rd_used = 1'b1; d.use_imm = 1'b1;
      end
      OP_STW: begin   // store data comes from the rd field
        d.unit = U_LSU; d.rs1_used = 1'b1; d.rs2_used = 1'b1; d.rs2 = syll[24:19];
        d.use_imm = 1'b1;
      end
      OP_BNEZ, OP_BEQZ: begin
        d.unit = U_BRU; d.rs1_used = 1'b1; d.use_imm = 1'b1;
        d.imm  = {{17{syll[12]}}, syll[12:0], 2'b00};   // offset in syllables
      end
      OP_GOTO: begin
        d.unit = U_BRU; d.use_imm = 1'b1;
        d.imm  = {{11{syll[18]}}, syll[18:0], 2'b00};
      end
      OP_CREATE: begin  // rd = create(pc = rs1, arg = rs2)
        d.unit = U_THR; d.rs1_used = 1'b1; d.rs2_used = 1'b1; d.rd_used = 1'b1;
      end
      OP_JOIN: begin    // join(thread id in rs1)
        d.unit = U_THR; d.rs1_used = 1'b1;
      end
      OP_EXIT:  d.unit = U_THR;
      OP_CPUID: begin d.unit = U_ALU; d.rd_used = 1'b1; end
      OP_RDPERIPH: begin  // rd = periph[rs1 + imm]
        d.unit = U_PER; d.rs1_used = 1'b1; d.rd_used = 1'b1; d.use_imm = 1'b1;
      end
      OP_WRPERIPH: begin  // periph[rs1 + imm] = rd field register
        d.unit = U_PER; d.rs1_used = 1'b1; d.rs2_used = 1'b1; d.rs2 = syll[24:19];
        d.use_imm = 1'b1;
      end
      OP_FADD, OP_FSUB, OP_FMUL, OP_FDIV: begin
        d.unit = U_FP; d.rs1_used = 1'b1; d.rs2_used = 1'b1; d.rd_used = 1'b1;
      end
      OP_ITOF: begin d.unit = U_FP; d.rs1_used = 1'b1; d.rd_used = 1'b1; end
      default: begin d.unit = U_NONE; bad_op = valid; end
    endcase
    if (!valid) begin
      d.unit = U_NONE; d.rs1_used = 1'b0; d.rs2_used = 1'b0; d.rd_used = 1'b0;
    end
    // r0 reads as zero and is never written
    if (d.rd == '0) d.rd_used = 1'b0;
  end
endmodule
