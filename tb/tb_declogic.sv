// tb_declogic: decodes one syllable of every opcode with random fields and
// checks the unit, the register fields and their use flags, the immediate
// (sign-extended, scaled for branches, shifted for LUI), the store-data
// source, r0 as destination, invalid slots and unknown opcodes.
module tb_declogic;
  import vt_pkg::*;
  import vt_asm_pkg::*;
  logic valid;
  logic [31:0] syll;
  dec_t d;
  logic bad_op;
  int checks = 0, failures = 0;

  declogic dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (syll %h)", what, syll); end
  endtask

  opcode_e alu_ops [10] = '{OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SHL, OP_SHR, OP_SRA, OP_SLT, OP_SLTU};
  initial begin
    for (int t = 0; t < 200; t++) begin
      int rd, rs1, rs2, imm;
      rd = 1 + $urandom % 63; rs1 = $urandom % 64; rs2 = $urandom % 64;
      imm = int'($signed(13'($urandom)));
      valid = 1;
      syll = s_rrr(alu_ops[t % 10], rd, rs1, rs2); #1;
      expect_("alu", d.unit == U_ALU && d.rs1_used && d.rs2_used && d.rd_used &&
              d.rd == 6'(rd) && d.rs1 == 6'(rs1) && d.rs2 == 6'(rs2) && !d.use_imm && !bad_op);
      syll = s_rri(OP_ADDI, rd, rs1, imm); #1;
      expect_("addi", d.unit == U_ALU && d.use_imm && d.imm == 32'(imm) && !d.rs2_used);
      syll = s_i19(OP_LUI, rd, imm & 32'h7FFFF); #1;
      expect_("lui", d.unit == U_ALU && d.imm == {19'(imm), 13'd0} && !d.rs1_used);
      syll = s_rrr(OP_MUL, rd, rs1, rs2); #1;
      expect_("mul", d.unit == U_MUL && d.rd_used);
      syll = s_rri(OP_LDW, rd, rs1, imm); #1;
      expect_("ldw", d.unit == U_LSU && d.rd_used && d.rs1_used && d.imm == 32'(imm));
      syll = s_rri(OP_STW, rd, rs1, imm); #1;
      expect_("stw", d.unit == U_LSU && !d.rd_used && d.rs2_used && d.rs2 == 6'(rd));
      syll = s_rri(OP_BNEZ, 0, rs1, imm); #1;
      expect_("bnez", d.unit == U_BRU && d.rs1_used && d.imm == 32'(imm * 4));
      syll = s_i19(OP_GOTO, 0, imm); #1;
      expect_("goto", d.unit == U_BRU && !d.rs1_used && d.imm == 32'(imm * 4));
      syll = s_rrr(OP_CREATE, rd, rs1, rs2); #1;
      expect_("create", d.unit == U_THR && d.rd_used && d.rs1_used && d.rs2_used);
      syll = s_rrr(OP_JOIN, 0, rs1, 0); #1;
      expect_("join", d.unit == U_THR && d.rs1_used && !d.rd_used);
      syll = s_rri(OP_WRPERIPH, rd, rs1, imm); #1;
      expect_("wrperiph", d.unit == U_PER && d.rs2 == 6'(rd) && !d.rd_used);
      syll = s_rri(OP_ADDI, 0, rs1, imm); #1;
      expect_("r0 never written", !d.rd_used);
      syll = s_rrr(opcode_e'(6'd60), rd, rs1, rs2); #1;
      expect_("bad opcode", bad_op && d.unit == U_NONE);
      valid = 0; syll = s_rrr(OP_ADD, rd, rs1, rs2); #1;
      expect_("invalid slot", d.unit == U_NONE && !d.rd_used && !d.rs1_used && !bad_op);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
