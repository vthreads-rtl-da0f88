// tb_bru: checks the branch unit's resolved next address, taken flag,
// mispredict flag and predictor update flag for BNEZ, BEQZ and GOTO with
// random operands and predictions, and for non-branch words.
module tb_bru;
  import vt_pkg::*;
  logic valid;
  opcode_e op;
  logic [31:0] a, imm, pc, pred_next, next_pc;
  logic [2:0] len;
  logic taken, mispredict, upd_valid;
  int checks = 0, failures = 0;

  bru dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 600; t++) begin
      bit wt; logic [31:0] wn;
      case ($urandom % 4)
        0: op = OP_BNEZ; 1: op = OP_BEQZ; 2: op = OP_GOTO; default: op = OP_ADD;
      endcase
      valid = (op != OP_ADD) || ($urandom % 2);
      a   = ($urandom % 2) ? 0 : $urandom;
      imm = 32'($signed(12'($urandom)) * 4);
      pc  = ($urandom % 4096) * 4;
      len = 3'(1 + $urandom % 2);
      wt  = valid && ((op == OP_BNEZ && a != 0) || (op == OP_BEQZ && a == 0) || op == OP_GOTO);
      wn  = wt ? pc + imm : pc + 4 * len;
      case ($urandom % 3)
        0: pred_next = wn;
        1: pred_next = pc + 4 * len;
        default: pred_next = pc + imm;
      endcase
      #1;
      checks++;
      if (taken != wt || next_pc != wn || mispredict != (pred_next != wn) ||
          upd_valid != (valid && op != OP_ADD)) begin
        failures++;
        $display("FAIL %s a=%h pc=%h imm=%h: taken %b next %h mis %b", op.name(), a, pc, imm,
                 taken, next_pc, mispredict);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
