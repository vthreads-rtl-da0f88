// bru: branch unit of the Cluster.
//
// Resolves the control transfer of one long instruction word: BNEZ/BEQZ
// test a register against zero and branch to the bundle address plus a
// syllable offset; GOTO branches unconditionally. Without a branch the next
// address is the bundle address plus 4 x its length. The unit compares the
// resolved next address with the one the fetch engine predicted and
// signals `mispredict` with the correct address `redirect_pc`, which
// re-steers the HC's program counter, and gives the predictor its update
// (conditional branches only). Combinational. Re-steering and predictor
// validation follow the architecture; the branch forms are this design's.
module bru
  import vt_pkg::*;
(
  input  logic        valid,        // the bundle holds a branch syllable
  input  opcode_e     op,
  input  logic [31:0] a,            // tested register
  input  logic [31:0] imm,          // byte offset
  input  logic [31:0] pc,           // bundle address
  input  logic [2:0]  len,          // bundle length in syllables
  input  logic [31:0] pred_next,    // next address used by the fetch engine
  output logic [31:0] next_pc,
  output logic        taken,
  output logic        mispredict,
  output logic        upd_valid
);
  always_comb begin
    taken = 1'b0;
    if (valid)
      unique case (op)
        OP_BNEZ: taken = (a != '0);
        OP_BEQZ: taken = (a == '0);
        OP_GOTO: taken = 1'b1;
        default: taken = 1'b0;
      endcase
    next_pc    = taken ? pc + imm : pc + 32'({len, 2'b00});
    mispredict = (next_pc != pred_next);
    upd_valid  = valid && (op == OP_BNEZ || op == OP_BEQZ || op == OP_GOTO);
  end
endmodule
