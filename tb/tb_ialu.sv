// tb_ialu: random operands for every ALU operation against a reference
// computed in the testbench; checks that the result and tag appear exactly
// LATENCY clocks after the operation is presented (1 by default).
module tb_ialu;
  import vt_pkg::*;
  localparam int LATENCY = 1, TW = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, out_valid;
  opcode_e op = OP_ADD;
  logic [31:0] a = '0, b = '0, result;
  logic [TW-1:0] in_tag = '0, out_tag;
  int checks = 0, failures = 0;

  ialu #(.LATENCY(LATENCY), .TW(TW)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_op(opcode_e o, logic [31:0] x, logic [31:0] y);
    case (o)
      OP_ADD, OP_ADDI: return x + y;
      OP_SUB:  return x - y;
      OP_AND:  return x & y;
      OP_OR:   return x | y;
      OP_XOR:  return x ^ y;
      OP_SHL:  return x << (y % 32);
      OP_SHR:  return x >> (y % 32);
      OP_SRA:  return (x >> (y % 32)) | ((x[31] && y % 32 != 0) ? ~(32'hFFFF_FFFF >> (y % 32)) : 0);
      OP_SLT:  return (int'(x) < int'(y)) ? 1 : 0;
      OP_SLTU: return (x < y) ? 1 : 0;
      default: return y;   // LUI, CPUID pass the immediate / id
    endcase
  endfunction

  opcode_e ops [13] = '{OP_ADD, OP_ADDI, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SHL, OP_SHR,
                        OP_SRA, OP_SLT, OP_SLTU, OP_LUI, OP_CPUID};
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      logic [31:0] want;
      @(negedge clk);
      in_valid = 1; op = ops[$urandom % 13]; a = $urandom; b = $urandom;
      if (t % 7 == 0) b = $urandom % 40;
      in_tag = TW'(t);
      want = ref_op(op, a, b);
      @(negedge clk); in_valid = 0;
      for (int l = 1; l < LATENCY; l++) begin
        checks++; if (out_valid) begin failures++; $display("FAIL early result"); end
        @(negedge clk);
      end
      checks++;
      if (!out_valid || result != want || out_tag != TW'(t)) begin
        failures++; $display("FAIL %s a=%h b=%h got %h want %h", op.name(), a, b, result, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
