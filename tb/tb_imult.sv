// tb_imult: random MUL/MULHU operations against 64-bit products computed
// in the testbench, issued back to back; each result and its tag must
// appear exactly LATENCY clocks (2 by default) after its operation.
module tb_imult;
  import vt_pkg::*;
  localparam int LATENCY = 2, TW = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, out_valid;
  opcode_e op = OP_MUL;
  logic [31:0] a = '0, b = '0, result;
  logic [TW-1:0] in_tag = '0, out_tag;
  int checks = 0, failures = 0;
  logic [31:0] want_q [$];
  int cyc = 0, sent_at [$];

  imult #(.LATENCY(LATENCY), .TW(TW)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (out_valid) begin
      logic [31:0] w; int s;
      checks++;
      w = want_q.pop_front(); s = sent_at.pop_front();
      if (result != w || cyc - s != LATENCY) begin
        failures++; $display("FAIL got %h want %h after %0d clocks", result, w, cyc - s);
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      logic [63:0] p;
      @(negedge clk);
      in_valid = ($urandom % 4) != 0;
      op = ($urandom % 2) ? OP_MUL : OP_MULHU;
      a = $urandom; b = (t % 9 == 0) ? 32'hFFFF_FFFF : $urandom;
      in_tag = TW'(t);
      p = {32'd0, a} * {32'd0, b};
      if (in_valid) begin
        want_q.push_back(op == OP_MULHU ? p[63:32] : p[31:0]);
        sent_at.push_back(cyc + 1);
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (LATENCY + 2) @(posedge clk);
    checks++; if (want_q.size() != 0) begin failures++; $display("FAIL missing results"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
