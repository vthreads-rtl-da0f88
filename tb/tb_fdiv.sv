// tb_fdiv: self-checking test of the iterative floating-point divider.
//
// Runs random divisions of normal numbers (with exponents that keep the
// quotient normal), quotients that overflow or underflow, equal mantissas
// (exact results), and the special operands (zeros, infinities, NaN).
// Each quotient is compared with the double-precision reference of
// fp_ref_pkg. It also checks the timing: `done` exactly 30 clocks after
// `start`, `busy` for the whole operation, and that a `start` while busy
// is ignored.
module tb_fdiv;
  import fp_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, busy, done;
  logic [31:0] a = 0, b = 0, result;
  logic [7:0] in_tag = 0, out_tag;
  int checks = 0, failures = 0;

  fdiv #(.TW(8)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic divide(logic [31:0] x, logic [31:0] y);
    int n;
    logic [31:0] want;
    want = ref_op(4, x, y);
    @(negedge clk); start = 1; a = x; b = y; in_tag = 8'($urandom);
    @(negedge clk);
    // a second start while busy must be ignored
    a = 32'h3F80_0000; b = 32'h4000_0000;
    @(negedge clk); start = 0;
    n = 2;
    while (!done) begin
      chk(busy, "busy while dividing");
      @(negedge clk); n++;
    end
    chk(n == 30, $sformatf("latency %0d", n));
    chk(result == want, $sformatf("%h / %h: got %h want %h", x, y, result, want));
    @(negedge clk);
    chk(!busy && !done, "idle after done");
  endtask

  logic [31:0] x, y;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    divide(32'h4040_0000, 32'h4000_0000);   // 3 / 2
    divide(32'h3F80_0000, 32'h4040_0000);   // 1 / 3
    divide(32'h0000_0000, 32'h0000_0000);
    divide(32'h7F80_0000, 32'hFF80_0000);
    divide(32'hC000_0000, 32'h0000_0000);
    divide(32'h0000_0000, 32'h4000_0000);
    divide(32'h4000_0000, 32'h7F80_0000);
    divide(32'h7FC0_0000, 32'h4000_0000);
    divide(32'h7F00_0000, 32'h0080_0000);   // overflow
    divide(32'h0080_0000, 32'h7F00_0000);   // underflow
    for (int n = 0; n < 400; n++) begin
      x = rnd_fp(100, 154); y = rnd_fp(100, 154);
      if (n % 10 == 0) y[22:0] = x[22:0];
      divide(x, y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
