// tb_gprf: random writes on all write ports and reads on all read ports
// against a register model: reads are combinational and see the value
// written in an earlier clock; r0 always reads zero; a later write port
// wins when two ports write the same register in one clock.
module tb_gprf;
  localparam int NREG = 64, R = 4, WP = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [5:0] ra [R], wa [WP];
  logic [31:0] rd [R], wd [WP];
  logic [WP-1:0] we = '0;
  logic [31:0] model [NREG];
  int checks = 0, failures = 0;

  gprf #(.NREG(NREG), .R(R), .WP(WP)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NREG; i++) model[i] = 0;
    for (int p = 0; p < R; p++) ra[p] = '0;
    for (int p = 0; p < WP; p++) begin wa[p] = '0; wd[p] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      for (int p = 0; p < R; p++) ra[p] = 6'($urandom);
      for (int p = 0; p < WP; p++) begin
        we[p] = $urandom % 2; wa[p] = (t % 5 == 0) ? 6'(p) : 6'($urandom % 16); wd[p] = $urandom;
      end
      #1;
      for (int p = 0; p < R; p++) begin
        checks++;
        if (rd[p] != model[ra[p]]) begin
          failures++; $display("FAIL r%0d = %h, want %h", ra[p], rd[p], model[ra[p]]);
        end
      end
      @(posedge clk);
      for (int p = 0; p < WP; p++) if (we[p] && wa[p] != 0) model[wa[p]] = wd[p];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
