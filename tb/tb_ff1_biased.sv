// tb_ff1_biased: checks the biased find-first-one against a reference
// search on random vectors and starting points, plus the empty vector.
// Combinational block: outputs are sampled 1 ns after the inputs change.
module tb_ff1_biased;
  localparam int N = 8, IW = 3;
  logic [N-1:0] vec;
  logic [IW-1:0] start, idx;
  logic found;
  int checks = 0, failures = 0;

  ff1_biased #(.N(N), .IW(IW)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vec = '0; start = '0;
    for (int t = 0; t < 600; t++) begin
      bit ef; int ei;
      vec   = (t < 8) ? '0 : N'($urandom);
      if (t % 5 == 0) vec = N'(1) << ($urandom % N);
      start = IW'($urandom);
      #1;
      ef = 0; ei = 0;
      for (int k = 0; k < N; k++)
        if (!ef && vec[(int'(start) + k) % N]) begin ef = 1; ei = (int'(start) + k) % N; end
      checks++;
      if (found !== ef || (ef && idx != IW'(ei))) begin
        failures++;
        $display("FAIL vec=%b start=%0d got %0b/%0d want %0b/%0d", vec, start, found, idx, ef, ei);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
