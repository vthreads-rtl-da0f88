// tb_branch_pred: trains the predictor of two HCs with random branch
// outcomes at a few addresses and compares every lookup with a model of
// the per-HC 2-bit counters (start weakly not-taken) and the shared
// tagged target buffer, including aliasing addresses with other tags.
module tb_branch_pred;
  localparam int NH = 2, ENTRIES = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [0:0] lk_hc = '0, up_hc = '0;
  logic [31:0] lk_pc = '0, up_pc = '0, up_target = '0, lk_target;
  logic lk_taken, up_valid = 0, up_taken = 0;
  int checks = 0, failures = 0;
  int ctr [NH][ENTRIES];
  bit tv [ENTRIES];
  logic [31:0] tpc [ENTRIES], ttgt [ENTRIES];

  branch_pred #(.NH(NH), .ENTRIES(ENTRIES)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] rand_pc();
    return (($urandom % 4) * 32'h100) + (($urandom % 8) * 4);
  endfunction

  initial begin
    for (int h = 0; h < NH; h++) for (int e = 0; e < ENTRIES; e++) ctr[h][e] = 1;
    for (int e = 0; e < ENTRIES; e++) begin tv[e] = 0; tpc[e] = 0; ttgt[e] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      int e; bit wt;
      @(negedge clk);
      lk_hc = 1'($urandom); lk_pc = rand_pc(); #1;
      e = (lk_pc >> 2) % ENTRIES;
      wt = tv[e] && tpc[e][31:8] == lk_pc[31:8] && ctr[lk_hc][e] >= 2;
      checks++;
      if (lk_taken != wt || (wt && lk_target != ttgt[e])) begin
        failures++; $display("FAIL lookup hc%0d pc %h: %b %h", lk_hc, lk_pc, lk_taken, lk_target);
      end
      up_valid = $urandom % 2; up_hc = 1'($urandom); up_pc = rand_pc();
      up_taken = ($urandom % 3) != 0; up_target = rand_pc();
      @(posedge clk);
      if (up_valid) begin
        e = (up_pc >> 2) % ENTRIES;
        if (up_taken) begin
          if (ctr[up_hc][e] < 3) ctr[up_hc][e]++;
          tv[e] = 1; tpc[e] = up_pc; ttgt[e] = up_target;
        end else if (ctr[up_hc][e] > 0) ctr[up_hc][e]--;
      end
      #1 up_valid = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
