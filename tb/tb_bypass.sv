// tb_bypass: random read addresses, register-file values and write-back
// ports; every operand must be the write-back value when a write port
// targets its register (never for r0) and the register-file value
// otherwise, and `hits` must count the bypassed operands.
module tb_bypass;
  localparam int R = 4, WP = 2;
  logic [5:0] ra [R], wb_wa [WP];
  logic [31:0] rf_val [R], wb_wd [WP], op_val [R];
  logic [WP-1:0] wb_we;
  logic [2:0] hits;
  int checks = 0, failures = 0;

  bypass #(.R(R), .WP(WP)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 800; t++) begin
      int nh;
      for (int p = 0; p < R; p++) begin ra[p] = 6'($urandom % 8); rf_val[p] = $urandom; end
      for (int w = 0; w < WP; w++) begin wb_wa[w] = 6'($urandom % 8); wb_wd[w] = $urandom; end
      wb_we = WP'($urandom);
      #1;
      nh = 0;
      for (int p = 0; p < R; p++) begin
        logic [31:0] want; bit h;
        want = rf_val[p]; h = 0;
        for (int w = 0; w < WP; w++)
          if (wb_we[w] && wb_wa[w] == ra[p] && ra[p] != 0) begin want = wb_wd[w]; h = 1; end
        nh += h;
        checks++;
        if (op_val[p] != want) begin failures++; $display("FAIL port %0d", p); end
      end
      checks++;
      if (hits != 3'(nh)) begin failures++; $display("FAIL hits %0d want %0d", hits, nh); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
