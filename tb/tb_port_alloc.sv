// tb_port_alloc: random source usage for a W=2 word; checks that every
// used source gets its own read port holding its register, that ports are
// handed out in slot order, and that overflow is raised only when more
// sources are used than there are ports (forced with R=3).
module tb_port_alloc;
  localparam int W = 2, R = 3;
  logic [W-1:0] use1, use2;
  logic [5:0] reg1 [W], reg2 [W], port_reg [R];
  logic [1:0] map1 [W], map2 [W];
  logic overflow;
  int checks = 0, failures = 0;

  port_alloc #(.W(W), .R(R)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      int n;
      use1 = W'($urandom); use2 = W'($urandom);
      for (int i = 0; i < W; i++) begin reg1[i] = 6'($urandom); reg2[i] = 6'($urandom); end
      #1;
      n = 0;
      for (int i = 0; i < W; i++) begin
        if (use1[i]) begin
          if (n < R) begin
            checks++;
            if (map1[i] != 2'(n) || port_reg[map1[i]] != reg1[i]) begin failures++; $display("FAIL src1 slot %0d", i); end
          end
          n++;
        end
        if (use2[i]) begin
          if (n < R) begin
            checks++;
            if (map2[i] != 2'(n) || port_reg[map2[i]] != reg2[i]) begin failures++; $display("FAIL src2 slot %0d", i); end
          end
          n++;
        end
      end
      checks++;
      if (overflow != (n > R)) begin failures++; $display("FAIL overflow %b with %0d sources", overflow, n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
