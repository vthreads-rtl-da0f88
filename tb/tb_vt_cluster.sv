// tb_vt_cluster: Cluster of Context 3 with two HCs, fed decoded words
// directly. A behavioural banked memory answers the LSU, and the
// testbench answers thread-primitive and peripheral requests after a few
// clocks. Checks: ALU results written back two clocks after dispatch
// (IALU latency 1 + write-back) and IMULT results three clocks after
// (latency 2 + write-back); CPUID; store then load through the LSU; a
// taken branch that was predicted not taken re-steers the fetch and
// updates the predictor, a correctly predicted one does not re-steer;
// CREATE holds its request until acknowledged and writes back the thread
// id; peripheral reads and writes; the Cluster refuses a new word while
// busy; a word of a stopped HC finishes without waiting for the
// primitive's acknowledge.
module tb_vt_cluster;
  import vt_pkg::*;
  import vt_asm_pkg::*;
  localparam int NH = 2, W = 2, CTX_ID = 3, BANKS = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NH-1:0] hc_live = '1, exec_busy, thr_req, thr_ack = '0;
  logic in_valid = 0, in_ready, wb_valid, redir_valid, bp_up_valid, bp_up_taken;
  logic [0:0] in_h = '0, wb_h, redir_h;
  logic [31:0] in_pc = '0, in_pred = '0, redir_pc, bp_up_pc, bp_up_target;
  logic [2:0] in_len = 3'd2;
  dec_t in_dec [W];
  logic [31:0] in_a [W], in_b [W];
  logic [W-1:0] wb_we;
  logic [5:0] wb_wa [W];
  logic [31:0] wb_wd [W];
  thr_op_e thr_op;
  logic [31:0] thr_a, thr_b, thr_result = '0;
  logic per_req, per_we, per_ack = 0;
  logic [7:0] per_addr;
  logic [31:0] per_wdata, per_rdata = '0;
  logic [BANKS-1:0] m_req, m_we, m_gnt, m_rvalid = '0;
  logic [31:0] m_addr [BANKS], m_wdata [BANKS], m_rdata [BANKS];
  logic ev_issue, ev_mispredict, ev_lsu_stall;
  logic [3:0] ev_syllables;
  int checks = 0, failures = 0;
  logic [31:0] mem [1024];
  logic [31:0] syl [W];
  dec_t dd [W];
  logic bad [W];

  vt_cluster #(.NH(NH), .W(W), .CTX_ID(CTX_ID), .BANKS(BANKS)) dut (.*);
  for (genvar i = 0; i < W; i++) begin : g_d
    declogic u_d (.valid(1'b1), .syll(syl[i]), .d(dd[i]), .bad_op(bad[i]));
  end

  // memory: grant at once, read data next clock
  assign m_gnt = m_req;
  always @(posedge clk) for (int b = 0; b < BANKS; b++) begin
    m_rvalid[b] <= m_req[b] && !m_we[b];
    if (m_req[b] && !m_we[b]) m_rdata[b] <= mem[m_addr[b][11:2]];
    if (m_req[b] && m_we[b]) mem[m_addr[b][11:2]] <= m_wdata[b];
  end
  // peripheral: acknowledge two clocks after the request
  int per_cnt = 0;
  logic [31:0] per_last_w = '0;
  always @(posedge clk) begin
    per_ack <= 0;
    if (per_req && !per_ack) begin
      per_cnt++;
      if (per_cnt == 2) begin
        per_ack <= 1; per_rdata <= {24'hABCDEF, per_addr}; per_cnt = 0;
        if (per_we) per_last_w <= per_wdata;
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // dispatch a word; returns clocks to write-back and the write-back values
  logic [31:0] got [W];
  logic [W-1:0] got_we;
  bit saw_redir, saw_upd;
  logic [31:0] saw_redir_pc;
  task automatic run(int h, logic [31:0] s0, logic [31:0] s1, logic [31:0] a0, logic [31:0] b0,
                     logic [31:0] a1, logic [31:0] b1, logic [31:0] pc, logic [31:0] pred,
                     output int clocks);
    @(negedge clk);
    syl[0] = s0; syl[1] = s1; #1;
    in_valid = 1; in_h = 1'(h); in_pc = pc; in_pred = pred; in_len = 2;
    in_dec[0] = dd[0]; in_dec[1] = dd[1];
    in_a[0] = a0; in_b[0] = b0; in_a[1] = a1; in_b[1] = b1;
    chk(in_ready, "ready for a word");
    @(negedge clk); in_valid = 0;
    clocks = 1; saw_redir = 0; saw_upd = 0;
    while (!wb_valid && clocks < 100) begin
      chk(!in_ready && exec_busy[h], "busy while executing");
      @(negedge clk); clocks++;
    end
    for (int i = 0; i < W; i++) got[i] = wb_wd[i];
    got_we = wb_we;
    saw_redir = redir_valid; saw_redir_pc = redir_pc; saw_upd = bp_up_valid;
    chk(wb_h == 1'(h), "write-back HC");
  endtask

  int n;
  initial begin
    for (int i = 0; i < 1024; i++) mem[i] = 0;
    for (int i = 0; i < W; i++) begin syl[i] = 0; in_dec[i] = '0; in_a[i] = 0; in_b[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // ALU word
    for (int t = 0; t < 20; t++) begin
      logic [31:0] x, y;
      x = $urandom; y = $urandom;
      run(t % 2, s_rrr(OP_ADD, 5, 1, 2), s_rrr(OP_XOR, 6, 3, 4), x, y, y, x, 0, 8, n);
      chk(n == 2 && got_we == 2'b11 && got[0] == x + y && got[1] == (x ^ y),
          $sformatf("ALU word: %0d clocks", n));
    end
    // IMULT word
    run(0, s_rrr(OP_MUL, 5, 1, 2), s_rrr(OP_MULHU, 6, 1, 2), 32'h12345, 32'h6789A, 32'hFFFF_FFFF, 32'h10, 0, 8, n);
    chk(n == 3 && got[0] == 32'h12345 * 32'h6789A && got[1] == 32'hF, $sformatf("IMULT word: %0d clocks", n));
    // CPUID on HC 1
    run(1, s_rrr(OP_CPUID, 7, 0, 0), s_rrr(OP_NOP, 0, 0, 0), 0, 0, 0, 0, 0, 8, n);
    chk(got[0] == (CTX_ID << 4 | 1) && got_we == 2'b01, "CPUID");
    // store then load
    run(0, s_rri(OP_STW, 9, 1, 8), s_rrr(OP_NOP, 0, 0, 0), 32'h100, 32'hDEAD_BEEF, 0, 0, 0, 8, n);
    chk(mem[(32'h108) >> 2] == 32'hDEAD_BEEF && got_we == 0, "store");
    run(0, s_rri(OP_LDW, 9, 1, 4), s_rri(OP_ADDI, 10, 2, 1), 32'h104, 0, 5, 0, 0, 8, n);
    chk(got[0] == 32'hDEAD_BEEF && got[1] == 6 && got_we == 2'b11, "load and ALU in one word");
    // branches: taken but predicted not taken -> redirect
    run(0, s_rri(OP_BNEZ, 0, 1, 16), s_rrr(OP_NOP, 0, 0, 0), 1, 0, 0, 0, 32'h40, 32'h48, n);
    chk(saw_redir && saw_redir_pc == 32'h40 + 64 && saw_upd, "mispredicted branch re-steers");
    run(0, s_rri(OP_BNEZ, 0, 1, 16), s_rrr(OP_NOP, 0, 0, 0), 0, 0, 0, 0, 32'h40, 32'h48, n);
    chk(!saw_redir && saw_upd, "correctly predicted branch");
    // CREATE: request held until acknowledged after 5 clocks
    fork
      run(1, s_rrr(OP_CREATE, 11, 1, 2), s_rri(OP_ADDI, 12, 0, 3), 32'h200, 32'h7, 0, 0, 0, 8, n);
      begin
        int k; k = 0;
        @(negedge clk);
        while (k < 5) begin @(negedge clk); chk(thr_req == 2'b10, "request held"); k++; end
        chk(thr_op == TOP_CREATE && thr_a == 32'h200 && thr_b == 32'h7, "create operands");
        thr_ack = 2'b10; thr_result = 32'h0000_0050;
        @(negedge clk); thr_ack = 0;
      end
    join
    chk(got[0] == 32'h50 && got[1] == 3, "create result written back");
    // peripheral write and read
    run(0, s_rri(OP_WRPERIPH, 4, 1, 2), s_rrr(OP_NOP, 0, 0, 0), 32'h10, 32'h77, 0, 0, 0, 8, n);
    chk(per_last_w == 32'h77, "peripheral write");
    run(0, s_rri(OP_RDPERIPH, 4, 1, 3), s_rrr(OP_NOP, 0, 0, 0), 32'h10, 0, 0, 0, 0, 8, n);
    chk(got[0] == 32'hABCDEF13, "peripheral read at rs1 + imm");
    // a stopped HC does not wait for its primitive
    fork
      run(0, s_rrr(OP_JOIN, 0, 1, 0), s_rrr(OP_NOP, 0, 0, 0), 32'h10, 0, 0, 0, 0, 8, n);
      begin repeat (4) @(negedge clk); hc_live = 2'b10; end
    join
    chk(n <= 6, "stopped HC releases the Cluster");
    hc_live = 2'b11;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
