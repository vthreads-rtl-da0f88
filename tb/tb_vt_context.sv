// tb_vt_context: one Context with two HCs runs a small program on both
// HCs at once, from IRAM loaded through the host write port. The
// testbench stands in for the thread manager (it starts the HCs, answers
// their exit requests and moves their states) and for the DRAM (a banked
// behavioural memory). Each HC sums a counted loop (branch prediction,
// mispredicts, bypass), multiplies by its argument, reads its CPUID and
// its stack pointer, stores the three results on its stack and exits.
// Checks the stored values, that both HCs exit, that both ran
// interleaved, and the Context's event outputs.
module tb_vt_context;
  import vt_pkg::*;
  import vt_asm_pkg::*;
  localparam int NH = 2, W = 2, CTX_ID = 5, BANKS = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  hc_state_e hc_state [NH];
  logic start_valid = 0, iram_we = 0;
  logic [0:0] start_h = '0;
  logic [31:0] start_pc = '0, start_sp = '0, start_arg = '0, iram_addr = '0, iram_wdata = '0;
  logic [NH-1:0] thr_req, thr_ack = '0;
  thr_op_e thr_op;
  logic [31:0] thr_a, thr_b, thr_result = '0;
  logic per_req, per_we, per_ack = 0;
  logic [7:0] per_addr;
  logic [31:0] per_wdata, per_rdata = '0;
  logic [BANKS-1:0] m_req, m_we, m_gnt, m_rvalid = '0;
  logic [31:0] m_addr [BANKS], m_wdata [BANKS], m_rdata [BANKS];
  logic [7:0] events;
  int checks = 0, failures = 0, ev_cnt [8];
  logic [31:0] mem [1024];
  logic [31:0] prog [$];

  vt_context #(.NH(NH), .W(W), .CTX_ID(CTX_ID), .IRAM_BYTES(1024), .BANKS(BANKS)) dut (.*);

  assign m_gnt = m_req & BANKS'($urandom);
  always @(posedge clk) for (int b = 0; b < BANKS; b++) begin
    m_rvalid[b] <= m_req[b] && m_gnt[b] && !m_we[b];
    if (m_req[b] && m_gnt[b] && !m_we[b]) m_rdata[b] <= mem[m_addr[b][11:2]];
    if (m_req[b] && m_gnt[b] && m_we[b]) mem[m_addr[b][11:2]] <= m_wdata[b];
  end
  always @(posedge clk) for (int e = 0; e < 8; e++) if (events[e]) ev_cnt[e]++;

  // thread manager stand-in: EXIT -> TERM_SYNC -> READY
  int n_exit = 0;
  always @(posedge clk) if (rst_n) begin
    thr_ack <= '0;
    for (int h = 0; h < NH; h++) begin
      if (hc_state[h] == HC_TERM_SYNC) hc_state[h] <= HC_READY;
      if (thr_req[h] && !thr_ack[h] && thr_op == TOP_EXIT && hc_state[h] == HC_RUNNING) begin
        thr_ack[h] <= 1'b1; hc_state[h] <= HC_TERM_SYNC; n_exit++;
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
  task automatic b1(logic [31:0] s0); prog.push_back(stop(s0)); endtask
  task automatic b2(logic [31:0] s0, logic [31:0] s1); prog.push_back(s0); prog.push_back(stop(s1)); endtask

  int sum_exp;
  initial begin
    for (int h = 0; h < NH; h++) hc_state[h] = HC_READY;
    for (int i = 0; i < 1024; i++) mem[i] = 0;
    for (int e = 0; e < 8; e++) ev_cnt[e] = 0;
    for (int b = 0; b < BANKS; b++) m_rdata[b] = 0;
    // r5 = 10 + arg, r6 = 0; loop: r6 += r5, r5 -= 1 (syllable offset -2 back to the loop)
    b2(s_rri(OP_ADDI, 5, 3, 10), s_rri(OP_ADDI, 6, 0, 0));
    b2(s_rrr(OP_ADD, 6, 6, 5), s_rri(OP_ADDI, 5, 5, -1));
    b1(s_rri(OP_BNEZ, 0, 5, -2));
    b2(s_rrr(OP_MUL, 7, 6, 3), s_rrr(OP_CPUID, 8, 0, 0));
    b1(s_rrr(OP_ADD, 9, 1, 0));
    b1(s_rri(OP_STW, 6, 9, 0));
    b1(s_rri(OP_STW, 7, 9, 4));
    b1(s_rri(OP_STW, 8, 9, 8));
    b1(s_rrr(OP_EXIT, 0, 0, 0));
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (prog[i]) begin
      @(negedge clk); iram_we = 1; iram_addr = i * 4; iram_wdata = prog[i];
    end
    @(negedge clk); iram_we = 0;
    for (int h = 0; h < NH; h++) begin
      @(negedge clk);
      hc_state[h] = HC_RUNNING;
      start_valid = 1; start_h = 1'(h); start_pc = 0; start_sp = 32'h100 + 32'h40 * h; start_arg = h + 2;
    end
    @(negedge clk); start_valid = 0;
    while (n_exit < NH) @(negedge clk);
    repeat (3) @(negedge clk);
    for (int h = 0; h < NH; h++) begin
      sum_exp = (12 + h) * (13 + h) / 2;
      chk(mem[(32'h100 + 32'h40 * h) / 4] == sum_exp, $sformatf("hc%0d loop sum %0d", h, mem[(32'h100 + 32'h40 * h) / 4]));
      chk(mem[(32'h104 + 32'h40 * h) / 4] == sum_exp * (h + 2), "product");
      chk(mem[(32'h108 + 32'h40 * h) / 4] == (CTX_ID << 4 | h), "CPUID");
      chk(hc_state[h] == HC_READY, "HC back to READY");
    end
    $display("events: issue %0d syl %0d mis %0d lsu %0d byp %0d fetch %0d ptaken %0d bad %0d",
             ev_cnt[0], ev_cnt[1], ev_cnt[2], ev_cnt[3], ev_cnt[4], ev_cnt[5], ev_cnt[6], ev_cnt[7]);
    chk(ev_cnt[0] >= 2 * 30 && ev_cnt[2] > 0 && ev_cnt[3] > 0 && ev_cnt[4] > 0 && ev_cnt[6] > 0 &&
        ev_cnt[7] == 0 && ev_cnt[5] >= ev_cnt[0], "event counts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
