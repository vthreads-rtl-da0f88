// tb_vt_midpipe: Mid-Pipe with two HCs and 2-issue words. Random words of
// ALU, load/store and branch syllables arrive for random HCs while random
// write-backs update the register files (sometimes in the same clock, to
// exercise the bypass). The testbench keeps a register model per HC and,
// for every word the Mid-Pipe accepts, the operands it must carry; it
// checks each issued word (HC, address, decoded units and registers,
// operand values), that an HC with a queued or executing word is blocked
// and not accepted, that a thread start loads r1 (stack pointer) and r3
// (argument), and that a word is issued one clock after it is accepted.
module tb_vt_midpipe;
  import vt_pkg::*;
  import vt_asm_pkg::*;
  localparam int NH = 2, W = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NH-1:0] hc_run = '1, blocked, exec_busy = '0;
  logic in_valid = 0, in_ready, start_valid = 0, iss_valid, iss_ready = 0, wb_valid = 0;
  logic ev_bypass, ev_bad_op;
  logic [0:0] in_h = '0, start_h = '0, iss_h, wb_h = '0;
  logic [31:0] in_pc = '0, in_pred = '0, start_sp = '0, start_arg = '0, iss_pc, iss_pred;
  logic [2:0] in_len = '0, iss_len;
  logic [W*32-1:0] in_syll = '0;
  dec_t iss_dec [W];
  logic [31:0] iss_a [W], iss_b [W], wb_wd [W];
  logic [W-1:0] wb_we = '0;
  logic [5:0] wb_wa [W];
  int checks = 0, failures = 0, n_issued = 0, n_bypass = 0;
  logic [31:0] regs [NH][64];
  // expected word per HC
  bit exp_v [NH];
  logic [31:0] exp_pc [NH], exp_a [NH][W], exp_b [NH][W];
  int exp_t [NH], cyc = 0;

  vt_midpipe #(.NH(NH), .W(W)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] rd_model(int h, int r);
    logic [31:0] v;
    v = (r == 0) ? 0 : regs[h][r];
    if (wb_valid && wb_h == h)
      for (int w = 0; w < W; w++) if (wb_we[w] && wb_wa[w] == r && r != 0) v = wb_wd[w];
    return v;
  endfunction

  function automatic logic [31:0] rand_syll();
    int rd, rs1, rs2;
    rd = $urandom % 12; rs1 = $urandom % 12; rs2 = $urandom % 12;
    case ($urandom % 4)
      0: return s_rrr(OP_ADD, rd, rs1, rs2);
      1: return s_rri(OP_ADDI, rd, rs1, $urandom % 100);
      2: return s_rri(OP_STW, rd, rs1, 4);
      default: return s_rri(OP_BNEZ, 0, rs1, 8);
    endcase
  endfunction

  always @(posedge clk) if (rst_n) begin
    cyc++;
    for (int h = 0; h < NH; h++) begin
      checks++;
      if (blocked[h] != (exp_v[h] || exec_busy[h])) begin failures++; $display("FAIL blocked hc%0d", h); end
    end
    if (in_valid) begin
      checks++;
      if (in_ready == (exp_v[in_h] || exec_busy[in_h])) begin
        failures++; $display("FAIL in_ready %b for hc%0d", in_ready, in_h);
      end
    end
    // issue side
    if (iss_valid && iss_ready) begin
      int h; h = iss_h;
      n_issued++;
      checks++;
      if (!exp_v[h] || iss_pc != exp_pc[h] || cyc <= exp_t[h]) begin
        failures++; $display("FAIL unexpected issue hc%0d pc %h", h, iss_pc);
      end else
        for (int i = 0; i < W; i++) begin
          checks++;
          if ((iss_dec[i].rs1_used && iss_a[i] != exp_a[h][i]) ||
              (iss_dec[i].rs2_used && iss_b[i] != exp_b[h][i])) begin
            failures++; $display("FAIL operands hc%0d slot %0d: %h %h want %h %h", h, i, iss_a[i], iss_b[i],
                                 exp_a[h][i], exp_b[h][i]);
          end
        end
      exp_v[h] = 0;
    end
    // accept side: operands seen with this clock's write-back
    if (in_valid && in_ready) begin
      int h; dec_t d;
      h = in_h;
      exp_v[h] = 1; exp_pc[h] = in_pc; exp_t[h] = cyc;
      for (int i = 0; i < W; i++) begin
        logic [31:0] s; s = in_syll[i*32 +: 32];
        exp_a[h][i] = rd_model(h, s[18:13]);
        exp_b[h][i] = (s[30:25] == OP_STW) ? rd_model(h, s[24:19]) : rd_model(h, s[12:7]);
      end
    end
    if (ev_bypass) n_bypass++;
    // register model
    if (wb_valid)
      for (int w = 0; w < W; w++) if (wb_we[w] && wb_wa[w] != 0) regs[wb_h][wb_wa[w]] = wb_wd[w];
    if (start_valid) begin regs[start_h][1] = start_sp; regs[start_h][3] = start_arg; end
  end

  initial begin
    for (int h = 0; h < NH; h++) begin
      exp_v[h] = 0; exp_t[h] = 0; exp_pc[h] = 0;
      for (int r = 0; r < 64; r++) regs[h][r] = 0;
    end
    for (int w = 0; w < W; w++) begin wb_wa[w] = 0; wb_wd[w] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); start_valid = 1; start_h = 0; start_sp = 32'h1000; start_arg = 5;
    @(negedge clk); start_h = 1; start_sp = 32'h2000; start_arg = 6;
    @(negedge clk); start_valid = 0;
    for (int t = 0; t < 1500; t++) begin
      in_valid = $urandom % 2; in_h = 1'($urandom); in_pc = t * 8; in_len = 3'(1 + $urandom % 2);
      in_syll = {rand_syll(), rand_syll()};
      if (in_len == 1) in_syll[63:32] = 0;
      wb_valid = $urandom % 2; wb_h = 1'($urandom);
      for (int w = 0; w < W; w++) begin wb_wa[w] = 6'($urandom % 12); wb_wd[w] = $urandom; end
      wb_we = 2'($urandom);
      iss_ready = ($urandom % 3) != 0;
      exec_busy = (($urandom % 8) == 0) ? 2'($urandom) : 2'b00;
      @(negedge clk);
    end
    in_valid = 0; wb_valid = 0;
    $display("issued %0d, bypassed %0d", n_issued, n_bypass);
    checks++;
    if (n_issued < 200 || n_bypass == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
