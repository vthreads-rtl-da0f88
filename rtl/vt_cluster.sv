// vt_cluster: execution Cluster of one Context (SCORE with IALUs, IMULTs and
// the BRU, the FPCORE, the Cluster Load/Store Unit, and the ports of the
// thread primitives and peripheral accesses).
//
// The Cluster takes one long instruction word (LIW) at a time from the
// Mid-Pipe. Syllable slot i uses IALU i, IMULT i or FPCORE data-path i
// (pipelined, with the configured latencies); the first FDIV of the word
// uses the shared iterative divider (a further FDIV in the same word is
// not executed and writes 0); the loads and stores of the word go, in slot
// order, to the LSU channels; the first thread-primitive syllable raises a
// request to the DBG_IF (held until acknowledged); the first peripheral
// syllable raises a peripheral register access; the first branch syllable
// is resolved by the BRU. When every unit used by the word has finished,
// the Cluster writes all results back to the HC's register file in one
// clock, re-steers the HC's fetch if the predicted next address was wrong,
// updates the predictor, and is free again in the same clock.
//
// Latency of an ALU-only word: dispatch in clock t, results captured at the
// end of t+IALU_LATENCY, write-back in the following clock. The units and
// their configurable latencies follow the architecture; executing one word
// at a time and writing back all results together is this design's
// simplification of its pipelined back end.
module vt_cluster
  import vt_pkg::*;
#(
  parameter int NH            = 1,
  parameter int W             = 2,
  parameter int CTX_ID        = 0,
  parameter int IALU_LATENCY  = 1,
  parameter int IMULT_LATENCY = 2,
  parameter int FP_LATENCY    = 4,
  parameter int LSU_CHANNELS  = 1,
  parameter int BANKS         = 4,
  parameter int HW = (NH > 1) ? $clog2(NH) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NH-1:0]   hc_live,
  // from the Mid-Pipe
  input  logic            in_valid,
  output logic            in_ready,
  input  logic [HW-1:0]   in_h,
  input  logic [31:0]     in_pc,
  input  logic [2:0]      in_len,
  input  logic [31:0]     in_pred,
  input  dec_t            in_dec [W],
  input  logic [31:0]     in_a   [W],
  input  logic [31:0]     in_b   [W],
  output logic [NH-1:0]   exec_busy,
  // write-back
  output logic            wb_valid,
  output logic [HW-1:0]   wb_h,
  output logic [W-1:0]    wb_we,
  output logic [5:0]      wb_wa [W],
  output logic [31:0]     wb_wd [W],
  // re-steer and predictor update
  output logic            redir_valid,
  output logic [HW-1:0]   redir_h,
  output logic [31:0]     redir_pc,
  output logic            bp_up_valid,
  output logic [31:0]     bp_up_pc,
  output logic            bp_up_taken,
  output logic [31:0]     bp_up_target,
  // thread primitives (to the DBG_IF), one port per HC
  output logic [NH-1:0]   thr_req,
  output thr_op_e         thr_op,
  output logic [31:0]     thr_a,
  output logic [31:0]     thr_b,
  input  logic [NH-1:0]   thr_ack,
  input  logic [31:0]     thr_result,
  // peripheral register access
  output logic            per_req,
  output logic            per_we,
  output logic [7:0]      per_addr,
  output logic [31:0]     per_wdata,
  input  logic            per_ack,
  input  logic [31:0]     per_rdata,
  // DRAM channels
  output logic [BANKS-1:0] m_req,
  output logic [BANKS-1:0] m_we,
  output logic [31:0]      m_addr  [BANKS],
  output logic [31:0]      m_wdata [BANKS],
  input  logic [BANKS-1:0] m_gnt,
  input  logic [BANKS-1:0] m_rvalid,
  input  logic [31:0]      m_rdata [BANKS],
  // statistics
  output logic            ev_issue,
  output logic [3:0]      ev_syllables,
  output logic            ev_mispredict,
  output logic            ev_lsu_stall
);
  localparam int TW = 4;
  localparam int SW = (W > 1) ? $clog2(W) : 1;

  logic          busy;
  logic [HW-1:0] c_h;
  logic [31:0]   c_pc, c_pred;
  logic [2:0]    c_len;
  dec_t          c_dec [W];
  logic [31:0]   c_a [W], c_b [W];
  logic [W-1:0]  need, got;
  logic [31:0]   res [W];
  logic          thr_pend, per_pend;
  logic          lsu_started, lsu_fin;

  wire take = in_valid && in_ready;

  // ---------------------------------------------------------------- units
  logic [W-1:0]  alu_ov, mul_ov;
  logic [31:0]   alu_r [W], mul_r [W];
  logic [TW-1:0] alu_t [W], mul_t [W];
  for (genvar i = 0; i < W; i++) begin : g_u
    logic [31:0] b_eff;
    assign b_eff = (in_dec[i].op == OP_CPUID) ? {20'd0, 8'(CTX_ID), 4'(in_h)} :
                   in_dec[i].use_imm ? in_dec[i].imm : in_b[i];
    ialu #(.LATENCY(IALU_LATENCY), .TW(TW)) u_alu (.clk, .rst_n,
      .in_valid(take && in_dec[i].unit == U_ALU), .op(in_dec[i].op), .a(in_a[i]), .b(b_eff),
      .in_tag(TW'(i)), .out_valid(alu_ov[i]), .result(alu_r[i]), .out_tag(alu_t[i]));
    imult #(.LATENCY(IMULT_LATENCY), .TW(TW)) u_mul (.clk, .rst_n,
      .in_valid(take && in_dec[i].unit == U_MUL), .op(in_dec[i].op), .a(in_a[i]), .b(in_b[i]),
      .in_tag(TW'(i)), .out_valid(mul_ov[i]), .result(mul_r[i]), .out_tag(mul_t[i]));
  end

  // ---------------------------------------------------------------- FPCORE
  logic [W-1:0]  fp_in, fp_ov, first_div;
  opcode_e       fp_op [W];
  logic [31:0]   fp_r [W], div_r;
  logic [TW-1:0] fp_t [W], fp_tin [W], div_t;
  logic          div_busy, div_done, div_seen;
  always_comb begin
    div_seen = 1'b0;
    for (int i = 0; i < W; i++) begin
      fp_in[i]     = take && in_dec[i].unit == U_FP;
      fp_op[i]     = in_dec[i].op;
      fp_tin[i]    = TW'(i);
      first_div[i] = in_dec[i].unit == U_FP && in_dec[i].op == OP_FDIV && !div_seen;
      if (first_div[i]) div_seen = 1'b1;
    end
  end
  fpcore #(.W(W), .LATENCY(FP_LATENCY), .TW(TW)) u_fp (.clk, .rst_n, .in_valid(fp_in), .op(fp_op),
    .a(in_a), .b(in_b), .in_tag(fp_tin), .dp_valid(fp_ov), .dp_result(fp_r), .dp_tag(fp_t),
    .div_busy, .div_done, .div_result(div_r), .div_tag(div_t));

  // ---------------------------------------------------------------- LSU
  logic [LSU_CHANNELS-1:0] l_v, l_we;
  logic [31:0] l_base [LSU_CHANNELS], l_offs [LSU_CHANNELS], l_wdata [LSU_CHANNELS];
  logic [31:0] l_rdata [LSU_CHANNELS];
  logic        l_busy, l_done;
  int          l_slot [LSU_CHANNELS];
  always_comb begin
    int n;
    n = 0;
    l_v = '0; l_we = '0;
    for (int k = 0; k < LSU_CHANNELS; k++) begin
      l_base[k] = '0; l_offs[k] = '0; l_wdata[k] = '0; l_slot[k] = 0;
    end
    for (int i = 0; i < W; i++)
      if (c_dec[i].unit == U_LSU && n < LSU_CHANNELS) begin
        l_v[n] = 1'b1; l_we[n] = (c_dec[i].op == OP_STW);
        l_base[n] = c_a[i]; l_offs[n] = c_dec[i].imm; l_wdata[n] = c_b[i];
        l_slot[n] = i;
        n++;
      end
  end
  cl_lsu #(.NCL(LSU_CHANNELS), .BANKS(BANKS)) u_lsu (.clk, .rst_n,
    .start(busy && !lsu_started && |l_v), .v(l_v), .we(l_we), .base(l_base), .offs(l_offs),
    .wdata(l_wdata), .busy(l_busy), .done(l_done), .rdata(l_rdata),
    .m_req, .m_we, .m_addr, .m_wdata, .m_gnt, .m_rvalid, .m_rdata);
  assign ev_lsu_stall = busy && l_busy;

  // ---------------------------------------------------------------- THR/PER/BRU
  int thr_i, per_i, br_i;
  always_comb begin
    thr_i = -1; per_i = -1; br_i = -1;
    for (int i = W - 1; i >= 0; i--) begin
      if (c_dec[i].unit == U_THR) thr_i = i;
      if (c_dec[i].unit == U_PER) per_i = i;
      if (c_dec[i].unit == U_BRU) br_i = i;
    end
  end
  wire [SW-1:0] thr_ix = SW'(thr_i);
  wire [SW-1:0] per_ix = SW'(per_i);
  wire [SW-1:0] br_ix  = SW'(br_i);

  always_comb begin
    thr_req = '0;
    thr_req[c_h] = busy && thr_pend && hc_live[c_h];
    unique case (c_dec[thr_ix].op)
      OP_CREATE: thr_op = TOP_CREATE;
      OP_JOIN:   thr_op = TOP_JOIN;
      default:   thr_op = TOP_EXIT;
    endcase
  end
  assign thr_a     = c_a[thr_ix];
  assign thr_b     = c_b[thr_ix];
  assign per_req   = busy && per_pend;
  assign per_we    = c_dec[per_ix].op == OP_WRPERIPH;
  assign per_addr  = 8'(c_a[per_ix] + c_dec[per_ix].imm);
  assign per_wdata = c_b[per_ix];

  logic        br_taken, br_mis, br_upd;
  logic [31:0] br_next;
  bru u_bru (.valid(br_i >= 0), .op(c_dec[br_ix].op), .a(c_a[br_ix]), .imm(c_dec[br_ix].imm),
    .pc(c_pc), .len(c_len), .pred_next(c_pred), .next_pc(br_next), .taken(br_taken),
    .mispredict(br_mis), .upd_valid(br_upd));

  // ---------------------------------------------------------------- completion
  wire thr_done_now = thr_pend && (thr_ack[c_h] || !hc_live[c_h]);
  logic complete;
  assign complete = busy && (need & ~got) == '0 && !thr_pend && !per_pend &&
                    (lsu_fin || l_v == '0);
  assign in_ready = !busy;

  logic exiting;
  always_comb begin
    exiting = 1'b0;
    for (int i = 0; i < W; i++) if (c_dec[i].valid && c_dec[i].op == OP_EXIT) exiting = 1'b1;
  end

  assign wb_valid = complete;
  assign wb_h     = c_h;
  always_comb
    for (int i = 0; i < W; i++) begin
      wb_we[i] = c_dec[i].rd_used && c_dec[i].unit != U_BRU;
      wb_wa[i] = c_dec[i].rd;
      wb_wd[i] = res[i];
    end

  assign redir_valid  = complete && br_mis && !exiting && hc_live[c_h];
  assign redir_h      = c_h;
  assign redir_pc     = br_next;
  assign bp_up_valid  = complete && br_upd;
  assign bp_up_pc     = c_pc;
  assign bp_up_taken  = br_taken;
  assign bp_up_target = br_next;
  assign ev_issue      = take;
  assign ev_mispredict = redir_valid;
  always_comb begin
    ev_syllables = '0;
    if (take) for (int i = 0; i < W; i++) if (in_dec[i].valid) ev_syllables = ev_syllables + 1'b1;
  end

  always_comb begin
    exec_busy = '0;
    // a re-steered HC stays blocked in its completing clock, so that no
    // word fetched on the wrong path can enter the Mid-Pipe behind it
    if (busy && (!complete || redir_valid)) exec_busy[c_h] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      busy <= 1'b0; c_h <= '0; c_pc <= '0; c_pred <= '0; c_len <= '0;
      need <= '0; got <= '0; thr_pend <= 1'b0; per_pend <= 1'b0; lsu_started <= 1'b0; lsu_fin <= 1'b0;
      for (int i = 0; i < W; i++) begin c_dec[i] <= '0; c_a[i] <= '0; c_b[i] <= '0; res[i] <= '0; end
    end else begin
      if (complete) busy <= 1'b0;
      if (take) begin
        busy <= 1'b1; c_h <= in_h; c_pc <= in_pc; c_pred <= in_pred; c_len <= in_len;
        lsu_started <= 1'b0; lsu_fin <= 1'b0; thr_pend <= 1'b0; per_pend <= 1'b0; got <= '0;
        for (int i = 0; i < W; i++) begin
          c_dec[i] <= in_dec[i]; c_a[i] <= in_a[i]; c_b[i] <= in_b[i]; res[i] <= '0;
          need[i]  <= in_dec[i].unit == U_ALU || in_dec[i].unit == U_MUL ||
                      (in_dec[i].unit == U_FP && (in_dec[i].op != OP_FDIV || first_div[i]));
          if (in_dec[i].unit == U_THR) thr_pend <= 1'b1;
          if (in_dec[i].unit == U_PER) per_pend <= 1'b1;
        end
      end else if (busy) begin
        for (int i = 0; i < W; i++) begin
          if (alu_ov[i]) begin res[SW'(alu_t[i])] <= alu_r[i]; got[SW'(alu_t[i])] <= 1'b1; end
          if (mul_ov[i]) begin res[SW'(mul_t[i])] <= mul_r[i]; got[SW'(mul_t[i])] <= 1'b1; end
          if (fp_ov[i])  begin res[SW'(fp_t[i])]  <= fp_r[i];  got[SW'(fp_t[i])]  <= 1'b1; end
        end
        if (div_done) begin res[SW'(div_t)] <= div_r; got[SW'(div_t)] <= 1'b1; end
        if (|l_v && !lsu_started) lsu_started <= 1'b1;
        if (l_done) lsu_fin <= 1'b1;
        if (l_done)
          for (int k = 0; k < LSU_CHANNELS; k++)
            if (l_v[k]) res[l_slot[k]] <= l_rdata[k];
        if (thr_done_now) begin
          thr_pend <= 1'b0;
          if (c_dec[thr_ix].op == OP_CREATE) res[thr_ix] <= thr_result;
        end
        if (per_pend && per_ack) begin
          per_pend <= 1'b0;
          res[per_ix] <= per_rdata;
        end
      end
    end

  assert property (@(posedge clk) disable iff (!rst_n) busy |-> !take)
    else $error("cluster accepted a word while busy");
endmodule
