// vt_ife: Instruction Fetch Engine of one Context.
//
// Holds the program counter of every HyperContext (HC), the branch
// predictor, the even/odd banked IRAM with its aligner, one fetch queue per
// HC and the Thread_Select_Logic that hands one long instruction word (LIW)
// per clock to the Mid-Pipe.
//
// Fetch (clock t): among the running HCs whose queue has room (counting the
// word still in the aligner), one is chosen round robin and the IRAM is
// read at its PC. Align (t+1): the aligner returns the LIW and its length;
// the predictor, looked up with the LIW address, gives the predicted next
// address (BTAC target when the 2-bit counter says taken, else the next
// LIW). The LIW is pushed into the HC's queue and the PC moves on; the new
// PC is forwarded so the same HC can be fetched again in t+1.
// Re-steer: a redirect from the branch unit, or a start of the HC, loads
// the PC, flushes the HC's queue and drops its word in the aligner. An HC
// that is not RUNNING is neither fetched nor selected, and its queue is
// flushed. Select: among HCs with a queued LIW that the Mid-Pipe does not
// block, one is offered round robin (out_valid/out_ready).
// The blocks and the queue per HC follow the architecture; the queue depth,
// the host IRAM write taking priority over fetch, and the round-robin
// policies are this design's choices.
module vt_ife
  import vt_pkg::*;
#(
  parameter int NH         = 1,
  parameter int W          = 2,
  parameter int IRAM_BYTES = 16384,
  parameter int IQ_DEPTH   = 2,
  parameter int BP_ENTRIES = 64,
  parameter int HW = (NH > 1) ? $clog2(NH) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NH-1:0]   hc_run,
  // start of an HC (from the DBG_IF)
  input  logic            start_valid,
  input  logic [HW-1:0]   start_h,
  input  logic [31:0]     start_pc,
  // re-steer and predictor update (from the branch unit)
  input  logic            redir_valid,
  input  logic [HW-1:0]   redir_h,
  input  logic [31:0]     redir_pc,
  input  logic            bp_up_valid,
  input  logic [HW-1:0]   bp_up_h,
  input  logic [31:0]     bp_up_pc,
  input  logic            bp_up_taken,
  input  logic [31:0]     bp_up_target,
  // host IRAM write
  input  logic            iram_we,
  input  logic [31:0]     iram_addr,
  input  logic [31:0]     iram_wdata,
  // to the Mid-Pipe
  input  logic [NH-1:0]   blocked,
  output logic            out_valid,
  input  logic            out_ready,
  output logic [HW-1:0]   out_h,
  output logic [31:0]     out_pc,
  output logic [2:0]      out_len,
  output logic [31:0]     out_pred,
  output logic [W*32-1:0] out_syll,
  // statistics
  output logic            ev_fetch,
  output logic            ev_pred_taken
);
  typedef struct packed {
    logic [31:0]     pc;
    logic [2:0]      len;
    logic [31:0]     pred;
    logic [W*32-1:0] syll;
  } liw_t;

  localparam int QAW = (IQ_DEPTH > 1) ? $clog2(IQ_DEPTH) : 1;
  localparam int NW  = $clog2(W + 1);

  logic [31:0]   pc [NH];
  // aligner stage
  logic          a_v;
  logic [HW-1:0] a_h;
  logic [31:0]   a_pc;

  // ---------------------------------------------------------------- IRAM
  logic          f_en;
  logic [HW-1:0] f_h;
  logic [31:0]   f_pc;
  logic          ir_valid;
  logic [31:0]   ir_syll [W];
  logic [NW-1:0] ir_len;

  iram_banked #(.W(W), .IRAM_BYTES(IRAM_BYTES)) u_iram (
    .clk, .rst_n, .wr_en(iram_we), .wr_addr(iram_addr), .wr_data(iram_wdata),
    .rd_en(f_en), .rd_pc(f_pc), .rd_valid(ir_valid), .syll(ir_syll), .len(ir_len));

  // ---------------------------------------------------------------- BPRED
  logic        bp_taken;
  logic [31:0] bp_target;
  branch_pred #(.NH(NH), .ENTRIES(BP_ENTRIES)) u_bp (
    .clk, .rst_n, .lk_hc(a_h), .lk_pc(a_pc), .lk_taken(bp_taken), .lk_target(bp_target),
    .up_valid(bp_up_valid), .up_hc(bp_up_h), .up_pc(bp_up_pc), .up_taken(bp_up_taken),
    .up_target(bp_up_target));

  // kill conditions per HC this clock
  logic [NH-1:0] kill;
  always_comb
    for (int h = 0; h < NH; h++)
      kill[h] = !hc_run[h] || (redir_valid && redir_h == HW'(h)) ||
                (start_valid && start_h == HW'(h));

  wire         a_ok   = a_v && ir_valid && !kill[a_h];
  wire [31:0]  a_next = bp_taken ? bp_target : a_pc + 32'({ir_len, 2'b00});
  assign ev_fetch      = a_ok;
  assign ev_pred_taken = a_ok && bp_taken;

  // ---------------------------------------------------------------- queues
  liw_t             q_din;
  liw_t             q_dout [NH];
  logic [NH-1:0]    q_empty, q_push, q_pop;
  logic [QAW:0]     q_cnt [NH];

  always_comb begin
    q_din.pc   = a_pc;
    q_din.len  = 3'(ir_len);
    q_din.pred = a_next;
    for (int i = 0; i < W; i++) q_din.syll[i*32 +: 32] = ir_syll[i];
  end

  for (genvar h = 0; h < NH; h++) begin : g_q
    assign q_push[h] = a_ok && a_h == HW'(h);
    ifetch_queue #(.T(liw_t), .DEPTH(IQ_DEPTH)) u_q (
      .clk, .rst_n, .flush(kill[h]), .push(q_push[h]), .din(q_din),
      .pop(q_pop[h]), .dout(q_dout[h]), .empty(q_empty[h]), .count(q_cnt[h]));
  end

  // ---------------------------------------------------------------- fetch
  logic [NH-1:0] f_elig;
  logic [HW-1:0] f_rr;
  logic          f_found;
  always_comb
    for (int h = 0; h < NH; h++)
      f_elig[h] = !kill[h] &&
        (int'(q_cnt[h]) + ((a_v && a_h == HW'(h)) ? 1 : 0) < IQ_DEPTH);
  ff1_biased #(.N(NH), .IW(HW)) u_fsel (.vec(f_elig), .start(f_rr), .found(f_found), .idx(f_h));
  assign f_en = f_found && !iram_we;
  assign f_pc = (a_ok && a_h == f_h) ? a_next : pc[f_h];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int h = 0; h < NH; h++) pc[h] <= '0;
      a_v <= 1'b0; a_h <= '0; a_pc <= '0; f_rr <= '0;
    end else begin
      if (a_ok) pc[a_h] <= a_next;
      if (start_valid) pc[start_h] <= start_pc;
      if (redir_valid) pc[redir_h] <= redir_pc;
      a_v  <= f_en;
      a_h  <= f_h;
      a_pc <= f_pc;
      if (f_en) f_rr <= (int'(f_h) == NH - 1) ? '0 : f_h + 1'b1;
    end

  // ---------------------------------------------------------------- select
  logic [NH-1:0] s_elig;
  logic [HW-1:0] s_rr, s_h;
  logic          s_found;
  assign s_elig = ~q_empty & ~blocked & hc_run & ~kill;
  ff1_biased #(.N(NH), .IW(HW)) u_tsel (.vec(s_elig), .start(s_rr), .found(s_found), .idx(s_h));

  assign out_valid = s_found;
  assign out_h     = s_h;
  assign out_pc    = q_dout[s_h].pc;
  assign out_len   = q_dout[s_h].len;
  assign out_pred  = q_dout[s_h].pred;
  assign out_syll  = q_dout[s_h].syll;
  always_comb
    for (int h = 0; h < NH; h++) q_pop[h] = out_valid && out_ready && s_h == HW'(h);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) s_rr <= '0;
    else if (out_valid && out_ready) s_rr <= (int'(s_h) == NH - 1) ? '0 : s_h + 1'b1;
endmodule
