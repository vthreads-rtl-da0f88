// vt_context: one VThreads Context (processing container).
//
// A Context holds NH HyperContexts (HCs) that share its execution resources
// by vertical multithreading: one HC issues per clock. It is built from the
// Instruction Fetch Engine (per-HC PCs, branch predictor, even/odd IRAM,
// per-HC fetch queues, Thread_Select_Logic), the Mid-Pipe (decoders, read
// port allocation, per-HC register files, bypass, issue queues,
// Thread_Issue_Logic) and one Cluster (IALUs, IMULTs, BRU, FPCORE and Load/Store
// Unit). The Context talks to the outside through: the HC state and start
// signals of the DBG_IF, one thread-primitive request port per HC, one
// peripheral register port, one DRAM channel per bank, and the host IRAM
// write port.
//
// An HC fetches, issues and executes while its state is RUNNING or JOIN
// (JOIN only while its join syllable waits in the Cluster); in any other
// state its fetch queue and issue entry are emptied. The hierarchy follows
// the architecture; a single Cluster template per Context is used here.
module vt_context
  import vt_pkg::*;
#(
  parameter int NH            = 1,
  parameter int W             = 2,
  parameter int CTX_ID        = 0,
  parameter int IRAM_BYTES    = 16384,
  parameter int IQ_DEPTH      = 2,
  parameter int BP_ENTRIES    = 64,
  parameter int IALU_LATENCY  = 1,
  parameter int IMULT_LATENCY = 2,
  parameter int LSU_CHANNELS  = 1,
  parameter int BANKS         = 4,
  parameter int HW = (NH > 1) ? $clog2(NH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  hc_state_e        hc_state [NH],
  input  logic             start_valid,
  input  logic [HW-1:0]    start_h,
  input  logic [31:0]      start_pc,
  input  logic [31:0]      start_sp,
  input  logic [31:0]      start_arg,
  input  logic             iram_we,
  input  logic [31:0]      iram_addr,
  input  logic [31:0]      iram_wdata,
  output logic [NH-1:0]    thr_req,
  output thr_op_e          thr_op,
  output logic [31:0]      thr_a,
  output logic [31:0]      thr_b,
  input  logic [NH-1:0]    thr_ack,
  input  logic [31:0]      thr_result,
  output logic             per_req,
  output logic             per_we,
  output logic [7:0]       per_addr,
  output logic [31:0]      per_wdata,
  input  logic             per_ack,
  input  logic [31:0]      per_rdata,
  output logic [BANKS-1:0] m_req,
  output logic [BANKS-1:0] m_we,
  output logic [31:0]      m_addr  [BANKS],
  output logic [31:0]      m_wdata [BANKS],
  input  logic [BANKS-1:0] m_gnt,
  input  logic [BANKS-1:0] m_rvalid,
  input  logic [31:0]      m_rdata [BANKS],
  // events for the instrumentation counters
  output logic [7:0]       events
);
  logic [NH-1:0] live;
  always_comb
    for (int h = 0; h < NH; h++)
      live[h] = hc_state[h] == HC_RUNNING || hc_state[h] == HC_JOIN;

  // IFE <-> Mid-Pipe
  logic            f_valid, f_ready;
  logic [HW-1:0]   f_h;
  logic [31:0]     f_pc, f_pred;
  logic [2:0]      f_len;
  logic [W*32-1:0] f_syll;
  logic [NH-1:0]   blocked;
  // Mid-Pipe <-> Cluster
  logic            i_valid, i_ready;
  logic [HW-1:0]   i_h;
  logic [31:0]     i_pc, i_pred;
  logic [2:0]      i_len;
  dec_t            i_dec [W];
  logic [31:0]     i_a [W], i_b [W];
  logic [NH-1:0]   exec_busy;
  logic            wb_valid;
  logic [HW-1:0]   wb_h;
  logic [W-1:0]    wb_we;
  logic [5:0]      wb_wa [W];
  logic [31:0]     wb_wd [W];
  // Cluster -> IFE
  logic            redir_valid, bp_up_valid, bp_up_taken;
  logic [HW-1:0]   redir_h;
  logic [31:0]     redir_pc, bp_up_pc, bp_up_target;
  logic            ev_fetch, ev_pred_taken, ev_bypass, ev_bad_op, ev_issue, ev_mis, ev_lsu;
  logic [3:0]      ev_syl;

  vt_ife #(.NH(NH), .W(W), .IRAM_BYTES(IRAM_BYTES), .IQ_DEPTH(IQ_DEPTH),
           .BP_ENTRIES(BP_ENTRIES)) u_ife (
    .clk, .rst_n, .hc_run(live), .start_valid, .start_h, .start_pc,
    .redir_valid, .redir_h, .redir_pc,
    .bp_up_valid, .bp_up_h(redir_h), .bp_up_pc, .bp_up_taken, .bp_up_target,
    .iram_we, .iram_addr, .iram_wdata,
    .blocked, .out_valid(f_valid), .out_ready(f_ready), .out_h(f_h), .out_pc(f_pc),
    .out_len(f_len), .out_pred(f_pred), .out_syll(f_syll),
    .ev_fetch, .ev_pred_taken);

  vt_midpipe #(.NH(NH), .W(W)) u_mid (
    .clk, .rst_n, .hc_run(live),
    .in_valid(f_valid), .in_ready(f_ready), .in_h(f_h), .in_pc(f_pc), .in_len(f_len),
    .in_pred(f_pred), .in_syll(f_syll), .blocked,
    .start_valid, .start_h, .start_sp, .start_arg,
    .iss_valid(i_valid), .iss_ready(i_ready), .iss_h(i_h), .iss_pc(i_pc), .iss_len(i_len),
    .iss_pred(i_pred), .iss_dec(i_dec), .iss_a(i_a), .iss_b(i_b), .exec_busy,
    .wb_valid, .wb_h, .wb_we, .wb_wa, .wb_wd, .ev_bypass, .ev_bad_op);

  vt_cluster #(.NH(NH), .W(W), .CTX_ID(CTX_ID), .IALU_LATENCY(IALU_LATENCY),
               .IMULT_LATENCY(IMULT_LATENCY), .LSU_CHANNELS(LSU_CHANNELS),
               .BANKS(BANKS)) u_cl (
    .clk, .rst_n, .hc_live(live),
    .in_valid(i_valid), .in_ready(i_ready), .in_h(i_h), .in_pc(i_pc), .in_len(i_len),
    .in_pred(i_pred), .in_dec(i_dec), .in_a(i_a), .in_b(i_b), .exec_busy,
    .wb_valid, .wb_h, .wb_we, .wb_wa, .wb_wd,
    .redir_valid, .redir_h, .redir_pc, .bp_up_valid, .bp_up_pc, .bp_up_taken, .bp_up_target,
    .thr_req, .thr_op, .thr_a, .thr_b, .thr_ack, .thr_result,
    .per_req, .per_we, .per_addr, .per_wdata, .per_ack, .per_rdata,
    .m_req, .m_we, .m_addr, .m_wdata, .m_gnt, .m_rvalid, .m_rdata,
    .ev_issue, .ev_syllables(ev_syl), .ev_mispredict(ev_mis), .ev_lsu_stall(ev_lsu));

  // event vector: 0 LIW issued, 1 syllable(s) issued, 2 mispredict,
  // 3 LSU busy, 4 bypass used, 5 LIW fetched, 6 predicted taken, 7 bad opcode
  assign events = {ev_bad_op, ev_pred_taken, ev_fetch, ev_bypass, ev_lsu, ev_mis,
                   ev_syl != 4'd0, ev_issue};
endmodule
