// vt_galaxy: top level, a single-System VThreads Galaxy.
//
// VThreads is a chip multiprocessor of VLIW Contexts with hardware support
// for POSIX-style threads. This top holds one shared-memory System: NC
// Contexts of NH HyperContexts each, the banked System DRAM with its
// crossbar, the peripheral wrapper, the instrumentation counters and the
// DBG_IF, which is both the host's debug/control port and the hardware
// thread manager (create/join/exit) for all HCs.
//
// Host side: an APB-style register port (see dbg_if for the map) and a
// memory-mapped word port into the DRAM (hm_*; hold req until gnt, read
// data on rvalid). Peripheral side: the control and memory-master signals
// of the KP streaming peripherals, which are outside this design.
// DRAM any-bank channels: 0 peripheral wrapper, 1 DBG_IF DMA, 2 host port.
// Instrumentation events: [7:0] Context 0, [15:8] Context 1 (see
// vt_context for the list), [23:16] the same events OR-ed over all
// Contexts, 24 DRAM bank conflict, 25 thread primitive acknowledged,
// 26 HC started, 27 an HC waits in JOIN.
// Default sizes are those of the largest evaluated configuration: 8
// Contexts of one HC, 2-issue, 2 IALUs and 2 IMULTs, one LSU channel,
// 256 KB of DRAM in 4 banks. The IRAM size, stack size per thread and
// number of peripherals are this design's choices.
module vt_galaxy
  import vt_pkg::*;
#(
  parameter int NC            = 8,
  parameter int NH            = 1,
  parameter int W             = 2,
  parameter int DRAM_BYTES    = 262144,
  parameter int BANKS         = 4,
  parameter int XBAR_PIPE     = 0,
  parameter int IRAM_BYTES    = 16384,
  parameter int IQ_DEPTH      = 2,
  parameter int BP_ENTRIES    = 64,
  parameter int IALU_LATENCY  = 1,
  parameter int IMULT_LATENCY = 2,
  parameter int LSU_CHANNELS  = 1,
  parameter int STACK_SIZE    = 2048,
  parameter int KP            = 2,
  parameter int M             = 1,
  parameter int CW = (NC > 1) ? $clog2(NC) : 1,
  parameter int HW = (NH > 1) ? $clog2(NH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // host debug / control port
  input  logic              psel,
  input  logic              penable,
  input  logic              pwrite,
  input  logic [7:0]        paddr,
  input  logic [31:0]       pwdata,
  output logic [31:0]       prdata,
  output logic              pready,
  // host memory port into the System DRAM
  input  logic              hm_req,
  input  logic              hm_we,
  input  logic [31:0]       hm_addr,
  input  logic [31:0]       hm_wdata,
  output logic              hm_gnt,
  output logic              hm_rvalid,
  output logic [31:0]       hm_rdata,
  // streaming peripherals
  output logic [KP-1:0]     p_start,
  input  logic [KP-1:0]     p_busy,
  input  logic [KP-1:0]     p_done,
  output logic [KP-1:0]     p_we,
  output logic [7:0]        p_addr,
  output logic [31:0]       p_wdata,
  input  logic [31:0]       p_rdata [KP],
  input  logic [KP*M-1:0]   pm_req,
  input  logic [KP*M-1:0]   pm_we,
  input  logic [31:0]       pm_addr  [KP*M],
  input  logic [31:0]       pm_wdata [KP*M],
  output logic [KP*M-1:0]   pm_gnt,
  output logic [KP*M-1:0]   pm_rvalid,
  output logic [31:0]       pm_rdata,
  // status
  output hc_state_e         hc_state [NC][NH],
  output logic [31:0]       thread_ops,
  output logic [31:0]       dram_conflicts,
  output logic [31:0]       illegal_events
);
  localparam int N = NC * NH;

  // ---------------------------------------------------------------- DBG_IF
  logic [N-1:0]  thr_req, thr_ack;
  thr_op_e       thr_op [N];
  logic [31:0]   thr_a [N], thr_b [N], thr_result;
  logic          start_valid;
  logic [CW-1:0] start_c;
  logic [HW-1:0] start_h;
  logic [31:0]   start_pc, start_sp, start_arg;
  logic          iram_we;
  logic [CW-1:0] iram_ctx;
  logic [31:0]   iram_addr, iram_wdata;
  logic          dma_req, dma_we, dma_gnt, dma_rvalid;
  logic [31:0]   dma_addr, dma_wdata, dma_rdata;
  logic          inst_we;
  logic [3:0]    inst_idx;
  logic [4:0]    inst_event;
  logic [32:0]   inst_value;
  logic          dper_req, dper_we;
  logic [7:0]    dper_addr;
  logic [31:0]   dper_wdata;

  // peripheral accessors: NC Contexts + host
  logic [NC:0]   a_req, a_we, a_ack;
  logic [7:0]    a_addr [NC+1];
  logic [31:0]   a_wdata [NC+1];
  logic [31:0]   a_rdata;

  dbg_if #(.NC(NC), .NH(NH), .DRAM_BYTES(DRAM_BYTES), .STACK_SIZE(STACK_SIZE),
           .CW(CW), .HW(HW)) u_dbg (
    .clk, .rst_n, .psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .pready,
    .thr_req, .thr_op, .thr_a, .thr_b, .thr_ack, .thr_result,
    .hc_state, .start_valid, .start_c, .start_h, .start_pc, .start_sp, .start_arg,
    .iram_we, .iram_ctx, .iram_addr, .iram_wdata,
    .dma_req, .dma_we, .dma_addr, .dma_wdata, .dma_gnt, .dma_rvalid, .dma_rdata,
    .inst_we, .inst_idx, .inst_event, .inst_value,
    .per_req(dper_req), .per_we(dper_we), .per_addr(dper_addr),
    .per_wdata(dper_wdata), .per_ack(a_ack[NC]), .per_rdata(a_rdata),
    .thread_ops, .illegal_events);

  // ---------------------------------------------------------------- Contexts
  logic [NC*BANKS-1:0] c_req, c_we, c_gnt, c_rvalid;
  logic [31:0]   c_addr [NC*BANKS], c_wdata [NC*BANKS], c_rdata [NC*BANKS];
  logic [7:0]    cev [NC];

  for (genvar c = 0; c < NC; c++) begin : g_ctx
    hc_state_e     st [NH];
    logic [NH-1:0] t_req, t_ack;
    thr_op_e       t_op;
    logic [31:0]   t_a, t_b;
    logic [BANKS-1:0] mr, mw, mg, mv;
    logic [31:0]   ma [BANKS], md [BANKS], mq [BANKS];
    always_comb
      for (int h = 0; h < NH; h++) begin
        st[h] = hc_state[c][h];
        thr_req[c*NH+h] = t_req[h];
        thr_op[c*NH+h]  = t_op;
        thr_a[c*NH+h]   = t_a;
        thr_b[c*NH+h]   = t_b;
        t_ack[h]        = thr_ack[c*NH+h];
      end
    always_comb
      for (int b = 0; b < BANKS; b++) begin
        c_req[c*BANKS+b]   = mr[b];
        c_we[c*BANKS+b]    = mw[b];
        c_addr[c*BANKS+b]  = ma[b];
        c_wdata[c*BANKS+b] = md[b];
        mg[b] = c_gnt[c*BANKS+b];
        mv[b] = c_rvalid[c*BANKS+b];
        mq[b] = c_rdata[c*BANKS+b];
      end
    vt_context #(.NH(NH), .W(W), .CTX_ID(c), .IRAM_BYTES(IRAM_BYTES), .IQ_DEPTH(IQ_DEPTH),
                 .BP_ENTRIES(BP_ENTRIES), .IALU_LATENCY(IALU_LATENCY),
                 .IMULT_LATENCY(IMULT_LATENCY), .LSU_CHANNELS(LSU_CHANNELS),
                 .BANKS(BANKS)) u_ctx (
      .clk, .rst_n, .hc_state(st),
      .start_valid(start_valid && start_c == CW'(c)), .start_h, .start_pc, .start_sp, .start_arg,
      .iram_we(iram_we && iram_ctx == CW'(c)), .iram_addr, .iram_wdata,
      .thr_req(t_req), .thr_op(t_op), .thr_a(t_a), .thr_b(t_b), .thr_ack(t_ack), .thr_result,
      .per_req(a_req[c]), .per_we(a_we[c]), .per_addr(a_addr[c]), .per_wdata(a_wdata[c]),
      .per_ack(a_ack[c]), .per_rdata(a_rdata),
      .m_req(mr), .m_we(mw), .m_addr(ma), .m_wdata(md), .m_gnt(mg), .m_rvalid(mv), .m_rdata(mq),
      .events(cev[c]));
  end

  // host access to the peripheral space (the register space is System-wide)
  assign a_req[NC]   = dper_req;
  assign a_we[NC]    = dper_we;
  assign a_addr[NC]  = dper_addr;
  assign a_wdata[NC] = dper_wdata;

  // ---------------------------------------------------------------- DRAM
  logic [2:0]  x_req, x_we, x_gnt, x_rvalid;
  logic [31:0] x_addr [3], x_wdata [3], x_rdata [3];
  logic        pd_req, pd_we;
  logic [31:0] pd_addr, pd_wdata;

  assign x_req   = {hm_req, dma_req, pd_req};
  assign x_we    = {hm_we, dma_we, pd_we};
  assign x_addr  = '{pd_addr, dma_addr, hm_addr};
  assign x_wdata = '{pd_wdata, dma_wdata, hm_wdata};
  assign dma_gnt    = x_gnt[1];
  assign dma_rvalid = x_rvalid[1];
  assign dma_rdata  = x_rdata[1];
  assign hm_gnt     = x_gnt[2];
  assign hm_rvalid  = x_rvalid[2];
  assign hm_rdata   = x_rdata[2];

  dram_sys #(.NC(NC), .BANKS(BANKS), .DRAM_BYTES(DRAM_BYTES), .NX(3),
             .XBAR_PIPE(XBAR_PIPE)) u_dram (
    .clk, .rst_n, .c_req, .c_we, .c_addr, .c_wdata, .c_gnt, .c_rvalid, .c_rdata,
    .x_req, .x_we, .x_addr, .x_wdata, .x_gnt, .x_rvalid, .x_rdata,
    .conflicts(dram_conflicts));

  // ---------------------------------------------------------------- periph
  periph_wrap #(.NA(NC + 1), .KP(KP), .M(M)) u_per (
    .clk, .rst_n, .a_req, .a_we, .a_addr, .a_wdata, .a_ack, .a_rdata,
    .p_start, .p_busy, .p_done, .p_we, .p_addr, .p_wdata, .p_rdata,
    .pm_req, .pm_we, .pm_addr, .pm_wdata, .pm_gnt, .pm_rvalid, .pm_rdata,
    .d_req(pd_req), .d_we(pd_we), .d_addr(pd_addr), .d_wdata(pd_wdata),
    .d_gnt(x_gnt[0]), .d_rvalid(x_rvalid[0]), .d_rdata(x_rdata[0]));

  // ---------------------------------------------------------------- counters
  logic [31:0] events;
  logic [7:0]  ev_or;
  logic        any_join;
  logic        conflict_now;
  logic [31:0] conf_q;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) conf_q <= '0;
    else        conf_q <= dram_conflicts;
  assign conflict_now = dram_conflicts != conf_q;
  always_comb begin
    ev_or = '0;
    any_join = 1'b0;
    for (int c = 0; c < NC; c++) begin
      ev_or = ev_or | cev[c];
      for (int h = 0; h < NH; h++) if (hc_state[c][h] == HC_JOIN) any_join = 1'b1;
    end
    events = {4'd0, any_join, start_valid, |thr_ack, conflict_now, ev_or,
              (NC > 1) ? cev[NC > 1 ? 1 : 0] : 8'd0, cev[0]};
  end

  instrumentation #(.NCNT(16), .CW(33), .NEV(32)) u_inst (
    .clk, .rst_n, .events, .cfg_we(inst_we), .cfg_idx(inst_idx), .cfg_event(inst_event),
    .rd_idx(inst_idx), .rd_value(inst_value));
endmodule
