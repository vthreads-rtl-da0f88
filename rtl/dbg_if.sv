// dbg_if: host debug interface and the hardware PThreads FSM (DBG_IF).
//
// The DBG_IF is the single synchronization point between the host and all
// HyperContexts (HCs) of the System. It has two faces:
//
//  * A non-pipelined APB-style slave for the host (psel/penable/pwrite,
//    word registers below). Through it the host selects an HC, writes its
//    state (DEBUG/READY), starts it at a given PC/SP/argument, terminates
//    it, reads its state, sets the affinity masks of a Context, loads the
//    IRAM of a Context, moves words to and from the System DRAM (DMA
//    channel), reads the instrumentation counters and accesses the
//    peripheral register space of a Context.
//  * A request/acknowledge port per HC for the thread primitives the HCs
//    execute: vthread_create, vthread_join and vthread_exit. A request is
//    held until thr_ack. Requests are served one at a time, round robin.
//
// vthread_create runs the two-cycle allocation search of thread_table;
// on success the chosen HC moves READY->RUNNING and the `start_*` signals
// load its PC, stack pointer and argument; the creator receives the thread
// id {context[11:4], hc[3:0]} (the CPUID layout). If no HC is free the
// request stays pending and is retried (stall). vthread_join returns at once
// when the target HC is no longer RUNNING or JOIN; otherwise the joiner
// enters JOIN and is acknowledged when the target has terminated; if the
// host terminates the joiner itself, its pending join is dropped.
// vthread_exit moves the HC through TERM_SYNC to READY.
//
// Host register map (byte offsets): 0x00 SEL {hc[15:8],ctx[7:0]};
// 0x04 PC; 0x08 SP; 0x0C ARG; 0x10 CMD (1 READY, 2 DEBUG, 3 START, 4 EXIT);
// 0x14 STATE (of SEL); 0x18 AFFIN {HC_Affin[31:16], C_Affin[15:0]} of
// SEL.ctx; 0x1C DMA_ADDR; 0x20 DMA_DATA (auto-increment by 4);
// 0x24 IRAM_ADDR; 0x28 IRAM_DATA (write only, auto-increment by 4);
// 0x2C INSTR_CFG {select_only[15], event[12:8], counter[3:0]}: selects the
// counter read through INSTR_LO/HI and, unless bit 15 is set, attaches it
// to the event and clears it; 0x30 INSTR_LO; 0x34 INSTR_HI;
// 0x38 PERIPH_ADDR; 0x3C PERIPH_DATA; 0x40 THREAD_OPS (count of acknowledged
// thread primitives). The register map, the APB flavour, the stack pointer
// rule for created threads (top of DRAM minus STACK_SIZE per HC) and the
// argument register are this design's choices; the architecture names the
// host commands, the state machine and the allocation search.
module dbg_if
  import vt_pkg::*;
#(
  parameter int NC          = 8,
  parameter int NH          = 1,
  parameter int DRAM_BYTES  = 262144,
  parameter int STACK_SIZE  = 2048,
  parameter int CW = (NC > 1) ? $clog2(NC) : 1,
  parameter int HW = (NH > 1) ? $clog2(NH) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // host APB slave
  input  logic               psel,
  input  logic               penable,
  input  logic               pwrite,
  input  logic [7:0]         paddr,
  input  logic [31:0]        pwdata,
  output logic [31:0]        prdata,
  output logic               pready,
  // thread primitives from the HCs (flattened index c*NH+h)
  input  logic [NC*NH-1:0]   thr_req,
  input  thr_op_e            thr_op   [NC*NH],
  input  logic [31:0]        thr_a    [NC*NH],  // create: PC; join: thread id
  input  logic [31:0]        thr_b    [NC*NH],  // create: argument
  output logic [NC*NH-1:0]   thr_ack,
  output logic [31:0]        thr_result,
  // HC state and start of an HC
  output hc_state_e          hc_state [NC][NH],
  output logic               start_valid,
  output logic [CW-1:0]      start_c,
  output logic [HW-1:0]      start_h,
  output logic [31:0]        start_pc,
  output logic [31:0]        start_sp,
  output logic [31:0]        start_arg,
  // IRAM load
  output logic               iram_we,
  output logic [CW-1:0]      iram_ctx,
  output logic [31:0]        iram_addr,
  output logic [31:0]        iram_wdata,
  // DMA channel into the System DRAM
  output logic               dma_req,
  output logic               dma_we,
  output logic [31:0]        dma_addr,
  output logic [31:0]        dma_wdata,
  input  logic               dma_gnt,
  input  logic               dma_rvalid,
  input  logic [31:0]        dma_rdata,
  // instrumentation
  output logic               inst_we,
  output logic [3:0]         inst_idx,
  output logic [4:0]         inst_event,
  input  logic [32:0]        inst_value,
  // peripheral register space
  output logic               per_req,
  output logic               per_we,
  output logic [7:0]         per_addr,
  output logic [31:0]        per_wdata,
  input  logic               per_ack,
  input  logic [31:0]        per_rdata,
  // statistics
  output logic [31:0]        thread_ops,
  output logic [31:0]        illegal_events
);
  localparam int N = NC * NH;
  localparam int IW = (N > 1) ? $clog2(N) : 1;

  // ------------------------------------------------------------ host regs
  logic [CW-1:0] sel_c;
  logic [HW-1:0] sel_h;
  logic [31:0]   r_pc, r_sp, r_arg, r_dma_addr, r_iram_addr;
  logic [3:0]    r_inst_idx;
  logic [7:0]    r_per_addr;

  wire acc    = psel && penable;
  wire acc_wr = acc && pwrite;

  // ------------------------------------------------------------ table
  hc_event_e     ev [NC][NH];
  hc_state_e     wr_state;
  logic [N-1:0]  illegal;
  logic          aff_we;
  logic [NC-1:0] c_affin  [NC];
  logic [NH-1:0] hc_affin [NC];
  logic          sched_req, res_valid, res_found;
  logic [CW-1:0] issuing_c, res_c;
  logic [HW-1:0] res_h;

  thread_table #(.NC(NC), .NH(NH), .CW(CW), .HW(HW)) u_table (
    .clk, .rst_n, .ev, .wr_state, .state(hc_state), .illegal,
    .aff_we, .aff_ctx(sel_c), .c_affin_wdata(pwdata[NC-1:0]),
    .hc_affin_wdata(pwdata[16 +: NH]), .c_affin, .hc_affin,
    .sched_req, .issuing_c, .res_valid, .res_found, .res_c, .res_h);

  // ------------------------------------------------------------ FSM
  typedef enum logic { S_IDLE, S_SCHED } fsm_e;
  fsm_e          st;
  logic [IW-1:0] cur, rr_ptr;
  logic [N-1:0]  join_wait;
  logic [IW-1:0] join_tgt [N];

  // which requests are eligible: pending and not already parked in JOIN
  logic [N-1:0]  elig;
  assign elig = thr_req & ~join_wait;
  logic          pick_found;
  logic [IW-1:0] pick;
  ff1_biased #(.N(N), .IW(IW)) u_pick (.vec(elig), .start(rr_ptr),
    .found(pick_found), .idx(pick));

  function automatic logic [CW-1:0] cidx(input logic [IW-1:0] i);
    return CW'(int'(i) / NH);
  endfunction
  function automatic logic [HW-1:0] hidx(input logic [IW-1:0] i);
    return HW'(int'(i) % NH);
  endfunction
  function automatic logic [IW-1:0] tid2idx(input logic [31:0] tid);
    return IW'(int'(tid[11:4]) * NH + int'(tid[3:0]));
  endfunction

  wire host_cmd = acc_wr && paddr == 8'h10;
  wire hc_busy  = (hc_state[sel_c][sel_h] == HC_RUNNING) || (hc_state[sel_c][sel_h] == HC_JOIN);

  // the FSM serves a host command only when idle; a context request only
  // when no host command is present
  logic serve_host, serve_ctx;
  assign serve_host = host_cmd && st == S_IDLE;
  assign serve_ctx  = !host_cmd && st == S_IDLE && pick_found;


  // state of each join target and of the target named by the picked request
  hc_state_e tgt_state [N];
  hc_state_e pick_tgt_state;
  always_comb
    for (int i = 0; i < N; i++)
      tgt_state[i] = hc_state[cidx(join_tgt[i])][hidx(join_tgt[i])];
  assign pick_tgt_state = hc_state[cidx(tid2idx(thr_a[pick]))][hidx(tid2idx(thr_a[pick]))];

  always_comb begin
    for (int c = 0; c < NC; c++) for (int h = 0; h < NH; h++) ev[c][h] = EV_NONE;
    wr_state    = HC_READY;
    sched_req   = 1'b0;
    issuing_c   = cidx(serve_ctx ? pick : cur);
    thr_ack     = '0;
    thr_result  = '0;
    start_valid = 1'b0;
    start_c     = sel_c;
    start_h     = sel_h;
    start_pc    = r_pc;
    start_sp    = r_sp;
    start_arg   = r_arg;

    // join completion: any waiting HC whose target left RUNNING/JOIN
    for (int i = 0; i < N; i++)
      if (join_wait[i]) begin
        if (hc_state[cidx(IW'(i))][hidx(IW'(i))] != HC_JOIN) ; // waits for state update
        else if (tgt_state[i] != HC_RUNNING && tgt_state[i] != HC_JOIN) begin
          ev[cidx(IW'(i))][hidx(IW'(i))] = EV_JOIN_DONE;
          thr_ack[i] = 1'b1;
        end
      end

    if (serve_host) begin
      unique case (pwdata[2:0])
        3'd1: begin wr_state = HC_READY; ev[sel_c][sel_h] = EV_HOST_WRSTATE; end
        3'd2: if (!hc_busy) begin wr_state = HC_DEBUG; ev[sel_c][sel_h] = EV_HOST_WRSTATE; end
        3'd3: if (hc_state[sel_c][sel_h] == HC_READY) begin
                ev[sel_c][sel_h] = EV_CREATE; start_valid = 1'b1;
              end
        3'd4: if (hc_busy) ev[sel_c][sel_h] = EV_HOST_EXIT;
        default: ;
      endcase
    end else if (serve_ctx) begin
      unique case (thr_op[pick])
        TOP_EXIT: begin
          ev[cidx(pick)][hidx(pick)] = EV_EXIT;
          thr_ack[pick] = 1'b1;
        end
        TOP_JOIN: begin
          if (pick_tgt_state == HC_RUNNING || pick_tgt_state == HC_JOIN)
            ev[cidx(pick)][hidx(pick)] = EV_JOIN_WAIT;
          else
            thr_ack[pick] = 1'b1;
        end
        default: sched_req = 1'b1;   // TOP_CREATE
      endcase
    end else if (st == S_SCHED && res_valid && res_found) begin
      ev[res_c][res_h] = EV_CREATE;
      start_valid = 1'b1;
      start_c     = res_c;
      start_h     = res_h;
      start_pc    = thr_a[cur];
      start_arg   = thr_b[cur];
      start_sp    = 32'(DRAM_BYTES - (int'(res_c) * NH + int'(res_h)) * STACK_SIZE - 16);
      thr_ack[cur] = 1'b1;
      thr_result = {20'd0, 8'(res_c), 4'(res_h)};
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      st <= S_IDLE; cur <= '0; rr_ptr <= '0; join_wait <= '0;
      for (int i = 0; i < N; i++) join_tgt[i] <= '0;
      thread_ops <= '0; illegal_events <= '0;
    end else begin
      if (|illegal) illegal_events <= illegal_events + 1;
      thread_ops <= thread_ops + 32'($countones(thr_ack));
      for (int i = 0; i < N; i++)
        // released by the join completing, or by the host terminating the joiner
        if (join_wait[i] && (thr_ack[i] || hc_state[cidx(IW'(i))][hidx(IW'(i))] == HC_TERM_ASYNC))
          join_wait[i] <= 1'b0;
      unique case (st)
        S_IDLE: if (serve_ctx) begin
          cur    <= pick;
          rr_ptr <= (int'(pick) == N - 1) ? '0 : pick + 1'b1;
          if (thr_op[pick] == TOP_CREATE) st <= S_SCHED;
          if (thr_op[pick] == TOP_JOIN && ev[cidx(pick)][hidx(pick)] == EV_JOIN_WAIT) begin
            join_wait[pick] <= 1'b1;
            join_tgt[pick]  <= tid2idx(thr_a[pick]);
          end
        end
        // the table's result is valid in S_SCHED: success is acknowledged
        // there, failure leaves the request pending to be retried
        default:  st <= S_IDLE;
      endcase
    end

  // ------------------------------------------------------------ host side
  typedef enum logic [1:0] { H_IDLE, H_DMA_WAIT, H_DONE } hst_e;
  hst_e hst;
  logic [31:0] dma_rbuf;
  logic        dma_done;

  always_comb begin
    pready = 1'b1;
    prdata = '0;
    unique case (paddr)
      8'h00: prdata = {16'(sel_h), 16'(sel_c)};
      8'h04: prdata = r_pc;
      8'h08: prdata = r_sp;
      8'h0C: prdata = r_arg;
      8'h10: pready = !host_cmd || st == S_IDLE;
      8'h14: prdata = 32'(hc_state[sel_c][sel_h]);
      8'h18: prdata = {16'(hc_affin[sel_c]), 16'(c_affin[sel_c])};
      8'h1C: prdata = r_dma_addr;
      8'h20: begin pready = dma_done; prdata = dma_rbuf; end
      8'h24: prdata = r_iram_addr;
      8'h2C: prdata = 32'(r_inst_idx);
      8'h30: prdata = inst_value[31:0];
      8'h34: prdata = 32'(inst_value[32]);
      8'h38: prdata = 32'(r_per_addr);
      8'h3C: begin pready = per_ack; prdata = per_rdata; end
      8'h40: prdata = thread_ops;
      default: ;
    endcase
  end

  assign aff_we     = acc_wr && paddr == 8'h18;
  assign iram_we    = acc_wr && paddr == 8'h28;
  assign iram_ctx   = sel_c;
  assign iram_addr  = r_iram_addr;
  assign iram_wdata = pwdata;
  assign inst_we    = acc_wr && paddr == 8'h2C && !pwdata[15];
  assign inst_idx   = inst_we ? pwdata[3:0] : r_inst_idx;
  assign inst_event = pwdata[12:8];
  assign dma_req    = acc && paddr == 8'h20 && hst == H_IDLE && !dma_done;
  assign dma_we     = pwrite;
  assign dma_addr   = r_dma_addr;
  assign dma_wdata  = pwdata;
  assign per_req    = acc && paddr == 8'h3C;
  assign per_we     = pwrite;
  assign per_addr   = r_per_addr;
  assign per_wdata  = pwdata;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      sel_c <= '0; sel_h <= '0; r_pc <= '0; r_sp <= '0; r_arg <= '0;
      r_dma_addr <= '0; r_iram_addr <= '0; r_inst_idx <= '0; r_per_addr <= '0;
      hst <= H_IDLE; dma_rbuf <= '0; dma_done <= 1'b0;
    end else begin
      dma_done <= 1'b0;
      if (acc_wr) unique case (paddr)
        8'h00: begin sel_c <= CW'(pwdata[7:0]); sel_h <= HW'(pwdata[15:8]); end
        8'h04: r_pc  <= pwdata;
        8'h08: r_sp  <= pwdata;
        8'h0C: r_arg <= pwdata;
        8'h1C: r_dma_addr  <= pwdata;
        8'h24: r_iram_addr <= pwdata;
        8'h28: r_iram_addr <= r_iram_addr + 32'd4;
        8'h2C: r_inst_idx  <= pwdata[3:0];
        8'h38: r_per_addr  <= pwdata[7:0];
        default: ;
      endcase
      unique case (hst)
        H_IDLE: if (dma_req && dma_gnt) begin
          if (pwrite) begin dma_done <= 1'b1; r_dma_addr <= r_dma_addr + 32'd4; end
          else hst <= H_DMA_WAIT;
        end
        H_DMA_WAIT: if (dma_rvalid) begin
          dma_rbuf <= dma_rdata; dma_done <= 1'b1; hst <= H_DONE;
          r_dma_addr <= r_dma_addr + 32'd4;
        end
        H_DONE: hst <= H_IDLE;   // one cycle for the completed transfer
        default: hst <= H_IDLE;
      endcase
    end

  // a thread request is held until it is acknowledged
  for (genvar i = 0; i < N; i++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n)
      thr_req[i] && !thr_ack[i] |=> thr_req[i])
      else $error("thread request %0d dropped before acknowledge", i);
  end
endmodule
