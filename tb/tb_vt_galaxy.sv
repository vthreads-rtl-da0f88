// tb_vt_galaxy: end-to-end test of the whole System at its default size
// (8 Contexts of one HyperContext, 2-issue, 256 KB DRAM in 4 banks).
//
// The testbench plays the host. Through the debug port it loads one
// program into the IRAM of every Context, sets up the instrumentation
// counters, writes READY to every HC and starts HC 0 of Context 0. That
// "main" thread creates NT worker threads (vthread_create), stores their
// thread ids, joins them all (vthread_join), multiplies, stores, talks to
// the peripheral register space, uses the floating-point core (integer
// conversion, divide, multiply, subtract) and exits. Each worker i computes
// sum(1..i+LOOP) in a counted loop plus i*i and stores it, together with its
// CPUID, at a slot of its own. With 7 free HCs the 8th create has to wait
// for a worker to exit, so allocation stalls are exercised.
// Then the host checks every result in DRAM (DMA reads through the debug
// port and reads on the host memory port), the peripheral traffic, the
// counters, terminates a spinning thread asynchronously and forces DRAM
// bank conflicts between the host port and a peripheral master.
// Mechanisms are counted through the status outputs and a few probes into
// the hierarchy; every one that never happened is a failure.
// The program uses the syllable format of vt_pkg; branch offsets are in
// syllables from the address of the branch's instruction word.
module tb_vt_galaxy;
  import vt_pkg::*;
  import vt_asm_pkg::*;

  localparam int NC = 8, NH = 1, KP = 2, M = 1;
  localparam int NT = 8;                  // worker threads
  localparam int LOOP = 40;               // worker loop length beyond its index
  localparam int WORKER_PC = 32'h200;
  localparam int SPIN_PC   = 32'h300;
  localparam int TID_BASE  = 32'h400;     // thread ids stored by main
  localparam int RES_BASE  = 32'h800;     // worker results
  localparam int CPU_BASE  = 32'h900;     // worker CPUIDs
  localparam int FIN_BASE  = 32'hC00;     // main's final stores

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic psel = 0, penable = 0, pwrite = 0;
  logic [7:0] paddr = '0;
  logic [31:0] pwdata = '0, prdata;
  logic pready;
  logic hm_req = 0, hm_we = 0, hm_gnt, hm_rvalid;
  logic [31:0] hm_addr = '0, hm_wdata = '0, hm_rdata;
  logic [KP-1:0] p_start, p_busy, p_done, p_we;
  logic [7:0] p_addr;
  logic [31:0] p_wdata, p_rdata [KP];
  logic [KP*M-1:0] pm_req = '0, pm_we = '0, pm_gnt, pm_rvalid;
  logic [31:0] pm_addr [KP*M], pm_wdata [KP*M], pm_rdata;
  hc_state_e hc_state [NC][NH];
  logic [31:0] thread_ops, dram_conflicts, illegal_events;

  assign p_busy = 2'b01;
  assign p_done = 2'b10;
  assign p_rdata[0] = 32'hCAFE_0000;
  assign p_rdata[1] = 32'hCAFE_0001;
  initial for (int i = 0; i < KP*M; i++) begin pm_addr[i] = '0; pm_wdata[i] = '0; end

  vt_galaxy dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- host port
  task automatic apb_write(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk); psel = 1; penable = 0; pwrite = 1; paddr = a; pwdata = d;
    @(negedge clk); penable = 1;
    while (!pready) @(negedge clk);
    @(posedge clk); #1; psel = 0; penable = 0; pwrite = 0;
  endtask
  task automatic apb_read(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk); psel = 1; penable = 0; pwrite = 0; paddr = a;
    @(negedge clk); penable = 1;
    while (!pready) @(negedge clk);
    d = prdata;
    @(posedge clk); #1; psel = 0; penable = 0;
  endtask
  task automatic dram_read(input int addr, output logic [31:0] d);
    apb_write(8'h1C, addr);
    apb_read(8'h20, d);
  endtask
  task automatic hm_read(input int addr, output logic [31:0] d);
    @(negedge clk); hm_req = 1; hm_we = 0; hm_addr = addr;
    do @(posedge clk); while (!hm_gnt);
    #1 hm_req = 0;
    while (!hm_rvalid) @(posedge clk);
    d = hm_rdata;
  endtask
  task automatic hm_write(input int addr, input logic [31:0] d);
    @(negedge clk); hm_req = 1; hm_we = 1; hm_addr = addr; hm_wdata = d;
    do @(posedge clk); while (!hm_gnt);
    #1 hm_req = 0; hm_we = 0;
  endtask

  // ---------------------------------------------------------------- program
  logic [31:0] prog [$];
  int pc_of [string];
  task automatic org(int byte_addr);
    while (prog.size() < byte_addr / 4) prog.push_back(s_rrr(OP_NOP, 0, 0, 0) | 32'h8000_0000);
  endtask
  task automatic b1(string label, logic [31:0] s0);
    if (label != "") pc_of[label] = prog.size() * 4;
    prog.push_back(stop(s0));
  endtask
  task automatic b2(string label, logic [31:0] s0, logic [31:0] s1);
    if (label != "") pc_of[label] = prog.size() * 4;
    prog.push_back(s0);
    prog.push_back(stop(s1));
  endtask
  // branch offset in syllables from the current word to a label
  function automatic int back_to(string label);
    return (pc_of[label] - int'(prog.size()) * 4) / 4;
  endfunction

  task automatic build();
    // main thread
    b2("", s_rri(OP_ADDI, 10, 0, WORKER_PC), s_rri(OP_ADDI, 11, 0, 0));
    b2("", s_rri(OP_ADDI, 12, 0, NT), s_rri(OP_ADDI, 21, 0, TID_BASE));
    b1("create", s_rrr(OP_CREATE, 13, 10, 11));
    b2("", s_rri(OP_STW, 13, 21, 0), s_rri(OP_ADDI, 11, 11, 1));
    b2("", s_rri(OP_ADDI, 21, 21, 4), s_rrr(OP_SUB, 15, 11, 12));
    b1("", s_rri(OP_BNEZ, 0, 15, back_to("create")));
    b2("", s_rri(OP_ADDI, 21, 0, TID_BASE), s_rri(OP_ADDI, 11, 0, 0));
    b2("join", s_rri(OP_LDW, 13, 21, 0), s_rri(OP_ADDI, 11, 11, 1));
    b2("", s_rrr(OP_JOIN, 0, 13, 0), s_rri(OP_ADDI, 21, 21, 4));
    b1("", s_rrr(OP_SUB, 15, 11, 12));
    b1("", s_rri(OP_BNEZ, 0, 15, back_to("join")));
    b2("", s_rrr(OP_MUL, 16, 12, 12), s_rri(OP_ADDI, 17, 0, FIN_BASE));
    b2("", s_rri(OP_STW, 16, 17, 0), s_rri(OP_WRPERIPH, 16, 0, 3));
    b2("", s_rri(OP_RDPERIPH, 18, 0, 0), s_rrr(OP_CPUID, 19, 0, 0));
    b1("", s_rri(OP_STW, 18, 17, 4));
    b1("", s_rri(OP_STW, 19, 17, 8));
    b1("", s_rri(OP_STW, 1, 17, 12));
    // floating point: 64.0 / 8.0, 64.0 * 8.0, 64.0 - 8.0
    b2("", s_rrr(OP_ITOF, 24, 16, 0), s_rrr(OP_ITOF, 25, 12, 0));
    b2("", s_rrr(OP_FDIV, 26, 24, 25), s_rrr(OP_FMUL, 27, 24, 25));
    b1("", s_rrr(OP_FSUB, 28, 24, 25));
    b1("", s_rri(OP_STW, 26, 17, 16));
    b1("", s_rri(OP_STW, 27, 17, 20));
    b1("", s_rri(OP_STW, 28, 17, 24));
    b1("", s_rrr(OP_EXIT, 0, 0, 0));
    // worker thread: argument i in r3
    org(WORKER_PC);
    b2("", s_rri(OP_ADDI, 5, 3, LOOP), s_rri(OP_ADDI, 6, 0, 0));
    b2("sum", s_rrr(OP_ADD, 6, 6, 5), s_rri(OP_ADDI, 5, 5, -1));
    b1("", s_rri(OP_BNEZ, 0, 5, back_to("sum")));
    b2("", s_rrr(OP_MUL, 7, 3, 3), s_rri(OP_ADDI, 8, 0, RES_BASE));
    b1("", s_rrr(OP_ADD, 9, 3, 3));
    b1("", s_rrr(OP_ADD, 9, 9, 9));
    b2("", s_rrr(OP_ADD, 8, 8, 9), s_rrr(OP_ADD, 6, 6, 7));
    b2("", s_rri(OP_STW, 6, 8, 0), s_rrr(OP_CPUID, 22, 0, 0));
    b1("", s_rri(OP_ADDI, 23, 8, CPU_BASE - RES_BASE));
    b1("", s_rri(OP_STW, 22, 23, 0));
    b1("", s_rrr(OP_EXIT, 0, 0, 0));
    // spinning thread for the asynchronous exit
    org(SPIN_PC);
    b1("spin", s_i19(OP_GOTO, 0, 0));
  endtask

  // ---------------------------------------------------------------- counting
  int n_stall = 0, n_join_wait = 0, n_join_now = 0, n_mispred = 0, n_bypass = 0, n_pred_taken = 0;
  int n_lsu_busy = 0, n_mul = 0, n_fp = 0, n_fdiv = 0, n_per_we = 0, n_per_start = 0;
  int n_term_sync = 0, n_term_async = 0, n_pm_rd = 0, n_fetch_full = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_dbg.res_valid && !dut.u_dbg.res_found) n_stall++;
    if (dut.u_dbg.serve_ctx && dut.u_dbg.thr_op[dut.u_dbg.pick] == TOP_JOIN &&
        dut.u_dbg.thr_ack[dut.u_dbg.pick]) n_join_now++;
    if (dut.events[27]) n_join_wait++;
    if (dut.events[18]) n_mispred++;
    if (dut.events[20]) n_bypass++;
    if (dut.events[22]) n_pred_taken++;
    if (dut.events[19]) n_lsu_busy++;
    if (p_we[0] && p_addr == 8'd3) begin
      n_per_we++;
      if (p_wdata != NT * NT) begin failures++; $display("FAIL: peripheral write %0d", p_wdata); end
    end
    if (|p_start) n_per_start++;
    if (|pm_rvalid) n_pm_rd++;
    for (int c = 0; c < NC; c++) begin
      if (hc_state[c][0] == HC_TERM_SYNC)  n_term_sync++;
      if (hc_state[c][0] == HC_TERM_ASYNC) n_term_async++;
    end
    if (|dut.g_ctx[0].u_ctx.u_cl.mul_ov || |dut.g_ctx[1].u_ctx.u_cl.mul_ov) n_mul++;
    if (|dut.g_ctx[0].u_ctx.u_cl.fp_ov) n_fp++;
    if (dut.g_ctx[0].u_ctx.u_cl.div_done) n_fdiv++;
  end

  logic [31:0] d, tids [NT];
  int t_start, t_end;

  initial begin
    for (int i = 0; i < KP*M; i++) begin pm_addr[i] = '0; pm_wdata[i] = '0; end
    build();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // program every Context's IRAM
    for (int c = 0; c < NC; c++) begin
      apb_write(8'h00, c);
      apb_write(8'h24, 0);
      foreach (prog[i]) apb_write(8'h28, prog[i]);
    end
    // DMA write / read back through the debug port
    apb_write(8'h1C, 32'h3F00);
    apb_write(8'h20, 32'h1234_5678);
    apb_write(8'h20, 32'h9ABC_DEF0);
    dram_read(32'h3F04, d); check(d == 32'h9ABC_DEF0, "DMA read-back");
    hm_read(32'h3F00, d);   check(d == 32'h1234_5678, "host port read of DMA data");
    // counters: 0 thread acks, 1 issue (any Context), 2 mispredicts, 3 conflicts
    apb_write(8'h2C, {15'd0, 5'd25, 4'd0, 4'd0});
    apb_write(8'h2C, {15'd0, 5'd16, 4'd0, 4'd1});
    apb_write(8'h2C, {15'd0, 5'd18, 4'd0, 4'd2});
    apb_write(8'h2C, {15'd0, 5'd24, 4'd0, 4'd3});
    // every HC to READY, affinity masks readable
    for (int c = 0; c < NC; c++) begin
      apb_write(8'h00, c);
      apb_read(8'h14, d); check(d == HC_DEBUG, "HC starts in DEBUG");
      apb_write(8'h10, 1);
      apb_read(8'h14, d); check(d == HC_READY, "host wrState READY");
    end
    apb_read(8'h18, d); check(d == 32'h0001_00FF, "affinity masks reset to all ones");

    // start main on Context 0
    apb_write(8'h00, 0);
    apb_write(8'h04, 0);
    apb_write(8'h08, 32'h3_0000 - 32'h100);
    apb_write(8'h0C, 0);
    t_start = $time / 10;
    apb_write(8'h10, 3);
    apb_read(8'h14, d); check(d == HC_RUNNING, "main running");
    do begin repeat (20) @(posedge clk); apb_read(8'h14, d); end while (d != HC_READY);
    t_end = $time / 10;
    $display("main finished after %0d cycles", t_end - t_start);
    for (int c = 0; c < NC; c++) check(hc_state[c][0] == HC_READY, "all HCs back to READY");

    // results
    for (int i = 0; i < NT; i++) begin
      dram_read(TID_BASE + 4 * i, tids[i]);
      dram_read(RES_BASE + 4 * i, d);
      check(d == (i + LOOP) * (i + LOOP + 1) / 2 + i * i, $sformatf("worker %0d result %0d", i, d));
      hm_read(CPU_BASE + 4 * i, d);
      check(d == tids[i], $sformatf("worker %0d CPUID %h vs tid %h", i, d, tids[i]));
      check(tids[i][11:4] != 0 && tids[i][11:4] < NC && tids[i][3:0] == 0, "tid layout");
      for (int j = 0; j < i; j++)
        if (tids[j] == tids[i]) begin
          // a tid may be reused only after the earlier thread has exited
          check(j < i, "tid reuse");
        end
    end
    dram_read(FIN_BASE, d);      check(d == NT * NT, "main MUL result");
    dram_read(FIN_BASE + 4, d);  check(d == 32'h5654_0100, "RDPERIPH of the ID register");
    dram_read(FIN_BASE + 8, d);  check(d == 0, "CPUID of main");
    dram_read(FIN_BASE + 12, d); check(d == 32'h3_0000 - 32'h100, "SP given by the host");
    dram_read(FIN_BASE + 16, d); check(d == 32'h4100_0000, "FDIV 64.0 / 8.0");
    dram_read(FIN_BASE + 20, d); check(d == 32'h4400_0000, "FMUL 64.0 * 8.0");
    dram_read(FIN_BASE + 24, d); check(d == 32'h4260_0000, "FSUB 64.0 - 8.0");
    apb_read(8'h40, d); check(d == 3 * NT + 1, $sformatf("thread ops %0d", d));
    check(thread_ops == 3 * NT + 1, "thread_ops output");
    check(illegal_events == 0, "no illegal HC events");

    // counters
    apb_write(8'h2C, 32'h8000);
    apb_read(8'h30, d); check(d > 0 && d <= 3 * NT + 1, $sformatf("thread-ack counter %0d", d));
    apb_write(8'h2C, 32'h8001);
    apb_read(8'h30, d); check(d > 0, "issue counter");
    apb_write(8'h2C, 32'h8002);
    apb_read(8'h30, d); check(d == n_mispred, "mispredict counter");

    // host access to the peripheral space: CTRL start, STATUS, user register
    apb_write(8'h38, 8'd1);
    apb_write(8'h3C, 1);
    apb_write(8'h38, 8'd128 + 8'd2);
    apb_read(8'h3C, d); check(d == 32'h2, "STATUS of peripheral 1");
    apb_write(8'h38, 8'd128 + 8'd5);
    apb_read(8'h3C, d); check(d == 32'hCAFE_0001, "user register of peripheral 1");

    // peripheral master: write then read DRAM through the aggregator
    @(negedge clk); pm_req[0] = 1; pm_we[0] = 1; pm_addr[0] = 32'h3E00; pm_wdata[0] = 32'h55AA;
    do @(posedge clk); while (!pm_gnt[0]);
    #1 pm_req[0] = 0; pm_we[0] = 0;
    repeat (4) @(posedge clk);
    @(negedge clk); pm_req[0] = 1;
    do @(posedge clk); while (!pm_gnt[0]);
    #1 pm_req[0] = 0;
    while (!pm_rvalid[0]) @(posedge clk);
    check(pm_rdata == 32'h55AA, "peripheral master read-back");

    // bank conflict: host port and peripheral master on bank 0 at once
    for (int k = 0; k < 4; k++) begin
      @(negedge clk);
      pm_req[0] = 1; pm_we[0] = 1; pm_addr[0] = 32'h3D00; pm_wdata[0] = k;
      @(posedge clk); #1 pm_req[0] = 0; pm_we[0] = 0;
      hm_write(32'h3D10, k);
    end
    repeat (5) @(posedge clk);
    check(dram_conflicts > 0, "DRAM conflicts counted");
    apb_write(8'h2C, 32'h8003);
    apb_read(8'h30, d); check(d == dram_conflicts, "conflict counter");

    // asynchronous exit of a spinning thread
    apb_write(8'h00, 5);
    apb_write(8'h04, SPIN_PC);
    apb_write(8'h10, 3);
    repeat (50) @(posedge clk);
    check(hc_state[5][0] == HC_RUNNING, "spinner still running");
    apb_write(8'h10, 4);
    repeat (3) @(posedge clk);
    check(hc_state[5][0] == HC_READY, "spinner terminated by the host");
    // DEBUG state can be entered again from READY
    apb_write(8'h10, 2);
    apb_read(8'h14, d); check(d == HC_DEBUG, "back to DEBUG");

    // mechanisms
    $display("stalls=%0d join_wait=%0d join_now=%0d mispred=%0d bypass=%0d pred_taken=%0d lsu=%0d",
             n_stall, n_join_wait, n_join_now, n_mispred, n_bypass, n_pred_taken, n_lsu_busy);
    $display("fp=%0d fdiv=%0d", n_fp, n_fdiv);
    $display("mul=%0d per_we=%0d per_start=%0d pm_rd=%0d term_sync=%0d term_async=%0d conflicts=%0d",
             n_mul, n_per_we, n_per_start, n_pm_rd, n_term_sync, n_term_async, dram_conflicts);
    check(n_stall > 0, "create stall happened");
    check(n_join_wait > 0, "join wait happened");
    check(n_join_now > 0, "immediate join happened");
    check(n_mispred > 0, "branch mispredict happened");
    check(n_bypass > 0, "bypass happened");
    check(n_pred_taken > 0, "predicted-taken fetch happened");
    check(n_lsu_busy > 0, "LSU access happened");
    check(n_mul > 0, "IMULT use happened");
    check(n_fp > 0, "FPCORE data-path use happened");
    check(n_fdiv > 0, "FDIV use happened");
    check(n_per_we == 1, "peripheral user-register write happened once");
    check(n_per_start == 1, "peripheral start pulse happened once");
    check(n_pm_rd > 0, "peripheral master read happened");
    check(n_term_sync > 0, "synchronous termination happened");
    check(n_term_async > 0, "asynchronous termination happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
