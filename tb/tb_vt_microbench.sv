// tb_vt_microbench: thread-primitive latency micro-benchmarks on the full
// design at its default size (8 Contexts of one HC).
//
// Three measurements, each in clocks, taken from the signals between the
// Contexts and the thread manager:
//  1. create: from the main thread raising its create request to the
//     first instruction word issued by the new thread;
//  2. join: from a worker raising its exit request to the main thread's
//     pending join being acknowledged;
//  3. create & join: main creates a thread running an empty function and
//     joins it at once; from the create request to the join acknowledge.
// The host loads the program, makes every HC READY and starts main. Each
// measured latency must be within a bound (32, 32 and 64 clocks), the
// results are printed, and the worker threads must have run on Contexts
// other than main's. The three measurements are the micro-benchmarks of the
// architecture's evaluation; the program, the measurement points at the
// thread-manager boundary and the bounds are this testbench's choices.
module tb_vt_microbench;
  import vt_pkg::*;
  import vt_asm_pkg::*;

  localparam int NC = 8, NH = 1, KP = 2, M = 1;
  localparam int EMPTY_PC = 32'h100, LOOP_PC = 32'h140;

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
    repeat (20000) @(posedge clk);
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

  // ---------------------------------------------------------------- measurement
  int cyc = 0;
  int t_create1 = -1, t_issue1 = -1, t_create3 = -1, t_join3 = -1, t_exit2 = -1, t_join2 = -1;
  int n_creates = 0, n_joins = 0;
  logic [7:0] prev_req;
  always @(posedge clk) begin
    cyc++;
    prev_req <= dut.u_dbg.thr_req;
    if (rst_n) begin
      // main is HC 0 of Context 0 (request index 0)
      if (dut.u_dbg.thr_req[0] && !prev_req[0] && dut.u_dbg.thr_op[0] == TOP_CREATE) begin
        n_creates++;
        if (n_creates == 1) t_create1 = cyc;
        if (n_creates == 2) t_create3 = cyc;
      end
      // first word issued by a Context other than 0 after the first create
      if (t_create1 >= 0 && t_issue1 < 0 && dut.events[16] && !dut.events[0]) t_issue1 = cyc;
      for (int i = 1; i < NC; i++)
        if (dut.u_dbg.thr_req[i] && !prev_req[i] && dut.u_dbg.thr_op[i] == TOP_EXIT &&
            n_creates == 1 && t_exit2 < 0 && t_issue1 >= 0) t_exit2 = cyc;
      if (dut.u_dbg.thr_ack[0] && dut.u_dbg.thr_op[0] == TOP_JOIN) begin
        n_joins++;
        if (n_joins == 1) t_join2 = cyc;
        if (n_joins == 2) t_join3 = cyc;
      end
    end
  end

  logic [31:0] d;
  initial begin
    prev_req = '0;
    // main: test 1 and 2 (create a looping worker, join it), then test 3
    b2("", s_rri(OP_ADDI, 10, 0, LOOP_PC), s_rri(OP_ADDI, 11, 0, 20));
    b1("", s_rrr(OP_CREATE, 13, 10, 11));
    b1("", s_rrr(OP_JOIN, 0, 13, 0));
    b1("", s_rri(OP_ADDI, 10, 0, EMPTY_PC));
    b1("", s_rrr(OP_CREATE, 14, 10, 0));
    b1("", s_rrr(OP_JOIN, 0, 14, 0));
    b1("", s_rrr(OP_EXIT, 0, 0, 0));
    // empty function
    org(EMPTY_PC);
    b1("", s_rrr(OP_EXIT, 0, 0, 0));
    // worker: count its argument down, then exit
    org(LOOP_PC);
    b1("loop", s_rri(OP_ADDI, 3, 3, -1));
    b1("", s_rri(OP_BNEZ, 0, 3, back_to("loop")));
    b1("", s_rrr(OP_EXIT, 0, 0, 0));

    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < NC; c++) begin
      apb_write(8'h00, c);
      apb_write(8'h24, 0);
      foreach (prog[i]) apb_write(8'h28, prog[i]);
      apb_write(8'h10, 1);
    end
    apb_write(8'h00, 0);
    apb_write(8'h04, 0);
    apb_write(8'h08, 32'h3_0000);
    apb_write(8'h10, 3);
    // wait for main to finish
    do apb_read(8'h14, d); while (d != HC_READY);
    apb_read(8'h40, d);
    check(d == 7, $sformatf("seven thread primitives acknowledged (%0d)", d));
    check(t_create1 >= 0 && t_issue1 > t_create1, "test 1 measured");
    check(t_exit2 > 0 && t_join2 > t_exit2, "test 2 measured");
    check(t_create3 > 0 && t_join3 > t_create3, "test 3 measured");
    $display("create: %0d clocks", t_issue1 - t_create1);
    $display("join: %0d clocks", t_join2 - t_exit2);
    $display("create & join: %0d clocks", t_join3 - t_create3);
    check(t_issue1 - t_create1 <= 32, "create within 32 clocks");
    check(t_join2 - t_exit2 <= 32, "join within 32 clocks");
    check(t_join3 - t_create3 <= 64, "create & join within 64 clocks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
