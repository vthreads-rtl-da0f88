// tb_dbg_if: 2 Contexts of 2 HCs. The testbench plays the host (APB
// register accesses), the HCs (thread primitive requests held until
// acknowledged) and the DRAM, counter and peripheral ports. It checks the
// register map, host state writes, host start and termination, thread
// creation with its one-clock allocation latency, the returned thread id
// and the start values (PC, stack pointer, argument), joins that wait and
// joins that return at once, create stalls while no HC is free, exits,
// DMA writes and reads, IRAM loading with auto-increment, counter reads,
// peripheral accesses, and the acknowledged-primitive count.
module tb_dbg_if;
  import vt_pkg::*;
  localparam int NC = 2, NH = 2, N = 4, DRAM_BYTES = 4096, STACK_SIZE = 256;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic psel = 0, penable = 0, pwrite = 0, pready;
  logic [7:0] paddr = '0;
  logic [31:0] pwdata = '0, prdata;
  logic [N-1:0] thr_req = '0, thr_ack;
  thr_op_e thr_op [N];
  logic [31:0] thr_a [N], thr_b [N], thr_result;
  hc_state_e hc_state [NC][NH];
  logic start_valid, iram_we, dma_req, dma_we, dma_gnt, dma_rvalid = 0, inst_we;
  logic [0:0] start_c, start_h, iram_ctx;
  logic [31:0] start_pc, start_sp, start_arg, iram_addr, iram_wdata;
  logic [31:0] dma_addr, dma_wdata, dma_rdata = '0;
  logic [3:0] inst_idx;
  logic [4:0] inst_event;
  logic [32:0] inst_value;
  logic per_req, per_we, per_ack = 0;
  logic [7:0] per_addr;
  logic [31:0] per_wdata, per_rdata = '0, thread_ops, illegal_events;
  int checks = 0, failures = 0;
  logic [31:0] mem [64];

  dbg_if #(.NC(NC), .NH(NH), .DRAM_BYTES(DRAM_BYTES), .STACK_SIZE(STACK_SIZE)) dut (.*);

  assign inst_value = {1'b1, 28'h0, inst_idx};
  assign dma_gnt = dma_req;
  always @(posedge clk) begin
    dma_rvalid <= dma_req && !dma_we;
    if (dma_req && !dma_we) dma_rdata <= mem[dma_addr[7:2]];
    if (dma_req && dma_we) mem[dma_addr[7:2]] <= dma_wdata;
    per_ack <= per_req && !per_ack;
    per_rdata <= {24'h5A5A5A, per_addr};
  end

  // start events seen by the HC side
  logic [31:0] res0;
  int n_start = 0;
  logic [31:0] last_pc, last_sp, last_arg;
  int last_c, last_h;
  always @(posedge clk) if (start_valid) begin
    n_start++; last_pc = start_pc; last_sp = start_sp; last_arg = start_arg;
    last_c = start_c; last_h = start_h;
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
  // an HC issues a primitive and waits; returns clocks until acknowledge
  task automatic prim(int i, thr_op_e op, logic [31:0] a, logic [31:0] b, output int clocks,
                      input int limit = 200);
    @(negedge clk); thr_req[i] = 1; thr_op[i] = op; thr_a[i] = a; thr_b[i] = b;
    clocks = 0;
    #1;
    while (!thr_ack[i] && clocks < limit) begin @(negedge clk); clocks++; #1; end
    if (i == 0) res0 = thr_result;
    @(posedge clk); #1 thr_req[i] = 0;
  endtask
  function automatic logic [31:0] tid(int c, int h);
    return (c << 4) | h;
  endfunction
  function automatic logic [31:0] sp_of(int c, int h);
    return DRAM_BYTES - (c * NH + h) * STACK_SIZE - 16;
  endfunction

  logic [31:0] d, t1, t2;
  int clk_n;
  initial begin
    for (int i = 0; i < N; i++) begin thr_op[i] = TOP_EXIT; thr_a[i] = 0; thr_b[i] = 0; end
    for (int i = 0; i < 64; i++) mem[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // register map
    apb_write(8'h00, 32'h0000_0100);          // ctx 0, hc 1
    apb_read(8'h00, d); chk(d == 32'h0001_0000, "SEL read-back");
    apb_write(8'h04, 32'h40); apb_write(8'h08, 32'h800); apb_write(8'h0C, 32'h77);
    apb_read(8'h04, d); chk(d == 32'h40, "PC");
    apb_read(8'h08, d); chk(d == 32'h800, "SP");
    apb_read(8'h0C, d); chk(d == 32'h77, "ARG");
    apb_read(8'h14, d); chk(d == HC_DEBUG, "reset state DEBUG");
    // all HCs READY
    for (int c = 0; c < NC; c++) for (int h = 0; h < NH; h++) begin
      apb_write(8'h00, (h << 8) | c); apb_write(8'h10, 1);
    end
    for (int c = 0; c < NC; c++) for (int h = 0; h < NH; h++) chk(hc_state[c][h] == HC_READY, "READY");
    // host start of HC 0.0
    apb_write(8'h00, 0); apb_write(8'h04, 32'h10); apb_write(8'h08, 32'h900); apb_write(8'h0C, 5);
    apb_write(8'h10, 3);
    chk(n_start == 1 && last_pc == 32'h10 && last_sp == 32'h900 && last_arg == 5 && last_c == 0 && last_h == 0,
        "host start values");
    chk(hc_state[0][0] == HC_RUNNING, "host start -> RUNNING");
    // create from HC 0 (ctx 0 hc 0): acknowledged one clock after the request
    prim(0, TOP_CREATE, 32'h100, 32'd7, clk_n);
    t1 = res0;
    chk(clk_n == 1, $sformatf("create latency %0d", clk_n));
    chk(n_start == 2 && last_pc == 32'h100 && last_arg == 7 && last_sp == sp_of(last_c, last_h),
        "create start values");
    chk(t1 == tid(last_c, last_h), "thread id");
    chk(hc_state[last_c][last_h] == HC_RUNNING, "created HC RUNNING");
    // join on the running thread waits; exit of the target completes it
    fork
      prim(0, TOP_JOIN, t1, 0, clk_n);
      begin
        repeat (5) @(negedge clk);
        chk(hc_state[0][0] == HC_JOIN, "joiner waits in JOIN");
        prim(int'(t1[7:4]) * NH + int'(t1[3:0]), TOP_EXIT, 0, 0, clk_n);
      end
    join
    chk(hc_state[0][0] == HC_RUNNING, "joiner running again");
    @(negedge clk);
    chk(hc_state[t1[7:4]][t1[3:0]] == HC_READY, "exited thread READY");
    // join on a terminated thread returns at once
    prim(0, TOP_JOIN, t1, 0, clk_n);
    chk(clk_n == 0, "immediate join");
    // fill all HCs, then a create stalls until one exits
    prim(0, TOP_CREATE, 32'h200, 1, clk_n); t1 = res0;
    prim(0, TOP_CREATE, 32'h200, 2, clk_n); t2 = res0;
    prim(0, TOP_CREATE, 32'h200, 3, clk_n);
    chk(t1 != t2 && t1 != res0 && t2 != res0, "distinct thread ids");
    for (int c = 0; c < NC; c++) for (int h = 0; h < NH; h++) chk(hc_state[c][h] == HC_RUNNING, "all running");
    fork
      prim(0, TOP_CREATE, 32'h300, 9, clk_n, 1000);
      begin
        repeat (30) @(negedge clk);
        chk(thr_req[0] && !thr_ack[0], "create stalls while no HC is free");
        prim(int'(t2[7:4]) * NH + int'(t2[3:0]), TOP_EXIT, 0, 0, clk_n);
      end
    join
    chk(res0 == t2 && last_pc == 32'h300, "stalled create takes the freed HC");
    // host termination
    apb_write(8'h00, (t1[3:0] << 8) | t1[7:4]);
    apb_write(8'h10, 4);
    chk(hc_state[t1[7:4]][t1[3:0]] == HC_TERM_ASYNC, "host exit -> TERM_ASYNC");
    @(posedge clk); #1;
    chk(hc_state[t1[7:4]][t1[3:0]] == HC_READY, "TERM_ASYNC -> READY");
    apb_read(8'h40, d); chk(d == 9, $sformatf("acknowledged primitives %0d", d));
    chk(illegal_events == 0, "no illegal events");
    // DMA
    apb_write(8'h1C, 32'h20);
    apb_write(8'h20, 32'hAAAA_0001);
    apb_write(8'h20, 32'hAAAA_0002);
    chk(mem[8] == 32'hAAAA_0001 && mem[9] == 32'hAAAA_0002, "DMA writes");
    apb_write(8'h1C, 32'h24);
    apb_read(8'h20, d); chk(d == 32'hAAAA_0002, "DMA read");
    apb_read(8'h1C, d); chk(d == 32'h28, "DMA address advanced");
    // IRAM load
    apb_write(8'h00, 1);
    apb_write(8'h24, 32'h40);
    fork
      begin apb_write(8'h28, 32'h1111); apb_write(8'h28, 32'h2222); end
      begin
        int n; n = 0;
        repeat (12) begin
          @(posedge clk);
          if (iram_we) begin
            chk(iram_ctx == 1 && iram_addr == 32'h40 + 4 * n && iram_wdata == (n ? 32'h2222 : 32'h1111), "IRAM write");
            n++;
          end
        end
        chk(n == 2, "two IRAM writes");
      end
    join
    // counters
    apb_write(8'h2C, 32'h8005);
    apb_read(8'h30, d); chk(d == 5, "counter select");
    apb_read(8'h34, d); chk(d == 1, "counter high bit");
    // peripheral space
    apb_write(8'h38, 32'h83);
    apb_read(8'h3C, d); chk(d == 32'h5A5A_5A83, "peripheral read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
