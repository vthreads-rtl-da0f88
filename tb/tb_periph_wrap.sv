// tb_periph_wrap: three register accessors and two peripherals of two
// memory masters each. Checks the ID, CTRL (start pulse) and STATUS
// registers of each window, forwarding of user registers (write strobe,
// offset, data, read-back), the one-clock acknowledge, fair service of
// accessors that all request at once, and the memory aggregator: writes
// and reads of all masters reach the DRAM channel in grant order and each
// read returns on the master that issued it.
module tb_periph_wrap;
  localparam int NA = 3, KP = 2, M = 2, NM = KP * M;
  localparam logic [31:0] PID = 32'h5654_0100;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NA-1:0] a_req = '0, a_we = '0, a_ack;
  logic [7:0] a_addr [NA];
  logic [31:0] a_wdata [NA], a_rdata;
  logic [KP-1:0] p_start, p_busy = 2'b10, p_done = 2'b01, p_we;
  logic [7:0] p_addr;
  logic [31:0] p_wdata, p_rdata [KP];
  logic [NM-1:0] pm_req = '0, pm_we = '0, pm_gnt, pm_rvalid;
  logic [31:0] pm_addr [NM], pm_wdata [NM], pm_rdata;
  logic d_req, d_we, d_gnt, d_rvalid = 0;
  logic [31:0] d_addr, d_wdata, d_rdata = '0;
  logic [31:0] user [KP][128];
  logic [31:0] mem [256];
  int checks = 0, failures = 0;

  periph_wrap #(.NA(NA), .KP(KP), .M(M), .PERIPH_ID(PID)) dut (.*);

  // peripherals: user registers
  always_comb for (int k = 0; k < KP; k++) p_rdata[k] = user[k][p_addr[6:0]];
  always @(posedge clk) for (int k = 0; k < KP; k++) if (p_we[k]) user[k][p_addr[6:0]] <= p_wdata;
  // DRAM channel model: random grant, read data two clocks later
  int rd_cnt = 0;
  logic [31:0] rd_hold;
  always @(negedge clk) d_gnt = d_req && ($urandom % 2);
  always @(posedge clk) begin
    d_rvalid <= 0;
    if (rd_cnt > 0) begin rd_cnt--; if (rd_cnt == 0) begin d_rvalid <= 1; d_rdata <= rd_hold; end end
    if (d_req && d_gnt) begin
      if (d_we) mem[d_addr[9:2]] = d_wdata;
      else begin rd_hold = mem[d_addr[9:2]]; rd_cnt = 2; end
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
  task automatic acc(int i, bit w, logic [7:0] a, logic [31:0] d, output logic [31:0] q);
    int n;
    @(negedge clk); a_req[i] = 1; a_we[i] = w; a_addr[i] = a; a_wdata[i] = d;
    n = 0;
    @(posedge clk); #1;
    while (!a_ack[i]) begin @(posedge clk); #1; n++; end
    q = a_rdata;
    a_req[i] = 0;
  endtask

  int n_start;
  always @(posedge clk) n_start += $countones(p_start);

  logic [31:0] q;
  initial begin
    n_start = 0;
    for (int i = 0; i < NA; i++) begin a_addr[i] = 0; a_wdata[i] = 0; end
    for (int i = 0; i < NM; i++) begin pm_addr[i] = 0; pm_wdata[i] = 0; end
    for (int k = 0; k < KP; k++) for (int r = 0; r < 128; r++) user[k][r] = 0;
    for (int r = 0; r < 256; r++) mem[r] = r;
    repeat (2) @(posedge clk);
    rst_n = 1;
    acc(0, 0, 8'd0, 0, q);   chk(q == PID, "ID of peripheral 0");
    acc(1, 0, 8'd128, 0, q); chk(q == PID + 1, "ID of peripheral 1");
    acc(2, 0, 8'd2, 0, q);   chk(q == 32'h1 << 1, "STATUS of peripheral 0 = {done, busy}");
    acc(2, 0, 8'd130, 0, q); chk(q == 32'h1, "STATUS of peripheral 1");
    acc(0, 1, 8'd129, 1, q); chk(n_start == 1, "CTRL start pulse");
    acc(0, 1, 8'd129, 0, q); chk(n_start == 1, "no start pulse for bit0 = 0");
    for (int r = 0; r < 20; r++) begin
      int k, off; logic [31:0] v;
      k = $urandom % KP; off = 3 + $urandom % 100; v = $urandom;
      acc(r % NA, 1, 8'(k * 128 + off), v, q);
      acc((r + 1) % NA, 0, 8'(k * 128 + off), 0, q);
      chk(q == v && user[k][off] == v, "user register write and read-back");
    end
    // all accessors at once: each is served, one per clock
    @(negedge clk);
    for (int i = 0; i < NA; i++) begin a_req[i] = 1; a_we[i] = 0; a_addr[i] = 8'd0; end
    begin
      logic [NA-1:0] seen; int n;
      seen = 0; n = 0;
      while (seen != '1 && n < 10) begin
        @(posedge clk); #1; n++;
        chk($countones(a_ack) <= 1, "one acknowledge per clock");
        seen |= a_ack;
        a_req &= ~a_ack;
      end
      chk(seen == '1 && n == NA, $sformatf("all accessors served in %0d clocks", n));
    end
    // memory masters
    for (int rep = 0; rep < 30; rep++) begin
      int m; bit w; logic [31:0] a, v;
      m = $urandom % NM; w = $urandom % 2; a = ($urandom % 256) * 4; v = $urandom;
      @(negedge clk); pm_req[m] = 1; pm_we[m] = w; pm_addr[m] = a; pm_wdata[m] = v;
      @(posedge clk); #1;
      while (!pm_gnt[m]) begin @(posedge clk); #1; end
      pm_req[m] = 0;
      if (!w) begin
        int n; n = 0;
        while (!pm_rvalid[m] && n < 50) begin @(posedge clk); #1; n++; end
        chk(pm_rvalid[m] && pm_rdata == mem[a[9:2]], "master read");
      end else begin
        repeat (12) @(posedge clk);
        chk(mem[a[9:2]] == v, "master write");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
