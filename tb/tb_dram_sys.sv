// tb_dram_sys: every Context channel and any-bank channel issues random
// reads and writes (held until granted) into a small banked memory. The
// testbench keeps a memory model updated at each grant, checks that each
// bank grants at most one request per clock, that read data returns
// exactly 1 + XBAR_PIPE clocks after the grant on the right channel with
// the model's value, and that bank conflicts are counted. Run with
// XBAR_PIPE = 1 to cover the pipelined crossbar.
module tb_dram_sys;
  localparam int NC = 2, BANKS = 4, DRAM_BYTES = 1024, NX = 3, XBAR_PIPE = 1;
  localparam int LAT = 1 + XBAR_PIPE, NCH = NC * BANKS + NX, WORDS = DRAM_BYTES / 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NC*BANKS-1:0] c_req = '0, c_we = '0, c_gnt, c_rvalid;
  logic [31:0] c_addr [NC*BANKS], c_wdata [NC*BANKS], c_rdata [NC*BANKS];
  logic [NX-1:0] x_req = '0, x_we = '0, x_gnt, x_rvalid;
  logic [31:0] x_addr [NX], x_wdata [NX], x_rdata [NX];
  logic [31:0] conflicts;
  logic [31:0] model [WORDS];
  bit written [WORDS];
  int checks = 0, failures = 0, cyc = 0, n_conf = 0;
  // expected read returns per channel: value and clock
  logic [31:0] exp_v [NCH][$];
  int exp_t [NCH][$];

  dram_sys #(.NC(NC), .BANKS(BANKS), .DRAM_BYTES(DRAM_BYTES), .NX(NX), .XBAR_PIPE(XBAR_PIPE)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] new_addr(int ch);
    int b;
    b = (ch < NC * BANKS) ? ch % BANKS : $urandom % BANKS;
    return (($urandom % (WORDS / BANKS)) * BANKS + b) * 4;
  endfunction

  // drive new requests at the negative edge
  always @(negedge clk) if (rst_n) begin
    for (int ch = 0; ch < NCH; ch++) begin
      bit busy;
      busy = (ch < NC * BANKS) ? c_req[ch] : x_req[ch - NC * BANKS];
      if (!busy && ($urandom % 3 == 0)) begin
        logic [31:0] a; bit w;
        a = new_addr(ch);
        w = !written[a / 4] || ($urandom % 2);
        if (ch < NC * BANKS) begin
          c_req[ch] = 1; c_we[ch] = w; c_addr[ch] = a; c_wdata[ch] = $urandom;
        end else begin
          x_req[ch - NC*BANKS] = 1; x_we[ch - NC*BANKS] = w; x_addr[ch - NC*BANKS] = a;
          x_wdata[ch - NC*BANKS] = $urandom;
        end
      end
    end
  end

  // grants, read returns and the model at the positive edge
  always @(posedge clk) if (rst_n) begin
    int per_bank [BANKS];
    bit clr [NCH];
    cyc++;
    for (int ch = 0; ch < NCH; ch++) clr[ch] = 0;
    for (int b = 0; b < BANKS; b++) per_bank[b] = 0;
    if (conflicts != 32'(n_conf)) begin
      checks++; failures++; $display("FAIL conflicts %0d want %0d", conflicts, n_conf);
    end
    begin
      int want_cnt [BANKS];
      for (int b = 0; b < BANKS; b++) want_cnt[b] = 0;
      for (int ch = 0; ch < NC * BANKS; ch++) if (c_req[ch]) want_cnt[ch % BANKS]++;
      for (int x = 0; x < NX; x++) if (x_req[x]) want_cnt[(x_addr[x] >> 2) % BANKS]++;
      for (int b = 0; b < BANKS; b++) if (want_cnt[b] > 1) begin n_conf++; break; end
    end
    for (int ch = 0; ch < NCH; ch++) begin
      bit g, rv, we; logic [31:0] a, wd, rdat;
      if (ch < NC * BANKS) begin
        g = c_gnt[ch]; rv = c_rvalid[ch]; we = c_we[ch]; a = c_addr[ch]; wd = c_wdata[ch]; rdat = c_rdata[ch];
      end else begin
        g = x_gnt[ch-NC*BANKS]; rv = x_rvalid[ch-NC*BANKS]; we = x_we[ch-NC*BANKS];
        a = x_addr[ch-NC*BANKS]; wd = x_wdata[ch-NC*BANKS]; rdat = x_rdata[ch-NC*BANKS];
      end
      if (rv) begin
        checks++;
        if (exp_v[ch].size() == 0) begin failures++; $display("FAIL unexpected rvalid ch%0d", ch); end
        else begin
          logic [31:0] v; int t;
          v = exp_v[ch].pop_front(); t = exp_t[ch].pop_front();
          if (rdat != v || cyc != t) begin
            failures++; $display("FAIL ch%0d read %h want %h at %0d want %0d", ch, rdat, v, cyc, t);
          end
        end
      end
      if (g) begin
        per_bank[(a >> 2) % BANKS]++;
        if (we) begin model[a / 4] = wd; written[a / 4] = 1; end
        else begin exp_v[ch].push_back(model[a / 4]); exp_t[ch].push_back(cyc + LAT); end
        clr[ch] = 1;
      end
    end
    #1;
    for (int ch = 0; ch < NCH; ch++)
      if (clr[ch]) begin
        if (ch < NC * BANKS) c_req[ch] = 0; else x_req[ch - NC*BANKS] = 0;
      end
    for (int b = 0; b < BANKS; b++) begin
      checks++;
      if (per_bank[b] > 1) begin failures++; $display("FAIL bank %0d granted %0d", b, per_bank[b]); end
    end
  end

  initial begin
    for (int i = 0; i < WORDS; i++) begin model[i] = 0; written[i] = 0; end
    for (int i = 0; i < NC * BANKS; i++) begin c_addr[i] = '0; c_wdata[i] = '0; end
    for (int i = 0; i < NX; i++) begin x_addr[i] = '0; x_wdata[i] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (3000) @(posedge clk);
    checks++;
    if (n_conf == 0) begin failures++; $display("FAIL no conflict seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
