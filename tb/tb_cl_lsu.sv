// tb_cl_lsu: runs random memory words (two LSU channels, loads and stores,
// often to the same bank) through the Load/Store Unit against a
// behavioural banked memory that grants after random delays and returns
// read data 1 to 3 clocks later. Checks the bank each request goes to, the
// effective addresses, the loaded values against a memory model, one
// `done` pulse per word, `busy` while the word is in flight, and the
// fastest case: a lone store completes in one clock when granted at once.
module tb_cl_lsu;
  localparam int NCL = 2, BANKS = 4, WORDS = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, busy, done;
  logic [NCL-1:0] v = '0, we = '0;
  logic [31:0] base [NCL], offs [NCL], wdata [NCL], rdata [NCL];
  logic [BANKS-1:0] m_req, m_we, m_gnt = '0, m_rvalid = '0;
  logic [31:0] m_addr [BANKS], m_wdata [BANKS], m_rdata [BANKS];
  logic [31:0] mem [WORDS];
  int checks = 0, failures = 0;
  int grant_always = 0;

  cl_lsu #(.NCL(NCL), .BANKS(BANKS)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // behavioural memory: per bank, a pending read returns after a delay
  int rd_wait [BANKS];
  logic [31:0] rd_val [BANKS];
  always @(negedge clk) if (rst_n)
    for (int b = 0; b < BANKS; b++) begin
      m_rvalid[b] = 0;
      if (rd_wait[b] > 0) begin
        rd_wait[b]--;
        if (rd_wait[b] == 0) begin m_rvalid[b] = 1; m_rdata[b] = rd_val[b]; end
      end
      m_gnt[b] = m_req[b] && (grant_always || ($urandom % 3 != 0));
    end
  always @(posedge clk) if (rst_n)
    for (int b = 0; b < BANKS; b++)
      if (m_req[b] && m_gnt[b]) begin
        checks++;
        if ((m_addr[b] >> 2) % BANKS != b) begin failures++; $display("FAIL wrong bank %0d", b); end
        if (m_we[b]) mem[(m_addr[b] >> 2) % WORDS] = m_wdata[b];
        else begin rd_val[b] = mem[(m_addr[b] >> 2) % WORDS]; rd_wait[b] = 1 + $urandom % 3; end
      end

  initial begin
    for (int i = 0; i < WORDS; i++) mem[i] = $urandom;
    for (int b = 0; b < BANKS; b++) begin rd_wait[b] = 0; rd_val[b] = 0; m_rdata[b] = 0; end
    for (int c = 0; c < NCL; c++) begin base[c] = 0; offs[c] = 0; wdata[c] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      logic [31:0] want [NCL];
      int ndone, cycles;
      @(negedge clk);
      start = 1;
      for (int c = 0; c < NCL; c++) begin
        v[c] = ($urandom % 4) != 0; we[c] = $urandom % 2;
        base[c] = ($urandom % 32) * 4; offs[c] = ($urandom % 32) * 4; wdata[c] = $urandom;
      end
      if (v == 0) v[0] = 1;
      if (v == 2'b11 && we == 2'b11 && ((base[0] + offs[0]) == (base[1] + offs[1])))
        offs[1] = offs[1] + 4;   // two stores to one word in one LIW: avoided
      // the loads see memory as it is before this word's stores
      for (int c = 0; c < NCL; c++) want[c] = mem[((base[c] + offs[c]) >> 2) % WORDS];
      if (v == 2'b11 && !we[1] && we[0] && base[0] + offs[0] == base[1] + offs[1]) want[1] = wdata[0];
      if (v == 2'b11 && !we[0] && we[1] && base[0] + offs[0] == base[1] + offs[1]) v[1] = 0;
      @(negedge clk); start = 0;
      checks++; if (!busy) begin failures++; $display("FAIL not busy after start"); end
      ndone = 0; cycles = 0;
      while (!done) begin @(negedge clk); cycles++; if (cycles > 40) break; end
      ndone = done;
      for (int c = 0; c < NCL; c++)
        if (v[c] && !we[c]) begin
          checks++;
          if (rdata[c] != want[c]) begin failures++; $display("FAIL load %0d got %h want %h", c, rdata[c], want[c]); end
        end
        else if (v[c] && we[c]) begin
          checks++;
          if (mem[((base[c] + offs[c]) >> 2) % WORDS] != wdata[c]) begin failures++; $display("FAIL store %0d", c); end
        end
      @(negedge clk);
      checks++;
      if (ndone != 1 || done || busy) begin failures++; $display("FAIL done/busy at word %0d", t); end
    end
    // latency of a lone store granted at once: done one clock after start
    grant_always = 1;
    @(negedge clk); start = 1; v = 2'b01; we = 2'b01; base[0] = 0; offs[0] = 8; wdata[0] = 32'hABCD;
    @(negedge clk); start = 0;
    @(negedge clk);
    checks++; if (!done) begin failures++; $display("FAIL store latency"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
