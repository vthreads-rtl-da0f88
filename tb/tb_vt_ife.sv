// tb_vt_ife: fetch engine with two HCs over a small IRAM filled with
// random syllables and random stop bits (LIWs of 1 or 2 syllables that
// straddle IRAM lines). The Mid-Pipe side takes words with a random ready.
// Checks: every word handed out is the next LIW of its HC's sequential
// stream (address, length, syllables, predicted next address); both HCs
// are served; the first word after a start is offered three clocks
// later (PC load, fetch, align into the queue); a redirect re-steers the HC at once, dropping the
// queued words; a branch trained taken in the predictor makes the fetch
// follow the target; a blocked HC is not offered and a stopped HC is not
// fetched.
module tb_vt_ife;
  localparam int NH = 2, W = 2, IRAM_BYTES = 1024, NWORDS = IRAM_BYTES / 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NH-1:0] hc_run = '0, blocked = '0;
  logic start_valid = 0, redir_valid = 0, bp_up_valid = 0, bp_up_taken = 0;
  logic [0:0] start_h = '0, redir_h = '0, bp_up_h = '0, out_h;
  logic [31:0] start_pc = '0, redir_pc = '0, bp_up_pc = '0, bp_up_target = '0;
  logic iram_we = 0;
  logic [31:0] iram_addr = '0, iram_wdata = '0;
  logic out_valid, out_ready = 0, ev_fetch, ev_pred_taken;
  logic [31:0] out_pc, out_pred;
  logic [2:0] out_len;
  logic [W*32-1:0] out_syll;
  logic [31:0] img [NWORDS];
  logic [31:0] exp_pc [NH];
  logic [31:0] taken_pc = 32'hFFFF_FFFF, taken_tgt = '0;
  int checks = 0, failures = 0, served [NH], cyc = 0;

  vt_ife #(.NH(NH), .W(W), .IRAM_BYTES(IRAM_BYTES)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int liw_len(logic [31:0] pc);
    for (int k = 0; k < W; k++) if (img[(pc / 4 + k) % NWORDS][31]) return k + 1;
    return W;
  endfunction

  // consumer: check each accepted word against the HC's expected stream
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (out_valid && out_ready) begin
      int h, l; logic [31:0] nxt;
      h = out_h;
      l = liw_len(exp_pc[h]);
      nxt = (exp_pc[h] == taken_pc) ? taken_tgt : exp_pc[h] + 4 * l;
      checks++;
      if (out_pc != exp_pc[h] || out_len != 3'(l) || out_pred != nxt ||
          out_syll[31:0] != img[exp_pc[h] / 4] || (l == 2 && out_syll[63:32] != img[exp_pc[h] / 4 + 1])) begin
        failures++;
        $display("FAIL hc%0d word at %h (len %0d pred %h), want %h (len %0d pred %h)", h, out_pc, out_len,
                 out_pred, exp_pc[h], l, nxt);
      end
      checks++;
      if (blocked[h]) begin failures++; $display("FAIL blocked HC offered"); end
      exp_pc[h] = nxt;
      served[h]++;
    end
  end
  always @(negedge clk) out_ready = ($urandom % 4) != 0;

  initial begin
    served[0] = 0; served[1] = 0;
    for (int i = 0; i < NWORDS; i++) img[i] = $urandom & 32'h81FF_FFFF;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NWORDS; i++) begin
      @(negedge clk); iram_we = 1; iram_addr = i * 4; iram_wdata = img[i];
    end
    @(negedge clk); iram_we = 0;
    // start both HCs
    exp_pc[0] = 32'h0; exp_pc[1] = 32'h100;
    hc_run = 2'b11;
    start_valid = 1; start_h = 0; start_pc = 32'h0;
    @(negedge clk); start_h = 1; start_pc = 32'h100;
    @(negedge clk); start_valid = 0;
    repeat (300) @(negedge clk);
    checks++;
    if (served[0] < 20 || served[1] < 20) begin failures++; $display("FAIL served %0d %0d", served[0], served[1]); end
    // redirect HC 0
    @(negedge clk); redir_valid = 1; redir_h = 0; redir_pc = 32'h200;
    exp_pc[0] = 32'h200;
    @(negedge clk); redir_valid = 0;
    repeat (100) @(negedge clk);
    // train a taken branch for HC 1 at an address it will reach, then re-steer HC 1 there
    taken_pc = 32'h180; taken_tgt = 32'h40;
    repeat (2) begin
      @(negedge clk); bp_up_valid = 1; bp_up_h = 1; bp_up_pc = taken_pc; bp_up_taken = 1; bp_up_target = taken_tgt;
    end
    @(negedge clk); bp_up_valid = 0;
    redir_valid = 1; redir_h = 1; redir_pc = taken_pc; exp_pc[1] = taken_pc;
    @(negedge clk); redir_valid = 0;
    begin
      int s; s = served[1];
      repeat (40) @(negedge clk);
      checks++; if (served[1] < s + 3) begin failures++; $display("FAIL no words after the taken branch"); end
    end
    // blocked HC 0 is not offered
    blocked = 2'b01;
    repeat (60) @(negedge clk);
    blocked = 2'b00;
    // stop HC 1: no more fetches for it
    hc_run = 2'b01;
    repeat (5) @(negedge clk);
    begin
      int s; s = served[1];
      repeat (60) @(negedge clk);
      checks++; if (served[1] != s) begin failures++; $display("FAIL stopped HC served"); end
    end
    // start latency: HC 1 restarted, first word offered three clocks later
    out_ready = 1;
    hc_run = 2'b10;
    @(negedge clk); start_valid = 1; start_h = 1; start_pc = 32'h20; exp_pc[1] = 32'h20;
    @(negedge clk); start_valid = 0;
    begin
      int n; n = 1;
      while (!(out_valid && out_h == 1)) begin @(negedge clk); n++; end
      checks++;
      if (n != 3) begin failures++; $display("FAIL first word after %0d clocks", n); end
    end
    repeat (10) @(negedge clk);
    $display("served %0d %0d", served[0], served[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
