// tb_iram_banked: fills a small IRAM with random syllables and random stop
// bits, then fetches at every syllable address (so LIWs that straddle a
// line boundary use both banks) and checks the W syllables, the LIW length
// from the stop bits and the one-clock read latency; a write in the same
// clock as a fetch takes priority and the fetch returns nothing.
module tb_iram_banked;
  localparam int W = 2, IRAM_BYTES = 256;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr_en = 0, rd_en = 0, rd_valid;
  logic [31:0] wr_addr = '0, wr_data = '0, rd_pc = '0, syll [W];
  logic [1:0] len;
  logic [31:0] img [IRAM_BYTES / 4];
  int checks = 0, failures = 0;

  iram_banked #(.W(W), .IRAM_BYTES(IRAM_BYTES)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < IRAM_BYTES / 4; i++) begin
      @(negedge clk);
      img[i] = $urandom;
      wr_en = 1; wr_addr = i * 4; wr_data = img[i];
    end
    @(negedge clk); wr_en = 0;
    for (int rep = 0; rep < 3; rep++)
      for (int i = 0; i < IRAM_BYTES / 4 - W; i++) begin
        int wl;
        @(negedge clk); rd_en = 1; rd_pc = i * 4;
        @(negedge clk); rd_en = 0;
        wl = W;
        for (int k = W - 1; k >= 0; k--) if (img[i + k][31]) wl = k + 1;
        checks++;
        if (!rd_valid || len != 2'(wl) || syll[0] != img[i] || syll[1] != img[i + 1]) begin
          failures++; $display("FAIL fetch at %0d: len %0d want %0d", i * 4, len, wl);
        end
      end
    @(negedge clk); rd_en = 1; wr_en = 1; wr_addr = 0; wr_data = 32'h1;
    @(negedge clk); rd_en = 0; wr_en = 0;
    checks++;
    if (rd_valid) begin failures++; $display("FAIL fetch during write returned data"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
