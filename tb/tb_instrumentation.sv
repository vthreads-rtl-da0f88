// tb_instrumentation: attaches the counters to random events, drives
// random event vectors and compares every counter with a model, including
// re-attaching (which clears) and a counter left on event 0.
module tb_instrumentation;
  localparam int NCNT = 16, CW = 33, NEV = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NEV-1:0] events = '0;
  logic cfg_we = 0;
  logic [3:0] cfg_idx = '0, rd_idx = '0;
  logic [4:0] cfg_event = '0;
  logic [CW-1:0] rd_value;
  int checks = 0, failures = 0;
  int sel_m [NCNT];
  longint cnt_m [NCNT];

  instrumentation #(.NCNT(NCNT), .CW(CW), .NEV(NEV)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int i = 0; i < NCNT; i++) begin
      rd_idx = 4'(i); #1;
      checks++;
      if (rd_value != CW'(cnt_m[i])) begin
        failures++; $display("FAIL counter %0d = %0d, want %0d", i, rd_value, cnt_m[i]);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < NCNT; i++) begin sel_m[i] = 0; cnt_m[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 4; round++) begin
      for (int i = 1; i < NCNT; i++) begin
        @(negedge clk);
        cfg_we = 1; cfg_idx = 4'(i); cfg_event = 5'($urandom);
        events = '0;
        @(posedge clk);
        for (int j = 0; j < NCNT; j++) if (j != i && events[sel_m[j]]) cnt_m[j]++;
        sel_m[i] = cfg_event; cnt_m[i] = 0;
        #1 cfg_we = 0;
      end
      for (int t = 0; t < 200; t++) begin
        @(negedge clk);
        events = NEV'($urandom) & NEV'($urandom);
        @(posedge clk);
        for (int j = 0; j < NCNT; j++) if (events[sel_m[j]]) cnt_m[j]++;
      end
      @(negedge clk); events = '0;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
