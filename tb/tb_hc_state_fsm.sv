// tb_hc_state_fsm: walks one HyperContext state machine through every
// transition (host write, create, join wait and completion, synchronous
// and asynchronous termination) and a few illegal events, checking the
// state one clock after each event and that the terminated states last
// exactly one clock before READY.
module tb_hc_state_fsm;
  import vt_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  hc_event_e ev = EV_NONE;
  hc_state_e wr_state = HC_READY, state;
  logic illegal;
  int checks = 0, failures = 0;

  hc_state_fsm dut (.*);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(hc_event_e e, hc_state_e want, bit want_ill = 0, hc_state_e ws = HC_READY);
    @(negedge clk); ev = e; wr_state = ws;
    #1 checks++;
    if (illegal !== want_ill) begin failures++; $display("FAIL illegal flag for %s in %s", e.name(), state.name()); end
    @(negedge clk); ev = EV_NONE;
    checks++;
    if (state != want) begin failures++; $display("FAIL after %s: %s, want %s", e.name(), state.name(), want.name()); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    checks++; if (state != HC_DEBUG) begin failures++; $display("FAIL reset state"); end
    step(EV_CREATE, HC_DEBUG, 1);                    // no create in DEBUG
    step(EV_HOST_WRSTATE, HC_READY, 0, HC_READY);
    step(EV_HOST_WRSTATE, HC_DEBUG, 0, HC_DEBUG);
    step(EV_HOST_WRSTATE, HC_READY, 0, HC_READY);
    step(EV_CREATE, HC_RUNNING);
    step(EV_JOIN_WAIT, HC_JOIN);
    step(EV_EXIT, HC_JOIN, 1);                       // a waiting HC does not execute
    step(EV_JOIN_DONE, HC_RUNNING);
    // synchronous exit: TERM_SYNC for one clock, then READY
    @(negedge clk); ev = EV_EXIT;
    @(negedge clk); ev = EV_NONE;
    checks++; if (state != HC_TERM_SYNC) begin failures++; $display("FAIL no TERM_SYNC"); end
    @(negedge clk);
    checks++; if (state != HC_READY) begin failures++; $display("FAIL TERM_SYNC -> READY"); end
    step(EV_CREATE, HC_RUNNING);
    step(EV_JOIN_WAIT, HC_JOIN);
    // host termination while waiting
    @(negedge clk); ev = EV_HOST_EXIT;
    @(negedge clk); ev = EV_NONE;
    checks++; if (state != HC_TERM_ASYNC) begin failures++; $display("FAIL no TERM_ASYNC"); end
    @(negedge clk);
    checks++; if (state != HC_READY) begin failures++; $display("FAIL TERM_ASYNC -> READY"); end
    step(EV_CREATE, HC_RUNNING);
    step(EV_HOST_WRSTATE, HC_RUNNING, 1, HC_DEBUG);  // host may not force DEBUG while running
    step(EV_HOST_EXIT, HC_TERM_ASYNC);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
