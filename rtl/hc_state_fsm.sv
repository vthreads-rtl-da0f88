// hc_state_fsm: private thread state of one HyperContext (HC).
//
// Every HC starts in DEBUG. A host state write moves it to READY, where it
// can be allocated to a thread: a create (host command or a vthread_create
// executed by another HC) moves it to RUNNING. A running HC leaves RUNNING
// when the host terminates it asynchronously (via TERM_ASYNC), when the
// thread exits (via TERM_SYNC), or when it joins a thread that still runs
// (to JOIN, where it stays until that thread has terminated and then
// resumes RUNNING). The two terminated states last one cycle each and then
// fall to READY, as the architecture keeps them as place-holders.
//
// The transitions are those of the architecture's HC state diagram. The
// host may also write DEBUG into a non-running HC (this design's choice, so
// that the host can park an HC again). Events that do not apply to the
// current state are ignored; `illegal` pulses for one cycle when that
// happens so that the DBG_IF can count it.
module hc_state_fsm
  import vt_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  hc_event_e  ev,
  input  hc_state_e  wr_state,   // value for EV_HOST_WRSTATE
  output hc_state_e  state,
  output logic       illegal
);
  hc_state_e nxt;

  always_comb begin
    nxt     = state;
    illegal = 1'b0;
    unique case (state)
      HC_DEBUG, HC_READY: begin
        if (ev == EV_HOST_WRSTATE && (wr_state == HC_DEBUG || wr_state == HC_READY))
          nxt = wr_state;
        else if (ev == EV_CREATE && state == HC_READY)
          nxt = HC_RUNNING;
        else if (ev != EV_NONE)
          illegal = 1'b1;
      end
      HC_RUNNING: begin
        case (ev)
          EV_NONE:      ;
          EV_HOST_EXIT: nxt = HC_TERM_ASYNC;
          EV_EXIT:      nxt = HC_TERM_SYNC;
          EV_JOIN_WAIT: nxt = HC_JOIN;
          default:      illegal = 1'b1;
        endcase
      end
      HC_JOIN: begin
        case (ev)
          EV_NONE:      ;
          EV_JOIN_DONE: nxt = HC_RUNNING;
          EV_HOST_EXIT: nxt = HC_TERM_ASYNC;
          default:      illegal = 1'b1;
        endcase
      end
      HC_TERM_SYNC, HC_TERM_ASYNC: nxt = HC_READY;
      default: nxt = HC_DEBUG;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) state <= HC_DEBUG;
    else        state <= nxt;
endmodule
