// instrumentation: event counters of the instrumentation peripheral.
//
// NCNT counters (16) of CW bits (33), each attached to one of NEV internal
// events by a configuration write (counter index, event number); the write
// also clears the counter. A counter adds one in every clock in which its
// event is high, and wraps at 2^CW. The value of the counter selected by
// `rd_idx` is read combinationally; the host reads it through the DBG_IF.
// The number and width of the counters follow the architecture; the event
// list is set by the System that instantiates it, and the clear-on-attach
// rule is this design's choice.
module instrumentation #(
  parameter int NCNT = 16,
  parameter int CW   = 33,
  parameter int NEV  = 32,
  parameter int IW   = $clog2(NCNT),
  parameter int EW   = $clog2(NEV)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NEV-1:0]  events,
  input  logic            cfg_we,
  input  logic [IW-1:0]   cfg_idx,
  input  logic [EW-1:0]   cfg_event,
  input  logic [IW-1:0]   rd_idx,
  output logic [CW-1:0]   rd_value
);
  logic [CW-1:0] cnt [NCNT];
  logic [EW-1:0] sel [NCNT];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int i = 0; i < NCNT; i++) begin cnt[i] <= '0; sel[i] <= '0; end
    end else begin
      for (int i = 0; i < NCNT; i++)
        if (cfg_we && cfg_idx == IW'(i)) begin
          sel[i] <= cfg_event;
          cnt[i] <= '0;
        end else if (events[sel[i]]) begin
          cnt[i] <= cnt[i] + 1'b1;
        end
    end

  assign rd_value = cnt[rd_idx];
endmodule
