// thread_table: the threadStateTable and the thread-allocation search.
//
// Holds the state machine of every HC of every Context in the System, and
// per Context the affinity masks C_Affin (which Contexts may receive a
// thread created by this Context) and HC_Affin (which of this Context's HCs
// may receive a thread), and the two bias pointers cPtr and hcPtr.
//
// Allocation search for a vthread_create issued by Context `issuing_c`:
//   cycle 0 (sched_req): hcRdy[c][h] = (state == READY); hcAvail[c] = OR
//     over h; cRdy = hcAvail & C_Affin[issuing_c]; a find-first-one biased
//     at cPtr[issuing_c] picks a Context, clocked into newCPtr.
//   cycle 1: a second biased find-first-one over hcRdy[newCPtr] &
//     HC_Affin[newCPtr], starting at hcPtr[newCPtr], picks newHCPtr.
//     res_valid pulses with res_found, res_c and res_h. On success cPtr of
//     the issuing Context becomes newCPtr and hcPtr of the chosen Context
//     becomes newHCPtr.
// The data path follows the architecture's thread-state-table diagram. The
// HC search is biased by hcPtr (the diagram's bias label repeats cPtr; the
// per-Context hcPtr is used here since it exists for that purpose). Reset
// values of the masks (all ones) and pointers (zero) are this design's
// choice. The caller must not issue sched_req while a search is in flight.
module thread_table
  import vt_pkg::*;
#(
  parameter int NC = 8,      // Contexts per System
  parameter int NH = 1,      // HCs per Context
  parameter int CW = (NC > 1) ? $clog2(NC) : 1,
  parameter int HW = (NH > 1) ? $clog2(NH) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // per-HC events and the value of a host state write
  input  hc_event_e          ev       [NC][NH],
  input  hc_state_e          wr_state,
  output hc_state_e          state    [NC][NH],
  output logic [NC*NH-1:0]   illegal,
  // affinity mask writes (host, through the DBG_IF)
  input  logic               aff_we,
  input  logic [CW-1:0]      aff_ctx,
  input  logic [NC-1:0]      c_affin_wdata,
  input  logic [NH-1:0]      hc_affin_wdata,
  output logic [NC-1:0]      c_affin  [NC],
  output logic [NH-1:0]      hc_affin [NC],
  // allocation search
  input  logic               sched_req,
  input  logic [CW-1:0]      issuing_c,
  output logic               res_valid,
  output logic               res_found,
  output logic [CW-1:0]      res_c,
  output logic [HW-1:0]      res_h
);
  logic [CW-1:0] cptr  [NC];
  logic [HW-1:0] hcptr [NC];

  for (genvar c = 0; c < NC; c++) begin : g_c
    for (genvar h = 0; h < NH; h++) begin : g_h
      hc_state_fsm u_fsm (
        .clk, .rst_n, .ev(ev[c][h]), .wr_state,
        .state(state[c][h]), .illegal(illegal[c*NH+h])
      );
    end
  end

  // ready vectors
  logic [NH-1:0] hc_rdy  [NC];
  logic [NC-1:0] hc_avail;
  always_comb
    for (int c = 0; c < NC; c++) begin
      for (int h = 0; h < NH; h++) hc_rdy[c][h] = (state[c][h] == HC_READY);
      hc_avail[c] = |hc_rdy[c];
    end

  logic [NC-1:0] c_rdy;
  assign c_rdy = hc_avail & c_affin[issuing_c];

  logic          c_found;
  logic [CW-1:0] c_idx;
  ff1_biased #(.N(NC), .IW(CW)) u_ff1_c (
    .vec(c_rdy), .start(cptr[issuing_c]), .found(c_found), .idx(c_idx));

  // stage register: newCPtr
  logic          s1_valid, s1_found;
  logic [CW-1:0] new_cptr, s1_issuer;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      s1_valid <= 1'b0; s1_found <= 1'b0; new_cptr <= '0; s1_issuer <= '0;
    end else begin
      s1_valid <= sched_req;
      if (sched_req) begin
        s1_found  <= c_found;
        new_cptr  <= c_idx;
        s1_issuer <= issuing_c;
      end
    end

  logic          h_found;
  logic [HW-1:0] h_idx;
  ff1_biased #(.N(NH), .IW(HW)) u_ff1_h (
    .vec(hc_rdy[new_cptr] & hc_affin[new_cptr]), .start(hcptr[new_cptr]),
    .found(h_found), .idx(h_idx));

  assign res_valid = s1_valid;
  assign res_found = s1_found && h_found;
  assign res_c     = new_cptr;
  assign res_h     = h_idx;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int c = 0; c < NC; c++) begin
        cptr[c] <= '0; hcptr[c] <= '0;
        c_affin[c] <= '1; hc_affin[c] <= '1;
      end
    end else begin
      if (aff_we) begin
        c_affin[aff_ctx]  <= c_affin_wdata;
        hc_affin[aff_ctx] <= hc_affin_wdata;
      end
      if (res_valid && res_found) begin
        cptr[s1_issuer] <= new_cptr;
        hcptr[new_cptr] <= h_idx;
      end
    end
endmodule
