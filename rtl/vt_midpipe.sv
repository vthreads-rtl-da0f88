// vt_midpipe: Mid-Pipe of one Context (decode, register read, bypass,
// issue queues and Thread_Issue_Logic).
//
// In the clock a long instruction word (LIW) arrives from the fetch
// engine's Thread_Select_Logic, W decoders (declogic) decode its syllables,
// the port allocator hands the read ports of the HC's register file to the
// sources in use, the register file is read and the bypass substitutes
// values being written back in the same clock. The decoded word with its
// operands is clocked into the HC's ISSUE_Q entry. The Thread_Issue_Logic
// then picks, round robin, one HC with a ready entry and dispatches it to
// the Cluster when the Cluster can take it.
//
// Each HC has its own register file (GPRF 64x32, 2W read ports, W write
// ports for write-back plus two for the DBG_IF, which loads the stack
// pointer into r1 and the thread argument into r3 when it starts an HC).
// An HC is `blocked` while its ISSUE_Q entry is full or while its previous
// word executes, so one word per HC is in flight and only the write-back of
// that word needs bypassing. Decode, port allocation, per-HC register files,
// bypass, issue queues and the round-robin issue logic follow the
// architecture; the one-entry queue, the one-word-in-flight rule and the
// register conventions for a started thread are this design's choices.
module vt_midpipe
  import vt_pkg::*;
#(
  parameter int NH = 1,
  parameter int W  = 2,
  parameter int HW = (NH > 1) ? $clog2(NH) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NH-1:0]   hc_run,
  // from the fetch engine
  input  logic            in_valid,
  output logic            in_ready,
  input  logic [HW-1:0]   in_h,
  input  logic [31:0]     in_pc,
  input  logic [2:0]      in_len,
  input  logic [31:0]     in_pred,
  input  logic [W*32-1:0] in_syll,
  output logic [NH-1:0]   blocked,
  // start of an HC: r1 <= sp, r3 <= arg
  input  logic            start_valid,
  input  logic [HW-1:0]   start_h,
  input  logic [31:0]     start_sp,
  input  logic [31:0]     start_arg,
  // to the Cluster
  output logic            iss_valid,
  input  logic            iss_ready,
  output logic [HW-1:0]   iss_h,
  output logic [31:0]     iss_pc,
  output logic [2:0]      iss_len,
  output logic [31:0]     iss_pred,
  output dec_t            iss_dec [W],
  output logic [31:0]     iss_a   [W],
  output logic [31:0]     iss_b   [W],
  input  logic [NH-1:0]   exec_busy,     // HC has a word in the Cluster
  // write-back from the Cluster
  input  logic            wb_valid,
  input  logic [HW-1:0]   wb_h,
  input  logic [W-1:0]    wb_we,
  input  logic [5:0]      wb_wa [W],
  input  logic [31:0]     wb_wd [W],
  // statistics
  output logic            ev_bypass,
  output logic            ev_bad_op
);
  localparam int R  = 2 * W;
  localparam int RW = (R > 1) ? $clog2(R) : 1;
  localparam int WP = W + 2;

  // ---------------------------------------------------------------- decode
  dec_t       dec [W];
  logic [W-1:0] bad;
  for (genvar i = 0; i < W; i++) begin : g_dec
    declogic u_dec (.valid(in_valid && i < int'(in_len)), .syll(in_syll[i*32 +: 32]),
                    .d(dec[i]), .bad_op(bad[i]));
  end
  assign ev_bad_op = in_valid && in_ready && |bad;

  logic [W-1:0]  use1, use2;
  logic [5:0]    reg1 [W], reg2 [W];
  logic [5:0]    port_reg [R];
  logic [RW-1:0] map1 [W], map2 [W];
  logic          overflow;
  always_comb
    for (int i = 0; i < W; i++) begin
      use1[i] = dec[i].rs1_used; use2[i] = dec[i].rs2_used;
      reg1[i] = dec[i].rs1;      reg2[i] = dec[i].rs2;
    end
  port_alloc #(.W(W), .R(R)) u_pa (.use1, .use2, .reg1, .reg2, .port_reg,
    .map1, .map2, .overflow);

  // ---------------------------------------------------------------- GPRFs
  logic [31:0]   rf_rd [NH][R];
  logic [WP-1:0] rf_we [NH];
  logic [5:0]    rf_wa [WP];
  logic [31:0]   rf_wd [WP];
  always_comb begin
    for (int i = 0; i < W; i++) begin rf_wa[i] = wb_wa[i]; rf_wd[i] = wb_wd[i]; end
    rf_wa[W]   = 6'd1; rf_wd[W]   = start_sp;
    rf_wa[W+1] = 6'd3; rf_wd[W+1] = start_arg;
    for (int h = 0; h < NH; h++) begin
      rf_we[h] = '0;
      if (wb_valid && wb_h == HW'(h)) rf_we[h][W-1:0] = wb_we;
      if (start_valid && start_h == HW'(h)) rf_we[h][W +: 2] = 2'b11;
    end
  end
  for (genvar h = 0; h < NH; h++) begin : g_rf
    gprf #(.NREG(64), .R(R), .WP(WP)) u_rf (.clk, .rst_n, .ra(port_reg), .rd(rf_rd[h]),
      .we(rf_we[h]), .wa(rf_wa), .wd(rf_wd));
  end

  // ---------------------------------------------------------------- bypass
  logic [31:0]   op_val [R];
  logic [W-1:0]  byp_we;
  logic [$clog2(R+1)-1:0] byp_hits;
  assign byp_we = (wb_valid && wb_h == in_h) ? wb_we : '0;
  bypass #(.R(R), .WP(W)) u_byp (.ra(port_reg), .rf_val(rf_rd[in_h]), .wb_we(byp_we),
    .wb_wa, .wb_wd, .op_val, .hits(byp_hits));
  assign ev_bypass = in_valid && in_ready && byp_hits != '0;

  // ---------------------------------------------------------------- ISSUE_Q
  logic [NH-1:0] q_v;
  logic [31:0]   q_pc   [NH];
  logic [2:0]    q_len  [NH];
  logic [31:0]   q_pred [NH];
  dec_t          q_dec  [NH][W];
  logic [31:0]   q_a    [NH][W];
  logic [31:0]   q_b    [NH][W];

  assign blocked  = q_v | exec_busy;
  assign in_ready = !q_v[in_h] && !exec_busy[in_h] && !overflow;

  // Thread_Issue_Logic
  logic [NH-1:0] i_elig;
  logic [HW-1:0] i_rr, i_h;
  logic          i_found;
  assign i_elig = q_v & hc_run;
  ff1_biased #(.N(NH), .IW(HW)) u_iss (.vec(i_elig), .start(i_rr), .found(i_found), .idx(i_h));

  assign iss_valid = i_found;
  assign iss_h     = i_h;
  assign iss_pc    = q_pc[i_h];
  assign iss_len   = q_len[i_h];
  assign iss_pred  = q_pred[i_h];
  always_comb
    for (int i = 0; i < W; i++) begin
      iss_dec[i] = q_dec[i_h][i];
      iss_a[i]   = q_a[i_h][i];
      iss_b[i]   = q_b[i_h][i];
    end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      q_v <= '0; i_rr <= '0;
      for (int h = 0; h < NH; h++) begin
        q_pc[h] <= '0; q_len[h] <= '0; q_pred[h] <= '0;
        for (int i = 0; i < W; i++) begin q_dec[h][i] <= '0; q_a[h][i] <= '0; q_b[h][i] <= '0; end
      end
    end else begin
      if (iss_valid && iss_ready) begin
        q_v[i_h] <= 1'b0;
        i_rr <= (int'(i_h) == NH - 1) ? '0 : i_h + 1'b1;
      end
      if (in_valid && in_ready) begin
        q_v[in_h]    <= 1'b1;
        q_pc[in_h]   <= in_pc;
        q_len[in_h]  <= in_len;
        q_pred[in_h] <= in_pred;
        for (int i = 0; i < W; i++) begin
          q_dec[in_h][i] <= dec[i];
          q_a[in_h][i]   <= dec[i].rs1_used ? op_val[map1[i]] : '0;
          q_b[in_h][i]   <= dec[i].rs2_used ? op_val[map2[i]] : '0;
        end
      end
      // an HC that stops running drops its queued word
      for (int h = 0; h < NH; h++) if (!hc_run[h]) q_v[h] <= 1'b0;
    end
endmodule
