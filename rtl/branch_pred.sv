// branch_pred: branch predictor of the Instruction Fetch Engine.
//
// A table of 2-bit saturating counters with a private set of counters per
// HyperContext (the per-HC history bits, BHT) and one Branch Target Address
// array shared by all HCs of the Context (BTAC). Both are indexed by the
// low bits of the byte address of the long instruction word that holds the
// branch; the BTAC entry also keeps the rest of the address as a tag.
//
// Lookup (combinational): for HC `lk_hc` and bundle address `lk_pc`, hit
// when the BTAC tag matches; predict taken when hit and the counter is 2 or
// 3. Update (one clock): when the branch unit resolves a conditional branch
// of HC `up_hc` at `up_pc` it increments (taken) or decrements the counter
// and, when taken, writes `up_target` into the BTAC. Counters reset to 1
// (weakly not taken). The 2-bit counters, per-HC history and single target
// array follow the architecture; the table sizes, indexing and reset value
// are this design's choices.
module branch_pred #(
  parameter int NH      = 1,
  parameter int ENTRIES = 64,
  parameter int HW = (NH > 1) ? $clog2(NH) : 1,
  parameter int EW = $clog2(ENTRIES)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [HW-1:0] lk_hc,
  input  logic [31:0]   lk_pc,
  output logic          lk_taken,
  output logic [31:0]   lk_target,
  input  logic          up_valid,
  input  logic [HW-1:0] up_hc,
  input  logic [31:0]   up_pc,
  input  logic          up_taken,
  input  logic [31:0]   up_target
);
  localparam int TW = 30 - EW;
  logic [1:0]    bht   [NH][ENTRIES];
  logic          bt_v  [ENTRIES];
  logic [TW-1:0] bt_tag[ENTRIES];
  logic [31:0]   bt_tgt[ENTRIES];

  wire [EW-1:0] lk_i = lk_pc[2 +: EW];
  wire [EW-1:0] up_i = up_pc[2 +: EW];

  assign lk_target = bt_tgt[lk_i];
  assign lk_taken  = bt_v[lk_i] && bt_tag[lk_i] == lk_pc[31 -: TW] && bht[lk_hc][lk_i][1];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int e = 0; e < ENTRIES; e++) begin
        bt_v[e] <= 1'b0; bt_tag[e] <= '0; bt_tgt[e] <= '0;
        for (int h = 0; h < NH; h++) bht[h][e] <= 2'd1;
      end
    end else if (up_valid) begin
      if (up_taken) begin
        if (bht[up_hc][up_i] != 2'd3) bht[up_hc][up_i] <= bht[up_hc][up_i] + 2'd1;
        bt_v[up_i]   <= 1'b1;
        bt_tag[up_i] <= up_pc[31 -: TW];
        bt_tgt[up_i] <= up_target;
      end else if (bht[up_hc][up_i] != 2'd0) begin
        bht[up_hc][up_i] <= bht[up_hc][up_i] - 2'd1;
      end
    end
endmodule
