// iram_banked: per-Context instruction RAM split into even and odd banks,
// with the aligner that extracts one long instruction word (LIW).
//
// The IRAM is organised in lines of W 32-bit syllables (the fetch width).
// Even lines live in the EVEN bank and odd lines in the ODD bank, each a
// single-port RAM. A fetch at any syllable address reads line L and line
// L+1 in the same clock (one from each bank), so a LIW that straddles a
// line boundary is still fetched in a single cycle. The aligner, one clock
// later, picks the W syllables starting at the fetch address and finds the
// LIW length from the stop bit (bit 31) of its last syllable; a LIW with no
// stop bit within W syllables is taken as W long.
//
// Timing: rd_en/rd_pc in clock t; rd_valid, syll[], len in clock t+1.
// The host write port (word address, one syllable per clock) has priority;
// a fetch in the same clock is dropped (rd_valid stays low). The even/odd
// split and the aligner follow the architecture; the line size equal to the
// fetch width and the stop-bit convention are this design's choices.
module iram_banked #(
  parameter int W          = 2,       // syllables per fetch (issue width)
  parameter int IRAM_BYTES = 16384,
  parameter int LW = (W > 1) ? $clog2(W) : 1,
  parameter int NW = $clog2(W + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,
  input  logic [31:0]   wr_addr,      // byte address
  input  logic [31:0]   wr_data,
  input  logic          rd_en,
  input  logic [31:0]   rd_pc,        // byte address of the LIW
  output logic          rd_valid,
  output logic [31:0]   syll [W],
  output logic [NW-1:0] len
);
  localparam int LINES = IRAM_BYTES / 4 / W;
  localparam int BD    = LINES / 2;            // lines per bank
  localparam int BAW   = $clog2(BD);

  logic [31:0] even_q [W];
  logic [31:0] odd_q  [W];
  logic [31:0] even_m [BD][W];
  logic [31:0] odd_m  [BD][W];

  // line and offset of the fetch / write
  wire [31:0]   rd_line = (rd_pc >> 2) / W;
  wire [31:0]   wr_line = (wr_addr >> 2) / W;
  wire [31:0]   wr_off  = (wr_addr >> 2) % W;
  wire [BAW-1:0] ev_a   = BAW'((rd_line + 1) >> 1);
  wire [BAW-1:0] od_a   = BAW'(rd_line >> 1);

  logic          q_par;     // parity of line L
  logic [LW-1:0] q_off;

  always_ff @(posedge clk) begin
    if (wr_en) begin
      if (wr_line[0]) odd_m [BAW'(wr_line >> 1)][wr_off] <= wr_data;
      else            even_m[BAW'(wr_line >> 1)][wr_off] <= wr_data;
    end else if (rd_en) begin
      even_q <= even_m[ev_a];
      odd_q  <= odd_m[od_a];
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      rd_valid <= 1'b0; q_par <= 1'b0; q_off <= '0;
    end else begin
      rd_valid <= rd_en && !wr_en;
      if (rd_en) begin
        q_par <= rd_line[0];
        q_off <= LW'((rd_pc >> 2) % W);
      end
    end

  // aligner
  logic [31:0] two [2*W];
  always_comb begin
    for (int i = 0; i < W; i++) begin
      two[i]     = q_par ? odd_q[i]  : even_q[i];
      two[W + i] = q_par ? even_q[i] : odd_q[i];
    end
    for (int i = 0; i < W; i++) syll[i] = two[int'(q_off) + i];
    len = NW'(W);
    for (int i = W - 1; i >= 0; i--) if (syll[i][31]) len = NW'(i + 1);
  end
endmodule
