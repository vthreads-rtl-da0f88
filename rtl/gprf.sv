// gprf: general-purpose register file of one HyperContext.
//
// NREG (64) registers of 32 bits with R read ports and WP write ports.
// Register 0 reads as zero. Reads are combinational; writes take effect at
// the clock edge. If two write ports address the same register in one clock
// the higher-numbered port wins. The 64x32 size follows the architecture's
// mid-pipe organisation; the port counts are set by the Mid-Pipe, and the
// combinational read (the architecture registers the read address and
// delivers the data late in the next clock) is this design's
// simplification. Registers reset to zero so that reads are defined.
module gprf #(
  parameter int NREG = 64,
  parameter int R    = 4,
  parameter int WP   = 2,
  parameter int AW   = $clog2(NREG)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [AW-1:0] ra    [R],
  output logic [31:0]   rd    [R],
  input  logic [WP-1:0] we,
  input  logic [AW-1:0] wa    [WP],
  input  logic [31:0]   wd    [WP]
);
  logic [31:0] regs [NREG];

  always_comb
    for (int p = 0; p < R; p++) rd[p] = (ra[p] == '0) ? '0 : regs[ra[p]];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int i = 0; i < NREG; i++) regs[i] <= '0;
    end else begin
      for (int p = 0; p < WP; p++)
        if (we[p] && wa[p] != '0) regs[wa[p]] <= wd[p];
    end
endmodule
