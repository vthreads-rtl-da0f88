// dram_sys: System-level shared data memory (DRAM) with its crossbar.
//
// The System data memory is split into BANKS single-port RAM banks, word
// interleaved (bank = byte address bits [2 +: log2(BANKS)]). Every Context
// reaches it through one request channel per bank (the heads of the
// per-bank LSU queues of its Load/Store Unit, already steered to the right
// bank); further "any bank" channels serve the peripheral wrapper, the
// DBG_IF DMA engine and the host memory port, and are steered by address.
// Each bank grants one request per clock, round robin over the channels
// that want it, so up to BANKS loads/stores are served per clock across
// all Contexts.
//
// Channel protocol (all channels): hold req/we/addr/wdata until gnt; a read
// returns rvalid with rdata exactly 1+XBAR_PIPE clocks after the grant, a
// write needs no response. XBAR_PIPE=1 models the optional crossbar
// pipeline register. Banking, crossbar and the pipeline option follow the
// architecture; word interleaving, round-robin arbitration, word-only
// accesses and the fixed read latency are this design's choices.
module dram_sys #(
  parameter int NC         = 8,        // Contexts
  parameter int BANKS      = 4,
  parameter int DRAM_BYTES = 262144,   // 256 KB
  parameter int NX         = 3,        // any-bank channels: periph, DMA, host
  parameter int XBAR_PIPE  = 0,
  parameter int BW = (BANKS > 1) ? $clog2(BANKS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // Context channels, index c*BANKS+b, channel b may only address bank b
  input  logic [NC*BANKS-1:0] c_req,
  input  logic [NC*BANKS-1:0] c_we,
  input  logic [31:0]   c_addr  [NC*BANKS],
  input  logic [31:0]   c_wdata [NC*BANKS],
  output logic [NC*BANKS-1:0] c_gnt,
  output logic [NC*BANKS-1:0] c_rvalid,
  output logic [31:0]   c_rdata [NC*BANKS],
  // any-bank channels
  input  logic [NX-1:0] x_req,
  input  logic [NX-1:0] x_we,
  input  logic [31:0]   x_addr  [NX],
  input  logic [31:0]   x_wdata [NX],
  output logic [NX-1:0] x_gnt,
  output logic [NX-1:0] x_rvalid,
  output logic [31:0]   x_rdata [NX],
  // count of clocks in which some request waited for a busy bank
  output logic [31:0]   conflicts
);
  localparam int WORDS = DRAM_BYTES / 4 / BANKS;
  localparam int RW    = $clog2(WORDS);
  localparam int NR    = NC + NX;              // requesters per bank
  localparam int RIW   = (NR > 1) ? $clog2(NR) : 1;
  localparam int LAT   = 1 + XBAR_PIPE;

  function automatic logic [BW-1:0] bank_of(input logic [31:0] a);
    return (BANKS > 1) ? BW'(a[2 +: BW]) : '0;
  endfunction
  function automatic logic [RW-1:0] row_of(input logic [31:0] a);
    return RW'(a >> (2 + ((BANKS > 1) ? BW : 0)));
  endfunction

  logic [NR-1:0]  want    [BANKS];
  logic [RIW-1:0] rr      [BANKS];
  logic           b_found [BANKS];
  logic [RIW-1:0] b_win   [BANKS];

  always_comb
    for (int b = 0; b < BANKS; b++) begin
      for (int c = 0; c < NC; c++) want[b][c] = c_req[c*BANKS+b];
      for (int x = 0; x < NX; x++) want[b][NC+x] = x_req[x] && bank_of(x_addr[x]) == BW'(b);
    end

  for (genvar b = 0; b < BANKS; b++) begin : g_arb
    ff1_biased #(.N(NR), .IW(RIW)) u_arb (.vec(want[b]), .start(rr[b]),
      .found(b_found[b]), .idx(b_win[b]));
  end

  always_comb begin
    c_gnt = '0;
    x_gnt = '0;
    for (int b = 0; b < BANKS; b++)
      if (b_found[b]) begin
        if (int'(b_win[b]) < NC) c_gnt[int'(b_win[b])*BANKS+b] = 1'b1;
        else                     x_gnt[int'(b_win[b])-NC]     = 1'b1;
      end
  end

  // ---------------------------------------------------------------- banks
  logic          rd_v   [BANKS][LAT];
  logic [RIW-1:0] rd_who [BANKS][LAT];
  logic [31:0]   rd_q   [BANKS];

  for (genvar b = 0; b < BANKS; b++) begin : g_bank
    logic [31:0] mem [WORDS];
    logic        g_we;
    logic [31:0] g_addr, g_wdata;
    always_comb begin
      if (int'(b_win[b]) < NC) begin
        g_we    = c_we[int'(b_win[b])*BANKS+b];
        g_addr  = c_addr[int'(b_win[b])*BANKS+b];
        g_wdata = c_wdata[int'(b_win[b])*BANKS+b];
      end else begin
        g_we    = x_we[int'(b_win[b])-NC];
        g_addr  = x_addr[int'(b_win[b])-NC];
        g_wdata = x_wdata[int'(b_win[b])-NC];
      end
    end
    always_ff @(posedge clk) begin
      if (b_found[b] && g_we) mem[row_of(g_addr)] <= g_wdata;
      if (b_found[b] && !g_we) rd_q[b] <= mem[row_of(g_addr)];
    end
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) begin
        rr[b] <= '0;
        for (int l = 0; l < LAT; l++) begin rd_v[b][l] <= 1'b0; rd_who[b][l] <= '0; end
      end else begin
        if (b_found[b]) rr[b] <= (int'(b_win[b]) == NR - 1) ? '0 : b_win[b] + 1'b1;
        rd_v[b][0]   <= b_found[b] && !g_we;
        rd_who[b][0] <= b_win[b];
        for (int l = 1; l < LAT; l++) begin
          rd_v[b][l] <= rd_v[b][l-1]; rd_who[b][l] <= rd_who[b][l-1];
        end
      end
  end

  // read data of the last pipeline stage (LAT-1 further clocks of delay)
  logic [31:0] rd_d [BANKS][LAT];
  always_comb
    for (int b = 0; b < BANKS; b++) rd_d[b][0] = rd_q[b];
  always_ff @(posedge clk)
    for (int b = 0; b < BANKS; b++)
      for (int l = 1; l < LAT; l++) rd_d[b][l] <= rd_d[b][l-1];

  always_comb begin
    c_rvalid = '0;
    x_rvalid = '0;
    for (int i = 0; i < NC*BANKS; i++) c_rdata[i] = '0;
    for (int x = 0; x < NX; x++)       x_rdata[x] = '0;
    for (int b = 0; b < BANKS; b++)
      if (rd_v[b][LAT-1]) begin
        if (int'(rd_who[b][LAT-1]) < NC) begin
          c_rvalid[int'(rd_who[b][LAT-1])*BANKS+b] = 1'b1;
          c_rdata [int'(rd_who[b][LAT-1])*BANKS+b] = rd_d[b][LAT-1];
        end else begin
          x_rvalid[int'(rd_who[b][LAT-1])-NC] = 1'b1;
          x_rdata [int'(rd_who[b][LAT-1])-NC] = rd_d[b][LAT-1];
        end
      end
  end

  // conflict counter: some requester of a bank was not granted
  logic any_conflict;
  always_comb begin
    any_conflict = 1'b0;
    for (int b = 0; b < BANKS; b++)
      if ($countones(want[b]) > 1) any_conflict = 1'b1;
  end
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) conflicts <= '0;
    else if (any_conflict) conflicts <= conflicts + 1;
endmodule
