// cl_lsu: Cluster Load/Store Unit.
//
// Serves the loads and stores of one long instruction word at a time on up
// to NCL clients (LSU channels). Each client adds its base register and
// offset to form the effective byte address, and the client-by-bank
// crossbar steers it to the request channel of the DRAM bank that holds the
// word (word-interleaved banks). Each bank channel issues the pending
// clients for that bank one after another, lowest client first, with at
// most one read outstanding per bank; a store completes when granted, a
// load when its data returns. `done` pulses when every client of the word
// has completed; `rdata` then holds the loaded words.
//
// Interface: `start` with the per-client valid/we/base/offs/wdata (only
// while !busy); DRAM side as in dram_sys (req/we/addr/wdata held until
// gnt, rvalid later). The address adders, the client x bank crossbar and
// per-bank channels follow the architecture; the in-order issue and the
// single outstanding read per bank are this design's choices. Only the
// instruction word holding the memory port uses it at a time, which is how
// the architecture gives the winning HC all LSU ports.
module cl_lsu #(
  parameter int NCL   = 1,    // LSU channels (clients)
  parameter int BANKS = 4,
  parameter int BW = (BANKS > 1) ? $clog2(BANKS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [NCL-1:0]   v,
  input  logic [NCL-1:0]   we,
  input  logic [31:0]      base  [NCL],
  input  logic [31:0]      offs  [NCL],
  input  logic [31:0]      wdata [NCL],
  output logic             busy,
  output logic             done,
  output logic [31:0]      rdata [NCL],
  // DRAM channels, one per bank
  output logic [BANKS-1:0] m_req,
  output logic [BANKS-1:0] m_we,
  output logic [31:0]      m_addr  [BANKS],
  output logic [31:0]      m_wdata [BANKS],
  input  logic [BANKS-1:0] m_gnt,
  input  logic [BANKS-1:0] m_rvalid,
  input  logic [31:0]      m_rdata [BANKS]
);
  localparam int CIW = (NCL > 1) ? $clog2(NCL) : 1;

  logic [NCL-1:0] pend;            // not yet issued
  logic [NCL-1:0] live;            // not yet completed
  logic [NCL-1:0] q_we;
  logic [31:0]    q_addr  [NCL];
  logic [31:0]    q_wdata [NCL];
  logic [BANKS-1:0] rd_out;        // a read is outstanding on the bank
  logic [CIW-1:0] rd_who [BANKS];

  function automatic logic [BW-1:0] bank_of(input logic [31:0] a);
    return (BANKS > 1) ? BW'(a[2 +: BW]) : '0;
  endfunction

  logic           sel_v   [BANKS];
  logic [CIW-1:0] sel_c   [BANKS];
  always_comb
    for (int b = 0; b < BANKS; b++) begin
      sel_v[b] = 1'b0;
      sel_c[b] = '0;
      for (int c = NCL - 1; c >= 0; c--)
        if (pend[c] && bank_of(q_addr[c]) == BW'(b)) begin
          sel_v[b] = 1'b1; sel_c[b] = CIW'(c);
        end
      m_req[b]   = sel_v[b] && !rd_out[b];
      m_we[b]    = q_we[sel_c[b]];
      m_addr[b]  = q_addr[sel_c[b]];
      m_wdata[b] = q_wdata[sel_c[b]];
    end

  assign busy = |live;

  // next value of `live`: the started mask, or the current one minus the
  // writes granted and the reads returned in this clock
  logic [NCL-1:0] live_n;
  always_comb begin
    live_n = live;
    if (start && !busy) live_n = v;
    else
      for (int b = 0; b < BANKS; b++) begin
        if (m_req[b] && m_gnt[b] && q_we[sel_c[b]]) live_n[sel_c[b]] = 1'b0;
        if (m_rvalid[b] && rd_out[b]) live_n[rd_who[b]] = 1'b0;
      end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      pend <= '0; live <= '0; q_we <= '0; done <= 1'b0; rd_out <= '0;
      for (int c = 0; c < NCL; c++) begin
        q_addr[c] <= '0; q_wdata[c] <= '0; rdata[c] <= '0;
      end
      for (int b = 0; b < BANKS; b++) rd_who[b] <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        pend <= v; q_we <= we;
        for (int c = 0; c < NCL; c++) begin
          q_addr[c]  <= base[c] + offs[c];
          q_wdata[c] <= wdata[c];
        end
      end else begin
        for (int b = 0; b < BANKS; b++) begin
          if (m_req[b] && m_gnt[b]) begin
            pend[sel_c[b]] <= 1'b0;
            if (!q_we[sel_c[b]]) begin rd_out[b] <= 1'b1; rd_who[b] <= sel_c[b]; end
          end
          if (m_rvalid[b] && rd_out[b]) begin
            rdata[rd_who[b]] <= m_rdata[b];
            rd_out[b] <= 1'b0;
          end
        end
        if (|live && live_n == '0) done <= 1'b1;
      end
      live <= live_n;
    end
endmodule
