// periph_wrap: System-level wrapper of the streaming peripherals.
//
// Two jobs. (1) The programmer's interface: a 256-word peripheral register
// space (PERIPH_SPACE) shared by the HCs of all Contexts (RDPERIPH and
// WRPERIPH syllables) and the host (through the DBG_IF). Peripheral k owns
// the window of WIN = 256/KP registers starting at k*WIN. The first three
// registers of each window are the mandatory ones, kept here: ID (read
// only, PERIPH_ID+k), CTRL (writing bit 0 = 1 pulses `p_start`) and STATUS
// ({done, busy} from the peripheral). The others are user-architected
// registers and are forwarded to the peripheral (`p_we/p_addr/p_wdata`,
// read back combinationally on `p_rdata`). Accessors are served one per
// clock, round robin, and acknowledged in the next clock.
// (2) The memory side: the KP x M master channels of the peripherals are
// merged, round robin, by the pipelined aggregator into one queue (LSU_Q)
// towards a DRAM channel; at most one read is outstanding, and its data is
// returned on the channel that issued it.
// The register categories, the System-level placement and the aggregator
// into LSU queues follow the architecture; the register layout, the window
// split, the queue depth and the single outstanding read are this design's
// choices. The peripherals themselves are outside this block.
module periph_wrap #(
  parameter int NA        = 9,    // register accessors: Contexts + host
  parameter int KP        = 2,    // peripherals
  parameter int M         = 1,    // memory master channels per peripheral
  parameter int PERIPH_ID = 32'h5654_0100,
  parameter int AIW = (NA > 1) ? $clog2(NA) : 1,
  parameter int KW  = (KP > 1) ? $clog2(KP) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // register accessors
  input  logic [NA-1:0]     a_req,
  input  logic [NA-1:0]     a_we,
  input  logic [7:0]        a_addr  [NA],
  input  logic [31:0]       a_wdata [NA],
  output logic [NA-1:0]     a_ack,
  output logic [31:0]       a_rdata,
  // peripheral control
  output logic [KP-1:0]     p_start,
  input  logic [KP-1:0]     p_busy,
  input  logic [KP-1:0]     p_done,
  output logic [KP-1:0]     p_we,
  output logic [7:0]        p_addr,
  output logic [31:0]       p_wdata,
  input  logic [31:0]       p_rdata [KP],
  // peripheral memory masters, index k*M+m
  input  logic [KP*M-1:0]   pm_req,
  input  logic [KP*M-1:0]   pm_we,
  input  logic [31:0]       pm_addr  [KP*M],
  input  logic [31:0]       pm_wdata [KP*M],
  output logic [KP*M-1:0]   pm_gnt,
  output logic [KP*M-1:0]   pm_rvalid,
  output logic [31:0]       pm_rdata,
  // DRAM channel
  output logic              d_req,
  output logic              d_we,
  output logic [31:0]       d_addr,
  output logic [31:0]       d_wdata,
  input  logic              d_gnt,
  input  logic              d_rvalid,
  input  logic [31:0]       d_rdata
);
  localparam int WIN = 256 / KP;
  localparam int NM  = KP * M;
  localparam int MIW = (NM > 1) ? $clog2(NM) : 1;
  localparam int QD  = 4;

  // ---------------------------------------------------------------- registers
  logic           a_found;
  logic [AIW-1:0] a_win, a_rr;
  ff1_biased #(.N(NA), .IW(AIW)) u_arb (.vec(a_req & ~a_ack), .start(a_rr),
    .found(a_found), .idx(a_win));

  wire [7:0]    g_addr = a_addr[a_win];
  wire [KW-1:0] g_k    = KW'(int'(g_addr) / WIN);
  wire [7:0]    g_off  = 8'(int'(g_addr) % WIN);
  wire          g_wr   = a_found && a_we[a_win];

  always_comb begin
    p_we    = '0;
    p_addr  = g_off;
    p_wdata = a_wdata[a_win];
    p_start = '0;
    if (g_wr && g_off >= 8'd3) p_we[g_k] = 1'b1;
    if (g_wr && g_off == 8'd1 && a_wdata[a_win][0]) p_start[g_k] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      a_ack <= '0; a_rdata <= '0; a_rr <= '0;
    end else begin
      a_ack <= '0;
      if (a_found) begin
        a_ack[a_win] <= 1'b1;
        a_rr <= (int'(a_win) == NA - 1) ? '0 : a_win + 1'b1;
        unique case (g_off)
          8'd0:    a_rdata <= PERIPH_ID + 32'(g_k);
          8'd1:    a_rdata <= '0;
          8'd2:    a_rdata <= {30'd0, p_done[g_k], p_busy[g_k]};
          default: a_rdata <= p_rdata[g_k];
        endcase
      end
    end

  // ---------------------------------------------------------------- memory
  typedef struct packed {
    logic [MIW-1:0] who;
    logic           we;
    logic [31:0]    addr;
    logic [31:0]    wdata;
  } mreq_t;

  mreq_t          q [QD];
  logic [$clog2(QD):0] q_n;
  logic           m_found;
  logic [MIW-1:0] m_win, m_rr;
  logic           rd_out;
  logic [MIW-1:0] rd_who;

  ff1_biased #(.N(NM), .IW(MIW)) u_marb (.vec(pm_req), .start(m_rr),
    .found(m_found), .idx(m_win));

  wire q_pop  = d_req && d_gnt;
  wire q_push = m_found && (int'(q_n) < QD || q_pop);
  always_comb begin
    pm_gnt = '0;
    if (q_push) pm_gnt[m_win] = 1'b1;
  end

  assign d_req   = q_n != 0 && !rd_out;
  assign d_we    = q[0].we;
  assign d_addr  = q[0].addr;
  assign d_wdata = q[0].wdata;

  always_comb begin
    pm_rvalid = '0;
    if (rd_out && d_rvalid) pm_rvalid[rd_who] = 1'b1;
  end
  assign pm_rdata = d_rdata;

  // queue fill after this clock's pop, the slot a push goes to
  logic [$clog2(QD):0] q_after_pop;
  assign q_after_pop = q_pop ? q_n - 1'b1 : q_n;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      q_n <= '0; m_rr <= '0; rd_out <= 1'b0; rd_who <= '0;
      for (int i = 0; i < QD; i++) q[i] <= '0;
    end else begin
      if (q_pop) begin
        for (int i = 0; i < QD - 1; i++) q[i] <= q[i+1];
        if (!q[0].we) begin rd_out <= 1'b1; rd_who <= q[0].who; end
      end
      if (q_push) begin
        q[q_after_pop[$clog2(QD)-1:0]] <= '{who: m_win, we: pm_we[m_win], addr: pm_addr[m_win], wdata: pm_wdata[m_win]};
        m_rr <= (int'(m_win) == NM - 1) ? '0 : m_win + 1'b1;
      end
      q_n <= q_push ? q_after_pop + 1'b1 : q_after_pop;
      if (rd_out && d_rvalid) rd_out <= 1'b0;
    end
endmodule
