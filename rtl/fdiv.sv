// fdiv: iterative single-precision floating-point divider (FDIV of FPCORE).
//
// Computes a / b on binary32 words with a restoring division of the two
// 24-bit mantissas, one quotient bit per clock. `start` is taken while the
// unit is idle (`busy` low); `done` pulses with `result` and the `tag` of
// the operation ITER + 2 = 30 clocks after `start` (one clock to unpack,
// 28 quotient bits, one to round; special operands take the same time). Rounding and
// special values follow fp_pkg (round to nearest even, flush to zero, one
// quiet NaN; x/0 is a signed infinity, 0/0 and inf/inf are NaN).
// That FPCORE holds an iterative divider follows the architecture; the
// algorithm (restoring, radix 2) and the timing are this design's.
module fdiv
  import fp_pkg::*;
#(
  parameter int TW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [31:0]   a,
  input  logic [31:0]   b,
  input  logic [TW-1:0] in_tag,
  output logic          busy,
  output logic          done,
  output logic [31:0]   result,
  output logic [TW-1:0] out_tag
);
  localparam int ITER = 28;

  wire [7:0]  ea = a[30:23], eb = b[30:23];
  wire        za = ea == 8'd0, zb = eb == 8'd0;
  wire        ia = ea == 8'hFF && a[22:0] == '0, ib = eb == 8'hFF && b[22:0] == '0;
  wire        na = ea == 8'hFF && a[22:0] != '0, nb = eb == 8'hFF && b[22:0] != '0;

  logic               s_q;
  logic signed [11:0] e_q;
  logic [24:0]        rem;       // partial remainder, < 2 * divisor
  logic [23:0]        dvs;
  logic [27:0]        q;
  logic [4:0]         cnt;
  logic               special;
  logic [31:0]        spec_val;
  logic [TW-1:0]      tag_q;

  // rounding of the finished quotient
  logic [26:0]        m27;
  logic signed [11:0] e_fin;
  always_comb begin
    if (q[27]) begin m27 = {q[27:2], |q[1:0] | (rem != '0)}; e_fin = e_q; end
    else       begin m27 = {q[26:1], q[0]    | (rem != '0)}; e_fin = e_q - 1; end
  end

  wire [25:0] diff = {1'b0, rem} - {2'b00, dvs};

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; result <= '0; out_tag <= '0;
      s_q <= 1'b0; e_q <= '0; rem <= '0; dvs <= '0; q <= '0; cnt <= '0;
      special <= 1'b0; spec_val <= '0; tag_q <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy  <= 1'b1;
        cnt   <= 5'(ITER);
        tag_q <= in_tag;
        s_q   <= a[31] ^ b[31];
        e_q   <= 12'(ea) - 12'(eb) + 12'sd127;
        rem   <= {1'b0, 1'b1, a[22:0]};
        dvs   <= {1'b1, b[22:0]};
        q     <= '0;
        special <= 1'b1;
        if (na || nb || (ia && ib) || (za && zb)) spec_val <= FP_QNAN;
        else if (ia || zb)                        spec_val <= fp_inf(a[31] ^ b[31]);
        else if (za || ib)                        spec_val <= {a[31] ^ b[31], 31'd0};
        else                                      special  <= 1'b0;
      end else if (busy) begin
        if (cnt != '0) begin
          // one restoring step: compare, subtract, shift
          if (!diff[25]) begin q <= {q[26:0], 1'b1}; rem <= {diff[23:0], 1'b0}; end
          else           begin q <= {q[26:0], 1'b0}; rem <= {rem[23:0], 1'b0}; end
          cnt <= cnt - 1'b1;
        end else begin
          busy    <= 1'b0;
          done    <= 1'b1;
          out_tag <= tag_q;
          result  <= special ? spec_val : fp_round(s_q, e_fin, m27);
        end
      end
    end
endmodule
