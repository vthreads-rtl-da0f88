// tb_fpcore: self-checking test of the floating-point core (two generic
// data-paths and the shared divider) at its default size.
//
// Every clock each slot may start a random FADD, FSUB, FMUL or ITOF; now
// and then slot 0 or 1 starts an FDIV when the divider is idle. Operands
// are random normal numbers (operand exponents chosen so that the results
// stay in the normal range), exact cancellations, zeros, infinities,
// NaNs, overflowing and underflowing products, and random integers. Every
// result is compared with the reference model of fp_ref_pkg, and the cycle
// counts are checked: data-path results exactly 4 clocks after issue, a
// division 29 clocks after it starts.
module tb_fpcore;
  import vt_pkg::*;
  import fp_ref_pkg::*;
  localparam int W = 2, TW = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [W-1:0]  in_valid = '0;
  opcode_e       op [W];
  logic [31:0]   a [W], b [W];
  logic [TW-1:0] in_tag [W];
  logic [W-1:0]  dp_valid;
  logic [31:0]   dp_result [W];
  logic [TW-1:0] dp_tag [W];
  logic          div_busy, div_done;
  logic [31:0]   div_result;
  logic [TW-1:0] div_tag;
  int checks = 0, failures = 0, cyc = 0, n_div = 0, n_op [5];

  fpcore #(.W(W)) dut (.*);

  // expected results, indexed by tag
  logic [31:0] exp_r [256];
  int          exp_t [256];
  logic [31:0] ea_v [256], eb_v [256];
  int          eop [256];

  always @(posedge clk) cyc++;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  always @(negedge clk) if (rst_n) begin
    for (int i = 0; i < W; i++)
      if (dp_valid[i]) begin
        chk(dp_result[i] == exp_r[dp_tag[i]], $sformatf("op%0d %h %h: got %h want %h", eop[dp_tag[i]],
            ea_v[dp_tag[i]], eb_v[dp_tag[i]], dp_result[i], exp_r[dp_tag[i]]));
        chk(cyc - exp_t[dp_tag[i]] == 4, $sformatf("data-path latency %0d", cyc - exp_t[dp_tag[i]]));
      end
    if (div_done) begin
      chk(div_result == exp_r[div_tag], $sformatf("div %h / %h: got %h want %h", ea_v[div_tag],
          eb_v[div_tag], div_result, exp_r[div_tag]));
      chk(cyc - exp_t[div_tag] == 30, $sformatf("divider latency %0d", cyc - exp_t[div_tag]));
    end
  end

  function automatic logic [31:0] pick_operand(int kind);
    case (kind)
      0: return 32'h0000_0000;
      1: return 32'h8000_0000;
      2: return 32'h7F80_0000;
      3: return 32'hFF80_0000;
      4: return 32'h7FC0_0001;
      5: return rnd_fp(240, 254);     // large: products overflow
      6: return rnd_fp(1, 20);        // small: products underflow
      default: return rnd_fp(100, 154);
    endcase
  endfunction

  int tag = 0, k;
  logic [31:0] x, y;
  initial begin
    for (int i = 0; i < 5; i++) n_op[i] = 0;
    for (int i = 0; i < W; i++) begin op[i] = OP_FADD; a[i] = 0; b[i] = 0; in_tag[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 6000; n++) begin
      @(negedge clk);
      in_valid = '0;
      for (int i = 0; i < W; i++) begin
        if ($urandom % 4 == 0) continue;
        k = $urandom % 5;
        if (k == 4 && (div_busy || n_div > 400 || $urandom % 8 != 0 ||
            (i == 1 && in_valid[0] && op[0] == OP_FDIV))) k = $urandom % 4;
        x = ($urandom % 10 == 0) ? pick_operand($urandom % 7) : rnd_fp(100, 154);
        y = ($urandom % 10 == 0) ? pick_operand($urandom % 7) : rnd_fp(100, 154);
        if (k < 2 && $urandom % 8 == 0) begin        // near or exact cancellation
          y = x ^ 32'h8000_0000;
          if (k == 1) y = x;
          y[2:0] = 3'($urandom);
        end
        if (k == 2 && $urandom % 6 == 0) begin       // overflow / underflow
          x = rnd_fp(1, 60);  y = rnd_fp(1, 60);
          if ($urandom % 2) begin x = rnd_fp(200, 254); y = rnd_fp(200, 254); end
        end
        if (k == 3) x = ($urandom % 3 == 0) ? 32'($urandom % 1000) - 500 : $urandom;
        op[i] = (k == 0) ? OP_FADD : (k == 1) ? OP_FSUB : (k == 2) ? OP_FMUL : (k == 3) ? OP_ITOF : OP_FDIV;
        a[i] = x; b[i] = y; in_tag[i] = TW'(tag);
        exp_r[tag] = ref_op(k, x, y); exp_t[tag] = cyc; ea_v[tag] = x; eb_v[tag] = y; eop[tag] = k;
        in_valid[i] = 1'b1;
        n_op[k]++;
        if (k == 4) n_div++;
        tag = (tag + 1) % 256;
      end
    end
    @(negedge clk); in_valid = '0;
    repeat (40) @(negedge clk);
    $display("ops: add %0d sub %0d mul %0d itof %0d div %0d", n_op[0], n_op[1], n_op[2], n_op[3], n_op[4]);
    chk(n_op[4] > 50, "enough divisions");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
