// tb_thread_table: 4 Contexts of 2 HCs. The testbench keeps its own copy
// of every HC state, of the cPtr/hcPtr scheduling pointers and of the
// affinity masks, and checks each allocation search against it: the
// result must come exactly one clock after the request, pick the first
// ready Context allowed by the issuing Context's C_Affin searching from
// that Context's cPtr, then the first ready HC allowed by HC_Affin
// searching from the chosen Context's hcPtr, and report "not found" when
// no HC qualifies. Chosen HCs are created (READY -> RUNNING); random
// running HCs exit, and the affinity masks are rewritten now and then.
module tb_thread_table;
  import vt_pkg::*;
  localparam int NC = 4, NH = 2, CW = 2, HW = 1;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  hc_event_e ev [NC][NH];
  hc_state_e wr_state = HC_READY;
  hc_state_e state [NC][NH];
  logic [NC*NH-1:0] illegal;
  logic aff_we = 0;
  logic [CW-1:0] aff_ctx = '0, issuing_c = '0, res_c;
  logic [NC-1:0] c_affin_wdata = '1, c_affin [NC];
  logic [NH-1:0] hc_affin_wdata = '1, hc_affin [NC];
  logic sched_req = 0, res_valid, res_found;
  logic [HW-1:0] res_h;
  int checks = 0, failures = 0, n_found = 0, n_none = 0;
  hc_state_e st_m [NC][NH];
  int cptr_m [NC], hcptr_m [NC];
  logic [NC-1:0] caff_m [NC];
  logic [NH-1:0] haff_m [NC];

  thread_table #(.NC(NC), .NH(NH)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic clear_ev();
    for (int c = 0; c < NC; c++) for (int h = 0; h < NH; h++) ev[c][h] = EV_NONE;
  endtask

  task automatic compare_states();
    for (int c = 0; c < NC; c++) for (int h = 0; h < NH; h++) begin
      checks++;
      if (state[c][h] != st_m[c][h]) begin
        failures++; $display("FAIL state %0d.%0d %s want %s", c, h, state[c][h].name(), st_m[c][h].name());
      end
    end
  endtask

  initial begin
    clear_ev();
    for (int c = 0; c < NC; c++) begin
      cptr_m[c] = 0; hcptr_m[c] = 0; caff_m[c] = '1; haff_m[c] = '1;
      for (int h = 0; h < NH; h++) st_m[c][h] = HC_DEBUG;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // host: all HCs to READY
    @(negedge clk);
    for (int c = 0; c < NC; c++) for (int h = 0; h < NH; h++) begin
      ev[c][h] = EV_HOST_WRSTATE; st_m[c][h] = HC_READY;
    end
    @(negedge clk); clear_ev();
    compare_states();
    for (int t = 0; t < 400; t++) begin
      bit ef; int ec, eh; logic [NC-1:0] crdy;
      // occasionally change the affinity of a Context
      if (t % 37 == 5) begin
        aff_we = 1; aff_ctx = CW'($urandom);
        c_affin_wdata = NC'($urandom) | NC'(1 << ($urandom % NC));
        hc_affin_wdata = NH'($urandom) | NH'(1 << ($urandom % NH));
        caff_m[aff_ctx] = c_affin_wdata; haff_m[aff_ctx] = hc_affin_wdata;
        @(negedge clk); aff_we = 0;
      end
      // search
      issuing_c = CW'($urandom);
      sched_req = 1;
      @(negedge clk); sched_req = 0;
      for (int c = 0; c < NC; c++) begin
        crdy[c] = 0;
        for (int h = 0; h < NH; h++) if (st_m[c][h] == HC_READY) crdy[c] = 1;
      end
      crdy = crdy & caff_m[issuing_c];
      ef = 0; ec = 0; eh = 0;
      for (int k = 0; k < NC; k++)
        if (!ef && crdy[(cptr_m[issuing_c] + k) % NC]) begin ef = 1; ec = (cptr_m[issuing_c] + k) % NC; end
      if (ef) begin
        bit hf; hf = 0;
        for (int k = 0; k < NH; k++)
          if (!hf && st_m[ec][(hcptr_m[ec] + k) % NH] == HC_READY && haff_m[ec][(hcptr_m[ec] + k) % NH]) begin
            hf = 1; eh = (hcptr_m[ec] + k) % NH;
          end
        ef = hf;
      end
      checks++;
      if (!res_valid || res_found != ef || (ef && (res_c != CW'(ec) || res_h != HW'(eh)))) begin
        failures++;
        $display("FAIL search from %0d: valid %b found %b %0d.%0d want %b %0d.%0d", issuing_c,
                 res_valid, res_found, res_c, res_h, ef, ec, eh);
      end
      if (ef) begin
        n_found++;
        cptr_m[issuing_c] = ec; hcptr_m[ec] = eh;
        ev[ec][eh] = EV_CREATE; st_m[ec][eh] = HC_RUNNING;
      end else n_none++;
      @(negedge clk); clear_ev();
      checks++; if (res_valid) begin failures++; $display("FAIL result valid without request"); end
      // a random running HC exits
      if ($urandom % 2) begin
        int c, h; c = $urandom % NC; h = $urandom % NH;
        if (st_m[c][h] == HC_RUNNING) begin
          ev[c][h] = EV_EXIT;
          @(negedge clk); clear_ev();
          checks++; if (state[c][h] != HC_TERM_SYNC) begin failures++; $display("FAIL exit"); end
          st_m[c][h] = HC_READY;
          @(negedge clk);
        end
      end
      compare_states();
    end
    $display("found %0d, none %0d", n_found, n_none);
    checks++; if (n_none == 0 || n_found == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
