// tb_ifetch_queue: random pushes, pops and flushes on a DEPTH=2 queue of
// 32-bit words against a queue model; checks order, `empty` and `count`,
// never pushing into a full queue or popping an empty one.
module tb_ifetch_queue;
  localparam int DEPTH = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic flush = 0, push = 0, pop = 0, empty;
  logic [31:0] din = '0, dout;
  logic [1:0] count;
  logic [31:0] model [$];
  int checks = 0, failures = 0;

  ifetch_queue #(.T(logic [31:0]), .DEPTH(DEPTH)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      checks++;
      if (count != 2'(model.size()) || empty != (model.size() == 0) ||
          (model.size() > 0 && dout != model[0])) begin
        failures++; $display("FAIL count %0d model %0d", count, model.size());
      end
      flush = ($urandom % 50) == 0;
      pop   = model.size() > 0 && ($urandom % 2);
      push  = (model.size() < DEPTH || pop) && ($urandom % 2);
      din   = $urandom;
      @(posedge clk);
      if (flush) model.delete();
      else begin
        if (pop) void'(model.pop_front());
        if (push) model.push_back(din);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
