// ifetch_queue: per-HC instruction fetch queue of the IFE.
//
// A small FIFO of fetched long instruction words (entries of type T) that
// decouples the fetch from the decode stage. `count` lets the fetch side
// stop before the queue overflows (counting its in-flight fetch); `flush`
// empties it when the branch unit re-steers the HC or the HC stops. A push
// and a pop may happen in the same clock; push into a full queue and pop
// from an empty one are errors (asserted). The queue per HC follows the
// architecture; its depth is this design's choice.
module ifetch_queue #(
  parameter type T     = logic [31:0],
  parameter int  DEPTH = 2,
  parameter int  AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        flush,
  input  logic        push,
  input  T            din,
  input  logic        pop,
  output T            dout,
  output logic        empty,
  output logic [AW:0] count
);
  T              mem [DEPTH];
  logic [AW-1:0] rp, wp;

  assign empty = (count == 0);
  assign dout  = mem[rp];

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (int'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      rp <= '0; wp <= '0; count <= '0;
    end else if (flush) begin
      rp <= '0; wp <= '0; count <= '0;
    end else begin
      if (push) begin mem[wp] <= din; wp <= inc(wp); end
      if (pop)  rp <= inc(rp);
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
    end

  assert property (@(posedge clk) disable iff (!rst_n) !(push && !pop && count == (AW+1)'(DEPTH)))
    else $error("ifetch_queue overflow");
  assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty))
    else $error("ifetch_queue underflow");
endmodule
