// ff1_biased: find-first-one with a biased (rotating) starting point.
//
// Returns the index of the first set bit of `vec`, searching upwards from
// `start` and wrapping around past the top bit. The thread scheduler uses
// it twice: once to pick a Context among those able to take a new thread
// (biased by the issuing Context's cPtr) and once to pick an HC inside the
// chosen Context. Purely combinational. The search order (start inclusive,
// upwards, wrapping) is this design's choice; the architecture only names a
// find_first_one block with a biased starting point.
module ff1_biased #(
  parameter int N  = 8,
  parameter int IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]  vec,
  input  logic [IW-1:0] start,
  output logic          found,
  output logic [IW-1:0] idx
);
  always_comb begin
    found = 1'b0;
    idx   = '0;
    for (int k = 0; k < N; k++)
      if (!found && vec[(int'(start) + k) % N]) begin
        found = 1'b1;
        idx   = IW'((int'(start) + k) % N);
      end
  end
endmodule
