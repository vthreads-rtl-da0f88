// bypass: operand bypass of the Mid-Pipe.
//
// For every register-file read port, selects either the value read from the
// register file or a value that the downstream pipeline writes back to the
// same register of the same HC in this clock, so that an instruction word
// read in the clock of the write-back still sees the new value. When several
// write-back ports match, the highest-numbered wins, as in the register file.
// Combinational. `hits` counts the ports that took a bypassed value. The
// per-source bypass multiplexers follow the architecture; the set of
// forwarding sources (the write-back stage only) follows from this design's
// in-order, one-word-in-flight-per-HC pipeline.
module bypass #(
  parameter int R  = 4,
  parameter int WP = 2
) (
  input  logic [5:0]    ra     [R],
  input  logic [31:0]   rf_val [R],
  input  logic [WP-1:0] wb_we,
  input  logic [5:0]    wb_wa  [WP],
  input  logic [31:0]   wb_wd  [WP],
  output logic [31:0]   op_val [R],
  output logic [$clog2(R+1)-1:0] hits
);
  logic [R-1:0] hit;
  always_comb begin
    for (int p = 0; p < R; p++) begin
      hit[p] = 1'b0;
      op_val[p] = rf_val[p];
      for (int w = 0; w < WP; w++)
        if (wb_we[w] && wb_wa[w] == ra[p] && ra[p] != '0) begin
          op_val[p] = wb_wd[w];
          hit[p] = 1'b1;
        end
    end
  end
  assign hits = $bits(hits)'($countones(hit));
endmodule
