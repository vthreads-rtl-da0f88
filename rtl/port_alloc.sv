// port_alloc: dynamic allocation of register-file read ports.
//
// The decoders of one long instruction word report, per slot, which of its
// (up to two) source operands it reads. This block hands out the R read
// ports of the HC's register file in order to the sources that need one,
// and tells every source which port will deliver its value. Because ports
// are allocated per bundle and not fixed per slot, any mix of syllables may
// share a bundle as long as the total number of sources fits (`overflow`
// otherwise). Combinational. Dynamic port allocation follows the
// architecture; the in-order (slot, source) allocation is this design's.
module port_alloc #(
  parameter int W  = 2,
  parameter int R  = 4,
  parameter int RW = (R > 1) ? $clog2(R) : 1
) (
  input  logic [W-1:0]   use1,
  input  logic [W-1:0]   use2,
  input  logic [5:0]     reg1 [W],
  input  logic [5:0]     reg2 [W],
  output logic [5:0]     port_reg [R],   // register index on each port
  output logic [RW-1:0]  map1 [W],       // port of slot i, source 1
  output logic [RW-1:0]  map2 [W],
  output logic           overflow
);
  int n;   // ports handed out so far
  always_comb begin
    n = 0;
    overflow = 1'b0;
    for (int p = 0; p < R; p++) port_reg[p] = '0;
    for (int i = 0; i < W; i++) begin
      map1[i] = '0;
      map2[i] = '0;
      if (use1[i]) begin
        if (n < R) begin port_reg[n] = reg1[i]; map1[i] = RW'(n); end
        else overflow = 1'b1;
        n++;
      end
      if (use2[i]) begin
        if (n < R) begin port_reg[n] = reg2[i]; map2[i] = RW'(n); end
        else overflow = 1'b1;
        n++;
      end
    end
  end
endmodule
