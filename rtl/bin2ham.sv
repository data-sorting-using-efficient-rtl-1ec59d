// bin2ham: binary-to-Hamming converter.
//
// Turns a DW-bit unsigned element v into two K-bit codes, K = 2**DW:
//   thermo : thermometer code, bits 0..v set (v+1 ones), and
//   onehot : its "maximum order" code, only the highest set bit of thermo,
//            i.e. bit v.
// The one-hot code is what the Hamming memory stores: two different values
// give orthogonal rows, equal values give the same row.
// The thermometer/one-hot pair is the method the sorter is built on. Mapping
// value v to bit v (rather than v-1) is this design's choice, so that the
// value 0 is kept and all 2**DW values fit in K = 2**DW columns.
// Purely combinational, no clock.
module bin2ham #(
  parameter int unsigned DW = 10   // element width m
) (
  input  logic [DW-1:0]      bin,     // element, unsigned binary
  output logic [(1<<DW)-1:0] thermo,  // thermometer code, bits 0..bin set
  output logic [(1<<DW)-1:0] onehot   // maximum-order code, bit bin set
);

  localparam int unsigned K = 1 << DW;

  // Thermometer: bit j is set when j <= bin.
  always_comb begin
    for (int unsigned j = 0; j < K; j++) begin
      thermo[j] = (j <= 32'(bin));
    end
  end

  // Maximum order: a thermometer bit whose upper neighbour is clear.
  assign onehot = thermo & ~(thermo >> 1);

endmodule
