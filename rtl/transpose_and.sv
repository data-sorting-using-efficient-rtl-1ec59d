// transpose_and: one row of the product S = E^T x B, done with AND and OR.
//
// 'col' is a column of the Hamming matrix E (a row of E^T); bit i is set when
// the element in register B[i] has the value of that column. Each B register
// is ANDed with its column bit and the results are ORed together. Because all
// selected registers hold the same value, the OR is that value, whether one
// register or several (duplicates) are selected; an empty column gives 0.
// The AND product of E^T with B is the method's; summing with OR is the
// natural reading of it for one-hot columns. B has N registers, one per element. No comparison between elements takes
// place. Purely combinational.
module transpose_and #(
  parameter int unsigned DW = 10,       // element width m
  parameter int unsigned N  = 1 << DW   // registers in B (elements per set)
) (
  input  logic [N-1:0]  col,
  input  logic [DW-1:0] b [N],
  output logic [DW-1:0] value
);

  always_comb begin
    value = '0;
    for (int unsigned i = 0; i < N; i++) begin
      value = value | (b[i] & {DW{col[i]}});
    end
  end

endmodule
