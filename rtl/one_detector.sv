// one_detector: counts the '1's of a Hamming-matrix column.
//
// The column read from the Hamming memory has one set bit per element equal
// to the column's value. Its population count is the number of copies of that
// value, which the control unit uses to repeat the value in the sorted
// output; 'any' says the value occurs at all (the column is not empty).
// Counting the copies is the method's; the adder-chain insides are this
// design's choice. The column has N bits, one per element. A plain adder chain; purely
// combinational.
module one_detector #(
  parameter int unsigned N  = 1024,            // column length (elements per set)
  parameter int unsigned CW = $clog2(N + 1)    // count width
) (
  input  logic [N-1:0]  col,
  output logic [CW-1:0] count,   // 0..N
  output logic          any
);

  always_comb begin
    count = '0;
    for (int unsigned i = 0; i < N; i++) begin
      count = count + CW'(col[i]);
    end
  end

  assign any = |col;

endmodule
