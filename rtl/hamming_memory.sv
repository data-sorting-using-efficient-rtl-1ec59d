// hamming_memory: the N x K bit Hamming matrix E, built from registers.
// N is the number of elements per data set, K = 2**DW the number of values.
//
// Row i holds the one-hot (maximum order) code of the i-th element written,
// so E has exactly one '1' per row. Rows are written whole, one per clock,
// selected by a one-hot row enable. Reads go the other way: 'col' returns
// column 'col_sel' of E, i.e. row 'col_sel' of the transpose E^T, whose set
// bits name every element equal to the value col_sel. This column read is
// the "matrix transpose" that lets the sorter find all copies of a value in
// one cycle without comparing elements.
// The N x K matrix, its row-per-element write through a counter-addressed
// decoder and the transposed read follow the method. Building it as a
// register array, so that a whole column can be read at once, is this
// design's choice.
// The matrix has no reset: every row is written before the read stage
// reads it.
// Timing: write on the rising clock edge; column read is combinational.
module hamming_memory #(
  parameter int unsigned DW = 10,       // element width m; K = 2**DW columns
  parameter int unsigned N  = 1 << DW   // rows (elements per set)
) (
  input  logic               clk,
  input  logic [N-1:0]       row_we,   // one-hot row write enables
  input  logic [(1<<DW)-1:0] wdata,    // one-hot code of the element
  input  logic [DW-1:0]      col_sel,  // column (value) to read
  output logic [N-1:0]       col       // col[i] = E[i][col_sel]
);

  localparam int unsigned K = 1 << DW;

  logic [K-1:0] mem [N];

  always_ff @(posedge clk) begin
    for (int unsigned i = 0; i < N; i++) begin
      if (row_we[i]) mem[i] <= wdata;
    end
  end

  // Transposed read: bit col_sel of every row.
  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      col[i] = mem[i][col_sel];
    end
  end

  // At most one row is written per clock.
  a_row_onehot: assert property (@(posedge clk) $onehot0(row_we));

endmodule
