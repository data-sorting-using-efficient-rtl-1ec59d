// shift_buffer: serial-in, parallel-out chain of DEPTH registers of W bits.
//
// On each clock with 'shift' high, every register takes the value of the one
// above it and 'din' enters at the top, q[DEPTH-1]. After DEPTH shifts the
// first value in sits in q[0] and the last in q[DEPTH-1], so q[i] holds the
// i-th value of the sequence. The sorter uses two of these: the binary buffer
// B, where q[i] is the element written to Hamming-memory row i, and the
// sorted buffer S, which fills in ascending order. 'dout' is q[0], the value
// that leaves the chain on the next shift.
// Reset (asynchronous, active low) clears all registers.
// The two serial buffers are part of the method; the shift direction, which
// lines B up with the matrix rows and leaves S ascending from q[0], and the
// reset are this design's choices.
module shift_buffer #(
  parameter int unsigned W     = 10,    // register width (element width m)
  parameter int unsigned DEPTH = 1024   // number of registers (N)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         shift,
  input  logic [W-1:0] din,
  output logic [W-1:0] q [DEPTH],
  output logic [W-1:0] dout
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < DEPTH; i++) q[i] <= '0;
    end else if (shift) begin
      for (int unsigned i = 0; i + 1 < DEPTH; i++) q[i] <= q[i+1];
      q[DEPTH-1] <= din;
    end
  end

  assign dout = q[0];

endmodule
