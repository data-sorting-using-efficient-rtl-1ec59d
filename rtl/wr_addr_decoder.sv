// wr_addr_decoder: counter-based write address with a one-hot row decoder.
//
// During the write stage each accepted element goes to the next row of the
// Hamming memory. An incrementing counter holds the row number; a one-hot
// decoder turns it into the row write enables, gated by 'inc' so that at
// most one row is written per clock. 'last' flags the final row (N-1), which
// tells the control unit that the write stage ends with this element. The
// counter returns to 0 after row N-1, ready for the next data set; reset
// (asynchronous, active low) also brings it back to 0.
// The counter-addressed one-hot decoder is the method's; the return to row 0
// for the next set is this design's choice.
// Timing: row_we and last are combinational from the counter and 'inc'; the
// counter advances on the clock edge where 'inc' is high.
module wr_addr_decoder #(
  parameter int unsigned N  = 1024,                      // rows (elements per set)
  parameter int unsigned AW = (N > 1) ? $clog2(N) : 1    // address width
) (
  input  logic               clk,
  input  logic               rst_n,   // asynchronous, active low
  input  logic               inc,     // an element is written this cycle
  output logic [AW-1:0]      addr,    // current row
  output logic [N-1:0]       row_we,  // one-hot row write enables
  output logic               last     // addr is the last row, N-1
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      addr <= '0;
    else if (inc)    addr <= last ? '0 : addr + 1'b1;
  end

  always_comb begin
    row_we = '0;
    row_we[addr] = inc;
  end

  assign last = (addr == AW'(N - 1));

endmodule
