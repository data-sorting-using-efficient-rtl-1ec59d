// sort_control: control unit of the comparison-free sorter.
//
// Write stage (state WRITE, also the state after reset): 'in_ready' is high
// and every cycle with 'in_valid' writes one element ('wr_en'): its one-hot
// code into the next Hamming-memory row and its binary value into buffer B.
// The element that lands in the last row ('wr_last') ends the stage, so with
// elements on every clock the write stage takes N cycles.
//
// Read stage (state READ): a column counter (incrementer) walks the K columns
// of the Hamming matrix from value 0 upwards. For each column the one
// detector gives the number of copies c of that value:
//   c = 0  the column is skipped in one cycle, nothing is emitted;
//   c >= 1 the value is emitted ('emit') on c consecutive cycles. A
//          decrementer ('rem') holds the copies still to emit while the
//          counter stays on the column.
// The read stage therefore takes N + (number of empty columns) cycles. With
// the default N = K a whole sort takes 2N cycles (all values distinct) to
// 3N-1 cycles (all equal).
// After the last column 'sorted_valid' rises and stays high until the next
// read stage starts; the sorter is back in WRITE and takes the next data set.
//
// The two stages, the N-cycle write, the per-column duplicate count and the
// 2N..3N cycle bound follow the sorter's method. The valid/ready input
// handshake, skipping an empty column in one cycle and the exact repeat
// sequencing are this design's choices.
module sort_control
  import sort_pkg::*;
#(
  parameter int unsigned DW = 10,               // element width m; K = 2**DW columns
  parameter int unsigned N  = 1 << DW,          // elements per set
  parameter int unsigned CW = $clog2(N + 1)     // width of a copy count, 0..N
) (
  input  logic          clk,
  input  logic          rst_n,        // asynchronous, active low
  // input side
  input  logic          in_valid,
  output logic          in_ready,
  output logic          wr_en,        // write this element (row + buffer B)
  input  logic          wr_last,      // the write address is the last row
  // read side
  output logic [DW-1:0] col_sel,      // Hamming-matrix column being read
  input  logic [CW-1:0] col_count,    // copies of value col_sel
  input  logic          col_any,      // col_count != 0
  output logic          emit,         // value col_sel goes to the sorted buffer
  output logic          busy,         // read stage in progress
  output logic          sorted_valid  // sorted buffer holds a complete result
);

  localparam int unsigned K = 1 << DW;

  sort_state_e   state;
  logic [DW-1:0] col;
  logic [CW-1:0] rem;       // copies of the current value still to emit
  logic [CW-1:0] left;      // copies left after this cycle's emission
  logic          advance;   // move to the next column after this cycle

  assign in_ready = (state == ST_WRITE);
  assign wr_en    = in_ready && in_valid;
  assign busy     = (state == ST_READ);
  assign col_sel  = col;

  always_comb begin
    emit    = busy && ((rem != '0) || col_any);
    left    = (rem != '0) ? rem - 1'b1 : col_count - 1'b1;
    advance = busy && (!emit || (left == '0));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= ST_WRITE;
      col          <= '0;
      rem          <= '0;
      sorted_valid <= 1'b0;
    end else begin
      unique case (state)
        ST_WRITE: begin
          if (wr_en && wr_last) begin
            state        <= ST_READ;
            col          <= '0;
            rem          <= '0;
            sorted_valid <= 1'b0;
          end
        end
        ST_READ: begin
          if (advance) begin
            rem <= '0;
            if (col == DW'(K - 1)) begin
              state        <= ST_WRITE;
              sorted_valid <= 1'b1;
            end else begin
              col <= col + 1'b1;
            end
          end else begin
            rem <= left;
          end
        end
        default: state <= ST_WRITE;
      endcase
    end
  end

  // The one detector's flag must agree with its count.
  a_any_count: assert property (@(posedge clk) disable iff (!rst_n)
                                col_any == (col_count != '0));

endmodule
