// cfree_sorter: comparison-free sorter of N unsigned DW-bit elements.
//
// Elements arrive one per clock on a valid/ready input. Each one is converted
// to a one-hot code (bin2ham) and written into the next row of the N x K
// Hamming matrix E (hamming_memory, row chosen by wr_addr_decoder), while
// its binary value is shifted into buffer B (shift_buffer). Once N elements
// are in, the read stage walks the columns of E in increasing value order:
// a column of E (a row of E^T) marks every B register holding that value;
// transpose_and ANDs the column with B and ORs the result into the value,
// one_detector counts the copies, and sort_control emits the value once per
// copy into the sorted buffer S (a second shift_buffer). No two elements are
// ever compared.
//
// Interface:
//   in_valid/in_data/in_ready  element input; accepted when both valid and
//                              ready. in_ready is low during the read stage.
//   out_valid/out_data         the sorted stream, ascending, one value per
//                              clock with gaps where a value is absent.
//   busy                       read stage in progress.
//   sorted_valid               sorted[0..N-1] holds the last result,
//                              ascending (sorted[0] smallest), until the next
//                              read stage begins.
// Sizes: K = 2**DW columns, one per possible value; N elements per data set,
// by default N = K = 1024 (DW = 10). A data set is always exactly N elements.
// Timing: N cycles of writing (one element per clock) plus N + (number of the
// K values absent from the data set) cycles of reading; with N = K that is
// 2N to 3N-1 cycles in all.
module cfree_sorter #(
  parameter int unsigned DW = 10,       // element width m; K = 2**DW
  parameter int unsigned N  = 1 << DW   // elements per data set
) (
  input  logic          clk,
  input  logic          rst_n,        // asynchronous, active low
  input  logic          in_valid,
  input  logic [DW-1:0] in_data,
  output logic          in_ready,
  output logic          out_valid,
  output logic [DW-1:0] out_data,
  output logic          busy,
  output logic          sorted_valid,
  output logic [DW-1:0] sorted [N]
);

  localparam int unsigned K  = 1 << DW;
  localparam int unsigned AW = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned CW = $clog2(N + 1);

  logic [K-1:0]  thermo, onehot;
  logic [AW-1:0] wr_addr;
  logic [N-1:0]  row_we;
  logic          wr_en, wr_last;
  logic [DW-1:0] col_sel;
  logic [N-1:0]  col;
  logic [CW-1:0] col_count;
  logic          col_any;
  logic [DW-1:0] b_q [N];
  logic [DW-1:0] b_dout, s_dout;
  logic [DW-1:0] value;
  logic          emit;

  // Write stage
  bin2ham #(.DW(DW)) u_conv (
    .bin(in_data), .thermo(thermo), .onehot(onehot)
  );

  wr_addr_decoder #(.N(N)) u_waddr (
    .clk, .rst_n, .inc(wr_en), .addr(wr_addr), .row_we(row_we), .last(wr_last)
  );

  hamming_memory #(.DW(DW), .N(N)) u_hmem (
    .clk, .row_we(row_we), .wdata(onehot), .col_sel(col_sel), .col(col)
  );

  shift_buffer #(.W(DW), .DEPTH(N)) u_bbuf (
    .clk, .rst_n, .shift(wr_en), .din(in_data), .q(b_q), .dout(b_dout)
  );

  // Read stage
  one_detector #(.N(N)) u_ones (
    .col(col), .count(col_count), .any(col_any)
  );

  transpose_and #(.DW(DW), .N(N)) u_mult (
    .col(col), .b(b_q), .value(value)
  );

  sort_control #(.DW(DW), .N(N)) u_ctrl (
    .clk, .rst_n,
    .in_valid, .in_ready, .wr_en(wr_en), .wr_last(wr_last),
    .col_sel(col_sel), .col_count(col_count), .col_any(col_any),
    .emit(emit), .busy, .sorted_valid
  );

  shift_buffer #(.W(DW), .DEPTH(N)) u_sbuf (
    .clk, .rst_n, .shift(emit), .din(value), .q(sorted), .dout(s_dout)
  );

  assign out_valid = emit;
  assign out_data  = value;

  // The value read out must be the value of the column being read.
  a_value_is_column: assert property (@(posedge clk) disable iff (!rst_n)
                                      emit |-> (value == col_sel));

endmodule
