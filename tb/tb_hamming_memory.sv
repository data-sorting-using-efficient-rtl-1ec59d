// tb_hamming_memory: writes random one-hot rows into the Hamming matrix at
// DW = 3 with N = 6 rows (a 6 x 8 matrix), keeping a copy of the matrix in the testbench,
// and after each batch of writes reads back every column and compares it
// with the transpose of the copy.
module tb_hamming_memory;
  localparam int unsigned DW = 3;
  localparam int unsigned K  = 1 << DW;
  localparam int unsigned N  = 6;

  logic          clk = 0;
  logic [N-1:0]  row_we = '0;
  logic [K-1:0]  wdata = '0;
  logic [DW-1:0] col_sel = '0;
  logic [N-1:0]  col;
  int checks = 0, failures = 0;
  bit model [N][K];   // model[row][column]

  hamming_memory #(.DW(DW), .N(N)) dut (.clk, .row_we, .wdata, .col_sel, .col);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_row(int r, int v);
    row_we = N'(1) << r;
    wdata  = K'(1) << v;
    @(posedge clk); #1;
    row_we = '0;
    for (int c = 0; c < int'(K); c++) model[r][c] = (c == v);
  endtask

  task automatic check_columns();
    for (int c = 0; c < int'(K); c++) begin
      col_sel = DW'(c);
      #1;
      for (int r = 0; r < int'(N); r++) begin
        checks++;
        if (col[r] != model[r][c]) begin
          failures++; $display("FAIL column %0d row %0d: %0d", c, r, col[r]);
        end
      end
    end
  endtask

  initial begin
    @(posedge clk); #1;
    // first fill every row in order, as the write stage does
    for (int r = 0; r < int'(N); r++) write_row(r, $urandom_range(0, K - 1));
    check_columns();
    // then random rows, idle cycles with no write in between
    for (int k = 0; k < 20; k++) begin
      write_row($urandom_range(0, N - 1), $urandom_range(0, K - 1));
      @(posedge clk); #1;
      check_columns();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
