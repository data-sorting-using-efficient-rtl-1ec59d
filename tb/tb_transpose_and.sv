// tb_transpose_and: the AND/OR product of one Hamming column with buffer B,
// DW = 3 (8 registers). Two kinds of stimulus: sorter-like, where the column
// marks exactly the registers holding one value (the result must be that
// value, or 0 for an empty column), and arbitrary, where the result must be
// the bitwise OR of the marked registers.
module tb_transpose_and;
  localparam int unsigned DW = 3;
  localparam int unsigned N  = 1 << DW;

  logic [N-1:0]  col;
  logic [DW-1:0] b [N];
  logic [DW-1:0] value;
  int checks = 0, failures = 0;

  transpose_and #(.DW(DW)) dut (.col, .b, .value);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < int'(N); i++) b[i] = DW'($urandom_range(0, N - 1));
      // sorter-like: column of value v
      for (int v = 0; v < int'(N); v++) begin
        bit present;
        present = 0;
        for (int i = 0; i < int'(N); i++) begin
          col[i] = (b[i] == DW'(v));
          if (col[i]) present = 1;
        end
        #1;
        checks++;
        if (value != (present ? DW'(v) : DW'(0))) begin
          failures++; $display("FAIL v=%0d value=%0d", v, value);
        end
      end
      // arbitrary column
      begin
        logic [DW-1:0] exp;
        exp = '0;
        col = N'($urandom);
        for (int i = 0; i < int'(N); i++) if (col[i]) exp |= b[i];
        #1;
        checks++;
        if (value != exp) begin failures++; $display("FAIL arbitrary col=%b value=%0d exp %0d", col, value, exp); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
