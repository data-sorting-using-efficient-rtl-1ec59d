// tb_cfree_sorter_fig1: the worked example of the method, four 4-bit
// elements {3, 1, 2, 4}, on a sorter built for it: DW = 4 (K = 16 columns)
// and N = 4 elements. The sorted stream and the sorted buffer must read
// {1, 2, 3, 4}. The write stage takes N = 4 cycles and the read stage
// scans all K = 16 columns, one cycle per column here since no value
// repeats: 20 cycles from the first element in to the result. A second
// pass sends {3, 3, 1, 4}, where the repeated 3 takes two read cycles.
module tb_cfree_sorter_fig1;
  localparam int unsigned DW = 4;
  localparam int unsigned K  = 1 << DW;
  localparam int unsigned N  = 4;

  logic          clk = 0, rst_n = 0;
  logic          in_valid = 0;
  logic [DW-1:0] in_data = '0;
  logic          in_ready, out_valid, busy, sorted_valid;
  logic [DW-1:0] out_data;
  logic [DW-1:0] sorted [N];

  cfree_sorter #(.DW(DW), .N(N)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic run(int data [N], int exp [N]);
    int got [$];
    int cycles = 0;
    int exp_cycles;
    // read cycles: one per copy of each present value, one per absent value
    exp_cycles = int'(N) + int'(N) + int'(K);
    for (int v = 0; v < int'(K); v++) begin
      int c;
      c = 0;
      foreach (data[i]) if (data[i] == v) c++;
      if (c != 0) exp_cycles--;
    end
    for (int i = 0; i < int'(N); i++) begin
      in_valid = 1;
      in_data  = DW'(data[i]);
      @(posedge clk); #1;
      cycles++;
    end
    in_valid = 0;
    while (!sorted_valid || busy) begin
      if (out_valid) got.push_back(int'(out_data));
      @(posedge clk); #1;
      cycles++;
    end
    check(got.size() == int'(N), $sformatf("%0d values streamed", got.size()));
    for (int i = 0; i < int'(N); i++) begin
      check(got.size() > i && got[i] == exp[i], $sformatf("stream[%0d] exp %0d", i, exp[i]));
      check(int'(sorted[i]) == exp[i], $sformatf("sorted[%0d]=%0d exp %0d", i, sorted[i], exp[i]));
    end
    check(cycles == exp_cycles, $sformatf("%0d cycles, expected %0d", cycles, exp_cycles));
    $display("sorted {%0d, %0d, %0d, %0d} in %0d cycles", sorted[0], sorted[1], sorted[2], sorted[3], cycles);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    run('{3, 1, 2, 4}, '{1, 2, 3, 4});
    run('{3, 3, 1, 4}, '{1, 3, 3, 4});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
