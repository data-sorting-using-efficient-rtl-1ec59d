// tb_sort_control: the control unit alone at DW = 3 (N = K = 8), with the
// write-address counter and the Hamming column counts modelled in the
// testbench. Several data sets (random, all distinct, all equal) are fed with
// random input gaps. Checked: in_ready and wr_en during writing, the emitted
// column sequence (each value once per copy, ascending), the read-stage
// length N + empty columns, in_ready low while busy, and sorted_valid.
module tb_sort_control;
  localparam int unsigned DW = 3;
  localparam int unsigned N  = 1 << DW;

  logic          clk = 0, rst_n = 0;
  logic          in_valid = 0, in_ready, wr_en, wr_last;
  logic [DW-1:0] col_sel;
  logic [3:0]    col_count;
  logic          col_any;
  logic          emit, busy, sorted_valid;
  int checks = 0, failures = 0;

  int cnt [N];      // copies of each value in the current data set
  int written = 0;  // elements written so far in the current set

  sort_control #(.DW(DW)) dut (.*);

  assign wr_last   = (written == int'(N) - 1);
  assign col_count = 4'(cnt[col_sel]);
  assign col_any   = (cnt[col_sel] != 0);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic run_set(int kind);
    int data [N];
    int expected [$];
    int got [$];
    int empties = 0, cycles = 0;
    for (int i = 0; i < int'(N); i++) begin
      case (kind)
        0: data[i] = $urandom_range(0, N - 1);
        1: data[i] = (i * 5 + 3) % int'(N);   // a permutation
        default: data[i] = 6;
      endcase
    end
    foreach (cnt[v]) cnt[v] = 0;
    written = 0;
    // write stage
    for (int i = 0; i < int'(N); i++) begin
      while ($urandom_range(0, 3) == 0) begin
        in_valid = 0; #1;
        check(in_ready && !wr_en && !busy, "idle write cycle");
        @(posedge clk); #1;
      end
      in_valid = 1; #1;
      check(in_ready && wr_en, "write accepted");
      @(posedge clk); #1;
      cnt[data[i]]++;
      written++;
    end
    in_valid = 0;
    // read stage
    for (int v = 0; v < int'(N); v++) begin
      if (cnt[v] == 0) empties++;
      repeat (cnt[v]) expected.push_back(v);
    end
    check(busy && !sorted_valid, "read stage entered");
    while (busy) begin
      check(!in_ready, "in_ready low while reading");
      if (emit) got.push_back(int'(col_sel));
      cycles++;
      @(posedge clk); #1;
      if (cycles > 4 * int'(N)) break;
    end
    check(got == expected, "emitted sequence");
    check(cycles == int'(N) + empties, $sformatf("read cycles %0d, expected %0d", cycles, int'(N) + empties));
    check(sorted_valid && in_ready, "sorted_valid after read");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int s = 0; s < 12; s++) run_set(s % 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
