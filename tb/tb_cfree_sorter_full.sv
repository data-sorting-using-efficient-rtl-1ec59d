// tb_cfree_sorter_full: the end-to-end test of tb_cfree_sorter run on the
// sorter at its default size, DW = 10 (N = K = 1024 elements), with no
// parameter override. Four data sets: random over the full range, a
// permutation (sorted in 2N cycles), all elements equal (3N-1 cycles), and a
// narrow range with idle input cycles. The checks are the same: output
// stream, parallel sorted buffer, cycle count, and that every mechanism
// occurred.
module tb_cfree_sorter_full;
  localparam int unsigned DW   = 10;  // the sorter's default
  localparam int unsigned N    = 1 << DW;
  localparam int          SETS = 4;

  logic          clk = 0, rst_n = 0;
  logic          in_valid = 0;
  logic [DW-1:0] in_data = '0;
  logic          in_ready, out_valid, busy, sorted_valid;
  logic [DW-1:0] out_data;
  logic [DW-1:0] sorted [N];

  cfree_sorter dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0, done_sets = 0;
  // mechanism counters
  int n_dup = 0, n_skip = 0, n_gap = 0, n_held = 0, n_low = 0, n_high = 0;

  typedef int set_t [$];
  set_t exp_q [$];        // expected sorted sets, oldest first
  int   empties_q [$];    // values absent from each set
  int   first_q [$];      // cycle of each set's first accepted element
  int   gaps_q [$];       // idle input cycles inside each set
  int   acc = 0, gaps = 0;
  int   got [$];
  logic prev_sv = 0, prev_ov = 0;
  logic [DW-1:0] prev_od = '0;

  initial begin
    repeat (200 * N * SETS) @(posedge clk);
    failures++;
    $display("watchdog: %0d of %0d sets done", done_sets, SETS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  // ---------------- monitor ----------------
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      // a set finished on the previous edge
      if (sorted_valid && !prev_sv) begin
        set_t e;
        int lat, exp_lat;
        e = exp_q.pop_front();
        exp_lat = 2 * int'(N) + gaps_q.pop_front() + empties_q[0];
        lat = cyc - first_q.pop_front();
        check(got == e, $sformatf("set %0d: sorted stream", done_sets));
        for (int i = 0; i < int'(N); i++)
          check(int'(sorted[i]) == e[i], $sformatf("set %0d: sorted[%0d]=%0d exp %0d", done_sets, i, sorted[i], e[i]));
        check(lat == exp_lat, $sformatf("set %0d: %0d cycles, expected %0d", done_sets, lat, exp_lat));
        if (exp_lat - empties_q[0] == 2 * int'(N)) begin
          check(lat >= 2 * int'(N) && lat <= 3 * int'(N) - 1, "cycle count within 2N..3N-1");
          if (lat == 2 * int'(N))     n_low++;
          if (lat == 3 * int'(N) - 1) n_high++;
        end
        void'(empties_q.pop_front());
        got.delete();
        done_sets++;
      end
      prev_sv <= sorted_valid;
      // input side
      if (in_valid && !in_ready) n_held++;
      if (in_valid && in_ready) begin
        if (acc == 0) first_q.push_back(cyc);
        if (acc == int'(N) - 1) begin gaps_q.push_back(gaps); gaps = 0; acc = 0; end
        else acc++;
      end else if (acc != 0) begin
        gaps++;
        n_gap++;
      end
      // output side
      if (out_valid) begin
        got.push_back(int'(out_data));
        if (prev_ov && out_data == prev_od) n_dup++;
      end
      if (busy && !out_valid) n_skip++;
      if (out_valid) check(busy, "output only in the read stage");
      prev_ov <= out_valid;
      prev_od <= out_data;
    end
  end

  // ---------------- driver ----------------
  task automatic send_set(int kind, bit with_gaps);
    int data [N];
    int s [$];
    int cnt [N];
    int empties = 0;
    foreach (cnt[v]) cnt[v] = 0;
    for (int i = 0; i < int'(N); i++) begin
      case (kind)
        0: data[i] = $urandom_range(0, N - 1);
        1: data[i] = (i * 7 + 5) % int'(N);
        2: data[i] = int'(N) / 2 + 1;
        default: data[i] = $urandom_range(2, 5);
      endcase
      cnt[data[i]]++;
    end
    for (int v = 0; v < int'(N); v++) begin
      if (cnt[v] == 0) empties++;
      repeat (cnt[v]) s.push_back(v);
    end
    exp_q.push_back(s);
    empties_q.push_back(empties);
    for (int i = 0; i < int'(N); i++) begin
      if (with_gaps && i != 0) begin
        while ($urandom_range(0, 2) == 0) begin
          in_valid = 0;
          @(posedge clk); #1;
        end
      end
      in_valid = 1;
      in_data  = DW'(data[i]);
      do @(posedge clk); while (!in_ready);
      #1;
    end
    in_valid = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    for (int k = 0; k < SETS; k++) begin
      send_set(k, k == 3);
      // every third set waits for the result before the next one
      if (k % 3 == 2) begin
        while (!sorted_valid || busy) begin @(posedge clk); #1; end
        repeat ($urandom_range(0, 3)) begin @(posedge clk); #1; end
      end
    end
    while (done_sets < SETS) begin @(posedge clk); #1; end
    check(n_dup  > 0, "duplicate values repeated");
    check(n_skip > 0, "empty columns skipped");
    check(n_gap  > 0, "idle cycles between input elements");
    check(n_held > 0, "input held off during the read stage");
    check(n_low  > 0, "a set sorted in 2N cycles");
    check(n_high > 0, "a set sorted in 3N-1 cycles");
    $display("mechanisms: dup=%0d skip=%0d gap=%0d held=%0d low=%0d high=%0d",
             n_dup, n_skip, n_gap, n_held, n_low, n_high);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
