// tb_wr_addr_decoder: drives random write strobes into the write-address
// counter with N = 6 rows (not a power of two, so the return from row 5 to
// row 0 is the counter's own and not a binary wrap) and compares address,
// one-hot row enables and the last-row flag with a counter model kept in the
// testbench.
module tb_wr_addr_decoder;
  localparam int unsigned N  = 6;
  localparam int unsigned AW = 3;

  logic          clk = 0, rst_n = 0, inc = 0;
  logic [AW-1:0] addr;
  logic [N-1:0]  row_we;
  logic          last;
  int checks = 0, failures = 0;
  int model = 0, wraps = 0;

  wr_addr_decoder #(.N(N)) dut (.clk, .rst_n, .inc, .addr, .row_we, .last);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      inc = ($urandom_range(0, 3) != 0);
      #1;
      checks += 3;
      if (int'(addr) != model) begin failures++; $display("FAIL addr %0d exp %0d", addr, model); end
      if (row_we != (inc ? N'(1) << model : N'(0))) begin
        failures++; $display("FAIL row_we %b at addr %0d inc %0d", row_we, model, inc);
      end
      if (last != (model == int'(N) - 1)) begin failures++; $display("FAIL last at %0d", model); end
      @(posedge clk);
      if (inc) begin
        if (model == int'(N) - 1) wraps++;
        model = (model + 1) % int'(N);
      end
      #1;
    end
    checks++;
    if (wraps < 2) begin failures++; $display("FAIL counter never wrapped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
