// tb_shift_buffer: random shift pattern into a 5-deep, 8-bit shift buffer.
// A queue in the testbench holds the last five values shifted in; q[i] must
// equal the i-th oldest of them and dout must equal q[0]. Idle cycles must
// leave the contents unchanged.
module tb_shift_buffer;
  localparam int unsigned W = 8, DEPTH = 5;

  logic         clk = 0, rst_n = 0, shift = 0;
  logic [W-1:0] din = '0;
  logic [W-1:0] q [DEPTH];
  logic [W-1:0] dout;
  int checks = 0, failures = 0;
  logic [W-1:0] model [$];

  shift_buffer #(.W(W), .DEPTH(DEPTH)) dut (.clk, .rst_n, .shift, .din, .q, .dout);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) model.push_back('0);
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 100; t++) begin
      shift = ($urandom_range(0, 2) != 0);
      din   = W'($urandom);
      @(posedge clk); #1;
      if (shift) begin
        void'(model.pop_front());
        model.push_back(din);
      end
      for (int i = 0; i < int'(DEPTH); i++) begin
        checks++;
        if (q[i] != model[i]) begin failures++; $display("FAIL t=%0d q[%0d]=%h exp %h", t, i, q[i], model[i]); end
      end
      checks++;
      if (dout != model[0]) begin failures++; $display("FAIL dout"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
