// tb_bin2ham: exhaustive check of the binary-to-Hamming converter at DW = 4
// (K = 16). For every value v the thermometer code must be 2**(v+1) - 1 and
// the one-hot code 2**v, both worked out here with integer arithmetic.
module tb_bin2ham;
  localparam int unsigned DW = 4;
  localparam int unsigned K  = 1 << DW;

  logic [DW-1:0] bin;
  logic [K-1:0]  thermo, onehot;
  int checks = 0, failures = 0;

  bin2ham #(.DW(DW)) dut (.bin, .thermo, .onehot);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < int'(K); v++) begin
      longint unsigned exp_t, exp_o;
      bin = DW'(v);
      #1;
      exp_t = (64'd1 << (v + 1)) - 1;
      exp_o = 64'd1 << v;
      checks += 2;
      if (64'(thermo) != exp_t) begin
        failures++;
        $display("FAIL v=%0d thermo=%b expected %b", v, thermo, K'(exp_t));
      end
      if (64'(onehot) != exp_o) begin
        failures++;
        $display("FAIL v=%0d onehot=%b expected %b", v, onehot, K'(exp_o));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
