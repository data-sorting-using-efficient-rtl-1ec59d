// tb_one_detector: random columns of 16 bits (N = 16), with densities from
// empty to full, compared with $countones; 'any' must be set exactly when the
// column is not empty.
module tb_one_detector;
  localparam int unsigned N  = 16;
  localparam int unsigned CW = 5;

  logic [N-1:0]  col;
  logic [CW-1:0] count;
  logic         any;
  int checks = 0, failures = 0;

  one_detector #(.N(N)) dut (.col, .count, .any);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      case (t)
        0: col = '0;
        1: col = '1;
        default: begin
          int unsigned d;
          d = $urandom_range(0, 4);
          col = N'($urandom);
          for (int k = 0; k < int'(d); k++) col &= N'($urandom);
        end
      endcase
      #1;
      checks += 2;
      if (int'(count) != $countones(col)) begin
        failures++; $display("FAIL col=%b count=%0d", col, count);
      end
      if (any != (col != '0)) begin failures++; $display("FAIL any col=%b", col); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
