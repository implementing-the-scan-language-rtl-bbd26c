// tb_sparse_encoder: all 64 patterns of two 3-bit digits; each must give
// exactly two ones, at line d0 and at line 8 + d1.
module tb_sparse_encoder;
  int checks = 0, failures = 0;

  logic [5:0]  dense;
  logic [15:0] sparse;

  sparse_encoder #(.DIGITS(2), .DIGIT_BITS(3)) dut (.dense(dense), .sparse(sparse));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      logic [15:0] exp;
      dense = 6'(v);
      exp = '0;
      exp[v % 8] = 1'b1;
      exp[8 + v / 8] = 1'b1;
      #1;
      checks++;
      if (sparse !== exp) begin
        failures++;
        $display("FAIL dense=%0d sparse=%b exp=%b", v, sparse, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
