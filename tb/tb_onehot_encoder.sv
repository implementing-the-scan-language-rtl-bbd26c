// tb_onehot_encoder: exhaustive check of the 1-out-of-D encoder for a
// power-of-two line count (D = 8) and for D = 5, where codes 5..7 must
// drive no line.
module tb_onehot_encoder;
  int checks = 0, failures = 0;

  logic [2:0] code;
  logic [7:0] lines8;
  logic [4:0] lines5;

  onehot_encoder #(.D(8)) dut8 (.code(code), .lines(lines8));
  onehot_encoder #(.D(5)) dut5 (.code(code), .lines(lines5));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 8; c++) begin
      code = 3'(c);
      #1;
      checks++;
      if (lines8 !== 8'(1 << c)) begin
        failures++;
        $display("FAIL D=8 code=%0d lines=%b", c, lines8);
      end
      checks++;
      if (lines5 !== ((c < 5) ? 5'(1 << c) : 5'b0)) begin
        failures++;
        $display("FAIL D=5 code=%0d lines=%b", c, lines5);
      end
      checks++;
      if ($countones(lines8) != 1) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
