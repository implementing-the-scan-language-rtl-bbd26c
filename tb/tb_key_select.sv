// tb_key_select: the active key follows next_key only on reset and on the
// clock edge of a load pulse; otherwise it holds.
module tb_key_select;
  int checks = 0, failures = 0;
  logic clk = 0, rst, load;
  logic [2:0] next_key, active_key, model;

  key_select #(.KW(3)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; load = 0; next_key = 3'd5;
    @(posedge clk); #1;
    model = 3'd5;
    rst = 0;
    checks++;
    if (active_key !== model) failures++;
    repeat (200) begin
      load = ($urandom_range(0, 3) == 0);
      next_key = 3'($urandom);
      @(posedge clk);
      if (load) model = next_key;
      #1;
      checks++;
      if (active_key !== model) begin
        failures++;
        $display("FAIL active=%0d exp=%0d", active_key, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
