// tb_level_divider: a divide-by-5 and a divide-by-16 stage under a random
// enable. The count must follow a modulo counter and `done` must be high
// exactly on every N-th enabled cycle.
module tb_level_divider;
  int checks = 0, failures = 0, pulses5 = 0, pulses16 = 0;
  logic clk = 0, rst, en;
  logic [2:0] count5;
  logic [3:0] count16;
  logic done5, done16;
  int m5, m16;

  level_divider #(.N(5))  dut5  (.clk, .rst, .en, .count(count5),  .done(done5));
  level_divider #(.N(16)) dut16 (.clk, .rst, .en, .count(count16), .done(done16));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; en = 0;
    @(posedge clk); #1;
    rst = 0; m5 = 0; m16 = 0;
    repeat (1000) begin
      en = ($urandom_range(0, 2) != 0);
      #1;
      checks += 4;
      if (count5 !== 3'(m5))   failures++;
      if (count16 !== 4'(m16)) failures++;
      if (done5 !== (en && m5 == 4))    failures++;
      if (done16 !== (en && m16 == 15)) failures++;
      if (done5) pulses5++;
      if (done16) pulses16++;
      @(posedge clk);
      if (en) begin
        m5 = (m5 + 1) % 5;
        m16 = (m16 + 1) % 16;
      end
      #1;
    end
    checks++;
    if (pulses5 < 10 || pulses16 < 10) failures++;
    $display("done pulses: N=5 %0d, N=16 %0d", pulses5, pulses16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
