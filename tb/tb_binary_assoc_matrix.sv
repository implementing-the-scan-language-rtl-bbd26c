// tb_binary_assoc_matrix: a 12-input, 6-output memory with threshold 3,
// driven with constant-weight inputs (three groups of four lines, one line
// set in each group).
//  1. Four tuples with fully disjoint inputs are stored; each must be
//     recalled exactly, and an unstored input must recall zero.
//  2. After `clear` every input must recall zero.
//  3. Ten random tuples are stored; 300 random inputs are compared with a
//     reference computed from the list of stored tuples: output i is set
//     when at least 3 active input lines j were ever active together with
//     output i in a stored tuple.
module tb_binary_assoc_matrix;
  int checks = 0, failures = 0;
  logic clk = 0, rst, clear, learn;
  logic [11:0] learn_x, x;
  logic [5:0]  learn_y, y;

  binary_assoc_matrix #(.N_IN(12), .N_OUT(6), .THETA(3)) dut (.*);

  always #5 clk = ~clk;

  logic [11:0] sx [$];
  logic [5:0]  sy [$];

  function automatic logic [11:0] rand_x();
    logic [11:0] v = '0;
    for (int g = 0; g < 3; g++) v[g * 4 + $urandom_range(0, 3)] = 1'b1;
    return v;
  endfunction

  function automatic logic [5:0] model(logic [11:0] xin);
    logic [5:0] r;
    for (int i = 0; i < 6; i++) begin
      int z = 0;
      for (int j = 0; j < 12; j++) begin
        logic hit = 1'b0;
        foreach (sx[k]) if (sy[k][i] && sx[k][j]) hit = 1'b1;
        if (xin[j] && hit) z++;
      end
      r[i] = (z >= 3);
    end
    return r;
  endfunction

  task automatic store(logic [11:0] xs, logic [5:0] ys);
    learn = 1; learn_x = xs; learn_y = ys;
    @(posedge clk); #1;
    learn = 0;
    sx.push_back(xs);
    sy.push_back(ys);
  endtask

  task automatic check(logic [11:0] xin, logic [5:0] exp);
    x = xin;
    #1;
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL x=%b y=%b exp=%b", xin, y, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [5:0] ys [4];
    rst = 1; clear = 0; learn = 0; learn_x = '0; learn_y = '0; x = '0;
    @(posedge clk); #1;
    rst = 0;
    // 1. disjoint tuples
    for (int k = 0; k < 4; k++) begin
      automatic logic [11:0] xs = '0;
      xs[k] = 1; xs[4 + k] = 1; xs[8 + k] = 1;
      ys[k] = 6'($urandom);
      // not stored before the clock edge
      if (k == 0) begin
        learn = 1; learn_x = xs; learn_y = 6'h3f; x = xs;
        #1; checks++;
        if (y !== 6'b0) failures++;
        learn = 0;
        @(posedge clk); #1;   // learn dropped before the edge: nothing stored
        checks++;
        if (y !== 6'b0) failures++;
      end
      store(xs, ys[k]);
    end
    for (int k = 0; k < 4; k++) begin
      automatic logic [11:0] xs = '0;
      xs[k] = 1; xs[4 + k] = 1; xs[8 + k] = 1;
      check(xs, ys[k]);
    end
    check(12'b0001_0010_0100, model(12'b0001_0010_0100));
    // 2. clear
    clear = 1;
    @(posedge clk); #1;
    clear = 0;
    sx.delete(); sy.delete();
    for (int k = 0; k < 4; k++) begin
      automatic logic [11:0] xs = '0;
      xs[k] = 1; xs[4 + k] = 1; xs[8 + k] = 1;
      check(xs, 6'b0);
    end
    // 3. random tuples against the reference
    repeat (10) store(rand_x(), 6'($urandom));
    foreach (sx[k]) check(sx[k], model(sx[k]));
    repeat (300) begin
      automatic logic [11:0] xr = rand_x();
      check(xr, model(xr));
    end
    // every stored output bit must be recalled (cross-talk only adds ones)
    foreach (sx[k]) begin
      x = sx[k];
      #1; checks++;
      if ((y & sy[k]) !== sy[k]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
