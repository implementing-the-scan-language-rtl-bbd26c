// tb_seq_assoc_memory: a 16-index sequence memory with four keys.
//  1. The A order of a 4x4 level (0,1,5,4,2,6,10,9,8,3,7,11,15,14,13,12)
//     is stored under key 2 as the tuples (key, p[t]) -> p[t+1], the last
//     index wrapping to 0 (which stores nothing). Stepping must replay the
//     order, one index per clock, and close the cycle after 16 steps.
//  2. Idle cycles (step low) hold the index; restart returns to 0.
//  3. A learning cycle holds the index even with step high.
//  4. A key with nothing stored recalls 0, so the index stays at 0.
//  5. After clear and storing the raster order under key 1, the memory
//     replays the raster order.
//  6. Cross-talk, checked against a reference model of the storage and
//     recall rules: (a) the A and raster orders stored together under keys
//     0 and 1 of the same memory, (b) a second memory that splits the
//     index into two 2-bit digits (row and column) holding the A order.
//     Both must follow the model step by step, and in both the model
//     departs from the stored order (the recalled sequence is mixed).
module tb_seq_assoc_memory;
  import scan_tb_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst, step, restart, clear, learn;
  logic [1:0] key, learn_key;
  logic [3:0] state, learn_state, learn_next;

  seq_assoc_memory #(.N_KEYS(4), .STATE_BITS(4)) dut (.*);

  // second memory: index split into two digits
  logic       step2, learn2;
  logic [3:0] state2;
  seq_assoc_memory #(.N_KEYS(4), .STATE_BITS(4), .DIGIT_BITS(2)) dut2 (
    .clk, .rst, .step(step2), .restart(1'b0), .key(2'd0), .state(state2),
    .clear(1'b0), .learn(learn2), .learn_key(2'd0), .learn_state, .learn_next
  );

  // Reference model: input lines of (key, index) for a given digit width,
  // and recall from a list of stored tuples.
  typedef struct { int unsigned k, s, n; } tuple_t;

  function automatic logic [19:0] xlines(int unsigned k, int unsigned s, int unsigned db);
    logic [19:0] v = '0;
    int unsigned d = 1 << db;
    v[k] = 1'b1;
    for (int unsigned g = 0; g < 4 / db; g++) v[4 + g * d + ((s >> (g * db)) % d)] = 1'b1;
    return v;
  endfunction

  function automatic int unsigned recall(tuple_t st [$], int unsigned k, int unsigned s, int unsigned db);
    logic [19:0] x = xlines(k, s, db);
    int unsigned r = 0;
    for (int i = 0; i < 4; i++) begin
      logic [19:0] wrow = '0;
      foreach (st[t]) if (((st[t].n >> i) & 1) != 0) wrow |= xlines(st[t].k, st[t].s, db);
      if ($countones(wrow & x) >= 1 + 4 / db) r |= (1 << i);
    end
    return r;
  endfunction

  always #5 clk = ~clk;

  task automatic load(order_t o, logic [1:0] k);
    foreach (o[t]) begin
      learn = 1; learn_key = k;
      learn_state = 4'(o[t]);
      learn_next  = 4'(o[(t + 1) % o.size()]);
      @(posedge clk); #1;
    end
    learn = 0;
  endtask

  task automatic expect_state(int unsigned e, string what);
    checks++;
    if (state !== 4'(e)) begin
      failures++;
      $display("FAIL %s: state=%0d exp=%0d", what, state, e);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic order_t oa = order_a(4);
    automatic order_t orr = order_r(4);
    rst = 1; step = 0; restart = 0; clear = 0; learn = 0; step2 = 0; learn2 = 0;
    key = 2; learn_key = 0; learn_state = 0; learn_next = 0;
    @(posedge clk); #1;
    rst = 0;
    expect_state(0, "after reset");
    load(oa, 2);
    // 1. replay, two full cycles, one index per clock
    step = 1;
    for (int t = 0; t < 40; t++) begin
      expect_state(oa[t % 16], "replay A4");
      @(posedge clk); #1;
    end
    // now at oa[40 % 16] = oa[8]
    // 2. hold and restart
    step = 0;
    repeat (3) @(posedge clk);
    #1 expect_state(oa[8], "hold");
    restart = 1; step = 1;
    @(posedge clk); #1;
    restart = 0;
    expect_state(0, "restart");
    @(posedge clk); #1;
    expect_state(oa[1], "step after restart");
    // 3. learning holds the sequence (re-store an existing tuple)
    learn = 1; learn_key = 2; learn_state = 4'(oa[5]); learn_next = 4'(oa[6]);
    @(posedge clk); #1;
    learn = 0;
    expect_state(oa[1], "hold while learning");
    @(posedge clk); #1;
    expect_state(oa[2], "step after learning");
    // 4. unloaded key recalls 0
    key = 3;
    @(posedge clk); #1;
    expect_state(0, "unloaded key");
    @(posedge clk); #1;
    expect_state(0, "unloaded key stays");
    // 5. clear and reload with raster order under key 1
    step = 0;
    clear = 1;
    @(posedge clk); #1;
    clear = 0;
    load(orr, 1);
    key = 1; step = 1;
    for (int t = 0; t < 20; t++) begin
      expect_state(orr[t % 16], "replay R4");
      @(posedge clk); #1;
    end
    // 6a. two complete orders in one memory
    begin
      automatic tuple_t st [$];
      automatic int unsigned m = 0;
      automatic bit departs = 0;
      step = 0;
      clear = 1;
      @(posedge clk); #1;
      clear = 0;
      load(oa, 0);
      load(orr, 1);
      foreach (oa[t])  st.push_back('{0, oa[t],  oa[(t + 1) % 16]});
      foreach (orr[t]) st.push_back('{1, orr[t], orr[(t + 1) % 16]});
      restart = 1;
      @(posedge clk); #1;
      restart = 0;
      key = 1; step = 1;
      for (int t = 0; t < 20; t++) begin
        expect_state(m, "two keys vs model");
        if (m != orr[t % 16]) departs = 1;
        m = recall(st, 1, m, 4);
        @(posedge clk); #1;
      end
      checks++;
      if (!departs) failures++;
      step = 0;
    end
    // 6b. two-digit index
    begin
      automatic tuple_t st [$];
      automatic int unsigned m = 0;
      automatic bit departs = 0;
      foreach (oa[t]) begin
        learn2 = 1;
        learn_state = 4'(oa[t]);
        learn_next  = 4'(oa[(t + 1) % 16]);
        st.push_back('{0, oa[t], oa[(t + 1) % 16]});
        @(posedge clk); #1;
      end
      learn2 = 0;
      step2 = 1;
      for (int t = 0; t < 20; t++) begin
        checks++;
        if (state2 !== 4'(m)) begin
          failures++;
          $display("FAIL two digits: state=%0d model=%0d", state2, m);
        end
        if (m != oa[t % 16]) departs = 1;
        m = recall(st, 0, m, 2);
        @(posedge clk); #1;
      end
      checks++;
      if (!departs) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
